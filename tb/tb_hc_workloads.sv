// tb_hc_workloads -- the evaluated traffic patterns, run on the interconnect
// at its default parameters (two accelerator ports).
//
// Part A, transfer sizes: port 0 reads and port 1 writes the same amount of
// data at the same time, as two DMA engines would, in 16-word bursts: one
// word, one burst, 16 KB, 128 KB and 4 MB. Every word is checked, and the
// time each takes is compared with one data beat per cycle (read and write
// channels are independent, so both directions should stream at once).
//
// Part B, bandwidth shares: both ports read and write 16-word bursts without
// pause. Runs: port 0 alone ("isolation"), both ports with no reservation
// (round-robin, even split), and reservation with per-period budgets in the
// ratios 90-10, 70-30, 50-50, 30-70 and 10-90 (20 transactions per period
// of 400 cycles in total). Each port's share of the data beats must match its
// budget share to within 3 points, and port 0 at a 90 share must move as
// much data with port 1 flooding as it does alone with the same budget.
//
// Part C, unequal burst lengths: without reservation, port 0 reads in
// 256-beat bursts and port 1 in 16-beat bursts. With the nominal burst at 16
// both get half of the data beats; with it at 256 (no equalisation) plain
// round-robin hands port 0 256 of every 272 beats (94 %).
module tb_hc_workloads;
  import hc_pkg::*;

  localparam int N = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready, s_aw_valid, s_aw_ready;
  logic [N-1:0] s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  axi_ax_t s_ar [N];
  axi_ax_t s_aw [N];
  axi_w_t  s_w  [N];
  axi_r_t  s_r  [N];
  axi_b_t  s_b  [N];
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready, m_aw_valid, m_aw_ready;
  logic m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  axi_ax_t m_ar, m_aw;
  axi_w_t  m_w;
  axi_r_t  m_r;
  axi_b_t  m_b;
  logic ctl_awvalid = 0, ctl_awready, ctl_wvalid = 0, ctl_wready, ctl_bvalid;
  logic ctl_arvalid = 0, ctl_arready, ctl_rvalid;
  logic [7:0]  ctl_awaddr = 0, ctl_araddr = 0;
  logic [31:0] ctl_wdata = 0, ctl_rdata;
  logic [1:0]  ctl_bresp, ctl_rresp;
  logic [N-1:0] budget_stall;
  logic [BUDGET_W-1:0] budget_left [N];
  logic recharge;

  hyperconnect dut (
    .clk, .rst_n,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b,
    .ctl_awvalid, .ctl_awready, .ctl_awaddr, .ctl_wvalid, .ctl_wready, .ctl_wdata,
    .ctl_bvalid, .ctl_bready(1'b1), .ctl_bresp,
    .ctl_arvalid, .ctl_arready, .ctl_araddr, .ctl_rvalid, .ctl_rready(1'b1), .ctl_rdata,
    .ctl_rresp, .budget_stall, .budget_left, .recharge);

  for (genvar i = 0; i < N; i++) begin : g_ha
    ha_model u_ha (
      .clk, .rst_n,
      .ar_valid(s_ar_valid[i]), .ar_ready(s_ar_ready[i]), .ar(s_ar[i]),
      .r_valid(s_r_valid[i]), .r_ready(s_r_ready[i]), .r(s_r[i]),
      .aw_valid(s_aw_valid[i]), .aw_ready(s_aw_ready[i]), .aw(s_aw[i]),
      .w_valid(s_w_valid[i]), .w_ready(s_w_ready[i]), .w(s_w[i]),
      .b_valid(s_b_valid[i]), .b_ready(s_b_ready[i]), .b(s_b[i]));
  end

  mem_slave_model #(.LAT(3), .ERR_LO(32'h0), .ERR_HI(32'h0)) u_mem (
    .clk, .rst_n,
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  // ---------------- control port ----------------
  task automatic ctl_write(input logic [7:0] a, input logic [31:0] d);
    ctl_awaddr <= a; ctl_wdata <= d; ctl_awvalid <= 1'b1; ctl_wvalid <= 1'b1;
    do @(posedge clk); while (!ctl_awready);
    ctl_awvalid <= 1'b0; ctl_wvalid <= 1'b0;
    do @(posedge clk); while (!ctl_bvalid);
  endtask

  task automatic ctl_read(input logic [7:0] a, output logic [31:0] d);
    ctl_araddr <= a; ctl_arvalid <= 1'b1;
    do @(posedge clk); while (!ctl_arready);
    ctl_arvalid <= 1'b0;
    do @(posedge clk); while (!ctl_rvalid);
    d = ctl_rdata;
  endtask

  task automatic wait_idle(input int max_cycles);
    int n;
    n = 0;
    while (!(g_ha[0].u_ha.idle() && g_ha[1].u_ha.idle()) && n < max_cycles) begin
      @(posedge clk); n++;
    end
    check(n < max_cycles, "traffic completes");
    repeat (5) @(posedge clk);
  endtask

  // ---------------- beat counters ----------------
  longint r_beats [N];
  longint w_beats [N];
  initial for (int i = 0; i < N; i++) begin r_beats[i] = 0; w_beats[i] = 0; end
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) begin
      r_beats[i] += longint'(s_r_valid[i] && s_r_ready[i]);
      w_beats[i] += longint'(s_w_valid[i] && s_w_ready[i]);
    end

  int n_recharge = 0, n_budget_stall = 0;
  always @(posedge clk) if (rst_n) begin
    n_recharge += int'(recharge);
    for (int i = 0; i < N; i++) n_budget_stall += int'(budget_stall[i]);
  end

  // ---------------- part A: transfer sizes ----------------
  task automatic transfer(input int bytes);
    int words, bursts, blen;
    longint t0, t_rd, t_wr;
    bit rd_done, wr_done;
    words  = bytes / 4;
    blen   = words < 16 ? words : 16;
    bursts = words / blen;
    for (int k = 0; k < bursts; k++) begin
      g_ha[0].u_ha.read(32'(k * blen * 4), blen, 4'd1);
      g_ha[1].u_ha.write(32'h0100_0000 + 32'(k * blen * 4), blen, 4'd2);
    end
    t0 = cyc; rd_done = 0; wr_done = 0; t_rd = 0; t_wr = 0;
    while (!(rd_done && wr_done) && cyc - t0 < 4 * longint'(words) + 1000) begin
      @(posedge clk);
      if (!rd_done && g_ha[0].u_ha.idle()) begin rd_done = 1; t_rd = cyc - t0; end
      if (!wr_done && g_ha[1].u_ha.idle()) begin wr_done = 1; t_wr = cyc - t0; end
    end
    check(rd_done && wr_done, $sformatf("%0d-byte transfer completes", bytes));
    $display("transfer %0d B (%0d x %0d words): read %0d cycles, write %0d cycles",
             bytes, bursts, blen, t_rd, t_wr);
    // one beat per cycle plus the pipeline fill
    check(t_rd <= longint'(words) + longint'(words) / 50 + 30,
          $sformatf("read of %0d B streams (%0d cycles for %0d beats)", bytes, t_rd, words));
    check(t_wr <= longint'(words) + longint'(words) / 50 + 30,
          $sformatf("write of %0d B streams (%0d cycles for %0d beats)", bytes, t_wr, words));
    repeat (10) @(posedge clk);
  endtask

  // ---------------- part B: shares ----------------
  localparam int PERIOD = 400;
  localparam int WINDOW = 20 * PERIOD;

  task automatic drain();
    int n;
    ctl_write(8'h00, 32'd0);
    n = 0;
    while (!(g_ha[0].u_ha.idle() && g_ha[1].u_ha.idle()) && n < 200000) begin
      @(posedge clk); n++;
    end
    check(n < 200000, "traffic drains");
    repeat (10) @(posedge clk);
  endtask

  // Runs both ports (or only port 0) flat out for WINDOW cycles; returns the
  // data beats (read + write) each port moved in the window.
  task automatic share(input string name, input bit res_en, input int b0, input int b1,
                       input bit port1_on, output longint d0, output longint d1);
    longint s0, s1;
    ctl_write(8'h40, 32'(b0));
    ctl_write(8'h44, 32'(b1));
    ctl_write(8'h04, 32'(PERIOD));
    for (int k = 0; k < (WINDOW + 2 * PERIOD) / 16; k++) begin
      g_ha[0].u_ha.read(32'h0000_0000 + 32'((k % 256) * 64), 16, 4'd1);
      g_ha[0].u_ha.write(32'h0001_0000 + 32'((k % 256) * 64), 16, 4'd1);
      if (port1_on) begin
        g_ha[1].u_ha.read(32'h0002_0000 + 32'((k % 256) * 64), 16, 4'd2);
        g_ha[1].u_ha.write(32'h0003_0000 + 32'((k % 256) * 64), 16, 4'd2);
      end
    end
    if (res_en) ctl_write(8'h00, 32'd1);
    repeat (PERIOD) @(posedge clk);          // settle
    s0 = r_beats[0] + w_beats[0];
    s1 = r_beats[1] + w_beats[1];
    repeat (WINDOW) @(posedge clk);
    d0 = r_beats[0] + w_beats[0] - s0;
    d1 = r_beats[1] + w_beats[1] - s1;
    $display("%-9s port0 %0d beats, port1 %0d beats, port0 share %0d%%", name, d0, d1,
             d0 + d1 == 0 ? 0 : int'(100 * d0 / (d0 + d1)));
    drain();
  endtask

  // Heterogeneous bursts without reservation: port 0 reads in 256-beat
  // bursts, port 1 in 16-beat bursts; returns the read beats of each port.
  task automatic hetero(input int nom, output longint d0, output longint d1);
    longint s0, s1;
    ctl_write(8'h08, 32'(nom == 256 ? 0 : nom));
    for (int k = 0; k < 40; k++) g_ha[0].u_ha.read(32'h0000_0000 + 32'((k % 32) * 1024), 256, 4'd1);
    for (int k = 0; k < 600; k++) g_ha[1].u_ha.read(32'h0000_8000 + 32'((k % 256) * 64), 16, 4'd2);
    repeat (PERIOD) @(posedge clk);
    s0 = r_beats[0];
    s1 = r_beats[1];
    repeat (WINDOW) @(posedge clk);
    d0 = r_beats[0] - s0;
    d1 = r_beats[1] - s1;
    $display("bursts 256 vs 16, nominal %0d: port0 %0d beats, port1 %0d beats, port0 share %0d%%",
             nom, d0, d1, int'(100 * d0 / (d0 + d1)));
    drain();
    ctl_write(8'h08, 32'd16);
  endtask

  function automatic bit near(input longint d0, input longint d1, input int pct0);
    longint tot;
    tot = d0 + d1;
    return tot > 0 && 100 * d0 >= longint'(pct0 - 3) * tot && 100 * d0 <= longint'(pct0 + 3) * tot;
  endfunction

  initial begin
    longint d0, d1;
    static int pct [5] = '{90, 70, 50, 30, 10};
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // part A
    transfer(4);
    transfer(64);
    transfer(16 * 1024);
    transfer(128 * 1024);
    transfer(4 * 1024 * 1024);

    // part B
    share("isolation", 0, 0, 0, 0, d0, d1);
    check(d0 >= 2 * WINDOW * 98 / 100, $sformatf("port alone uses both channels fully (%0d)", d0));
    share("no-res", 0, 0, 0, 1, d0, d1);
    check(near(d0, d1, 50), "round-robin splits evenly without reservation");
    hetero(16, d0, d1);
    check(near(d0, d1, 50), "equalised bursts share evenly despite 256- vs 16-beat requests");
    hetero(256, d0, d1);
    check(near(d0, d1, 94), "without equalisation the long-burst port takes 16 of every 17 beats");
    for (int k = 0; k < 5; k++) begin
      share($sformatf("HC%0d-%0d", pct[k], 100 - pct[k]), 1, pct[k] / 5, 20 - pct[k] / 5, 1, d0, d1);
      check(near(d0, d1, pct[k]), $sformatf("share follows budgets %0d-%0d", pct[k], 100 - pct[k]));
      if (k == 0) begin
        longint a0, a1;
        share("HC90-only", 1, 18, 2, 0, a0, a1);
        check(a0 * 100 >= d0 * 97 && a0 * 100 <= d0 * 103,
              $sformatf("reserved port unaffected by the other (%0d alone, %0d shared)", a0, d0));
      end
    end
    check(n_recharge > 0 && n_budget_stall > 0, "reservation active in the shared runs");

    checks   += g_ha[0].u_ha.checks + g_ha[1].u_ha.checks;
    failures += g_ha[0].u_ha.failures + g_ha[1].u_ha.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
