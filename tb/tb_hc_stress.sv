// tb_hc_stress -- randomised end-to-end test of the interconnect with three
// accelerator ports, a smaller outstanding ceiling (6) and routing buffer
// (8), and random back-pressure on every ready/valid of both sides.
//
// Each port owns a 16 KB region of memory and tags its data with its own key
// (data = hash(word address) XOR key), so a beat delivered to the wrong port
// or written to the wrong address is caught. A port first writes its region,
// then runs rounds of random reads and writes of 1..256 beats at random
// offsets. Between rounds the nominal burst, the outstanding limit, the
// reservation budgets and period, and reservation on/off are changed at
// random; in some rounds the nominal burst is changed while traffic is in
// flight. Checked: every R beat and B response (by the accelerator models),
// no piece on the memory side longer than the nominal burst in force, no
// more pieces in flight per port and direction than the limit, and that all
// traffic completes.
module tb_hc_stress;
  import hc_pkg::*;

  localparam int N = 3;

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

  hyperconnect #(.N(N), .MAX_OUT(6), .ROUTE_DEPTH(8)) dut (
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
    ha_model #(.STALL(1'b1)) u_ha (
      .clk, .rst_n,
      .ar_valid(s_ar_valid[i]), .ar_ready(s_ar_ready[i]), .ar(s_ar[i]),
      .r_valid(s_r_valid[i]), .r_ready(s_r_ready[i]), .r(s_r[i]),
      .aw_valid(s_aw_valid[i]), .aw_ready(s_aw_ready[i]), .aw(s_aw[i]),
      .w_valid(s_w_valid[i]), .w_ready(s_w_ready[i]), .w(s_w[i]),
      .b_valid(s_b_valid[i]), .b_ready(s_b_ready[i]), .b(s_b[i]));
  end

  mem_slave_model #(.LAT(5), .STALL(1'b1), .ERR_LO(32'h0), .ERR_HI(32'h0)) u_mem (
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
    while (!all_idle() && n < max_cycles) begin
      @(posedge clk); n++;
    end
    check(n < max_cycles, "traffic completes");
    repeat (5) @(posedge clk);
  endtask

  function automatic bit all_idle();
    return g_ha[0].u_ha.idle() && g_ha[1].u_ha.idle() && g_ha[2].u_ha.idle();
  endfunction

  // ---------------- monitors ----------------
  int nom_now = 16, lim_now = 8, max_piece_seen = 0, n_nom_change_busy = 0;
  bit nom_stable = 1;
  int rd_q [N];
  int wr_q [N];
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign rd_q[i] = int'(dut.g_port[i].u_ts.u_rd.q_count);
    assign wr_q[i] = int'(dut.g_port[i].u_ts.u_wr.bq_count);
  end
  always @(posedge clk) if (rst_n) begin
    if (m_ar_valid && m_ar_ready) begin
      if (int'(m_ar.len) + 1 > max_piece_seen) max_piece_seen = int'(m_ar.len) + 1;
      if (nom_stable && int'(m_ar.len) + 1 > nom_now)
        check(0, $sformatf("AR piece of %0d beats with nominal %0d", int'(m_ar.len) + 1, nom_now));
    end
    if (m_aw_valid && m_aw_ready && nom_stable && int'(m_aw.len) + 1 > nom_now)
      check(0, $sformatf("AW piece of %0d beats with nominal %0d", int'(m_aw.len) + 1, nom_now));
    for (int i = 0; i < N; i++)
      if (rd_q[i] > lim_now || wr_q[i] > lim_now)
        check(0, $sformatf("port %0d exceeds the outstanding limit %0d", i, lim_now));
  end

  // ---------------- stimulus ----------------
  localparam int REGION = 16384;   // bytes per port
  function automatic logic [31:0] key(input int p);
    return 32'hC0DE_0000 + 32'(p * 32'h0101);
  endfunction

  // per-port access to the accelerator models (hierarchical names need a
  // constant index)
  task automatic op(input int p, input bit is_rd, input logic [31:0] a, input int beats,
                    input logic [ID_W-1:0] id, input logic [31:0] k);
    case (p)
      0: if (is_rd) g_ha[0].u_ha.read(a, beats, id, k); else g_ha[0].u_ha.write(a, beats, id, k);
      1: if (is_rd) g_ha[1].u_ha.read(a, beats, id, k); else g_ha[1].u_ha.write(a, beats, id, k);
      default: if (is_rd) g_ha[2].u_ha.read(a, beats, id, k); else g_ha[2].u_ha.write(a, beats, id, k);
    endcase
  endtask

  function automatic int stat(input int p, input int which);
    int v [4];
    case (p)
      0: v = '{g_ha[0].u_ha.checks, g_ha[0].u_ha.failures, g_ha[0].u_ha.reads_done, g_ha[0].u_ha.writes_done};
      1: v = '{g_ha[1].u_ha.checks, g_ha[1].u_ha.failures, g_ha[1].u_ha.reads_done, g_ha[1].u_ha.writes_done};
      default: v = '{g_ha[2].u_ha.checks, g_ha[2].u_ha.failures, g_ha[2].u_ha.reads_done, g_ha[2].u_ha.writes_done};
    endcase
    return v[which];
  endfunction

  task automatic random_ops(input int n_ops);
    for (int k = 0; k < n_ops; k++)
      for (int p = 0; p < N; p++) begin
        int beats, off;
        beats = ($urandom_range(3) == 0) ? $urandom_range(256, 1) : $urandom_range(40, 1);
        off   = 4 * $urandom_range((REGION - 1024) / 4 - 1, 0);
        op(p, 1'($urandom_range(1)), 32'(p * REGION + off), beats, 4'(p + 4 * (k % 4)), key(p));
      end
  endtask

  task automatic set_nominal(input int nom);
    ctl_write(8'h08, 32'(nom == 256 ? 0 : nom));
    nom_now = nom;
  endtask

  initial begin
    static int noms [5] = '{1, 4, 16, 64, 256};
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // fill each region with the port's key
    for (int p = 0; p < N; p++)
      for (int a = 0; a < REGION; a += 1024)
        op(p, 1'b0, 32'(p * REGION + a), 256, 4'(p), key(p));
    wait_idle(100000);

    for (int round = 0; round < 24; round++) begin
      int lim, nom;
      nom = noms[$urandom_range(4)];
      lim = $urandom_range(6, 1);
      set_nominal(nom);
      ctl_write(8'h0C, 32'(lim));
      lim_now = lim;
      for (int p = 0; p < N; p++) ctl_write(8'h40 + 8'(4 * p), 32'($urandom_range(12, 1)));
      ctl_write(8'h04, 32'($urandom_range(400, 50)));
      ctl_write(8'h00, 32'($urandom_range(1)));
      random_ops(12);
      if (round % 4 == 3) begin
        // change the nominal burst while requests are being split
        repeat (200) @(posedge clk);
        nom_stable = 0;
        n_nom_change_busy++;
        set_nominal(noms[$urandom_range(4)]);
      end
      wait_idle(200000);
      nom_stable = 1;
    end
    ctl_write(8'h00, 32'd0);

    check(max_piece_seen > 16, "long pieces seen");
    check(n_nom_change_busy > 0, "nominal changed under traffic");
    for (int p = 0; p < N; p++) begin
      checks   += stat(p, 0);
      failures += stat(p, 1);
      check(stat(p, 2) > 50 && stat(p, 3) > 50,
            $sformatf("port %0d completed %0d reads, %0d writes", p, stat(p, 2), stat(p, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
