// tb_hyperconnect -- end-to-end test of the interconnect at its default
// parameters (two accelerator ports).
//
// Two ha_model accelerators drive the slave ports, a mem_slave_model answers
// on the master port, and the AXI4-Lite control port is driven by tasks.
// Phases:
//   1. register read-back (INFO, defaults);
//   2. propagation latency on an idle interconnect: 4 cycles on AR and AW,
//      2 cycles on R, W and B, measured between handshakes at the two sides;
//   3. burst equalisation: 64-beat reads/writes leave as 16-beat pieces and
//      come back merged; written data are read back;
//   4. response merging: a write whose second piece fails reports SLVERR;
//   5. outstanding limit set to 2: never exceeded, and reached;
//   6. contention without reservation: round-robin grants alternate;
//   7. bandwidth reservation (budgets 9:1 and 1:9 per period): no port
//      exceeds its budget in any period, and the shares follow the budgets;
//   8. decoupling: a decoupled port exchanges nothing while the other works,
//      and resumes when re-enabled;
//   9. soft reset of the datapath keeps the configuration;
// 10. a port decoupled after sending a write address but no data: its
//     burst is completed with filler beats, so the other port's writes
//     still get through the shared write-data channel.
// Every mechanism is counted and a failure is counted for one never seen.
module tb_hyperconnect;
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

  mem_slave_model #(.LAT(3)) u_mem (
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

  // ---------------- monitors ----------------
  longint t_m_ar = -1, t_m_aw = -1, t_m_r = -1, t_m_b = -1, t_m_wlast = -1, t_s_wlast = -1;
  int n_split = 0, n_rlast_merged = 0, n_limit = 0, n_contend = 0, n_budget_stall = 0;
  int n_recharge = 0, n_decoupled = 0, n_rr_alt = 0, max_q = 0, n_fill = 0;
  int last_gnt = -1;
  int per_period [N];
  int budget_now [N];
  bit budget_check_on = 0;

  // per-port probes into the supervisors
  logic [N-1:0] ev_split_r, ev_split_w, ev_merge, ev_limit, ev_fill;
  int rd_q [N];
  for (genvar i = 0; i < N; i++) begin : g_probe
    // a piece shorter than the request it came from leaves the supervisor
    assign ev_split_r[i] = dut.g_port[i].u_ts.u_rd.fire && !dut.g_port[i].u_ts.u_rd.last_sub;
    assign ev_split_w[i] = dut.g_port[i].u_ts.u_wr.fire && !dut.g_port[i].u_ts.u_wr.last_sub;
    // RLAST of a non-final piece is hidden from the accelerator
    assign ev_merge[i]   = dut.g_port[i].u_ts.u_rd.out_r_valid && dut.g_port[i].u_ts.u_rd.out_r_ready &&
                           dut.t_r.last && !dut.g_port[i].u_ts.u_rd.in_r.last;
    // a held read waits because the outstanding limit is reached
    // a write-data beat supplied for a decoupled port
    assign ev_fill[i]    = dut.g_port[i].u_ts.u_wr.w_fill && dut.g_port[i].u_ts.u_wr.w_fire;
    assign ev_limit[i]   = dut.g_port[i].u_ts.u_rd.held &&
                           (dut.g_port[i].u_ts.u_rd.q_count >= dut.cfg_max_out);
    assign rd_q[i]       = int'(dut.g_port[i].u_ts.u_rd.q_count);
  end

  always @(posedge clk) if (rst_n) begin
    if (m_ar_valid && m_ar_ready && t_m_ar < 0) t_m_ar = cyc;
    if (m_aw_valid && m_aw_ready && t_m_aw < 0) t_m_aw = cyc;
    if (m_r_valid && m_r_ready && t_m_r < 0) t_m_r = cyc;
    if (m_b_valid && m_b_ready && t_m_b < 0) t_m_b = cyc;
    if (m_w_valid && m_w_ready && m_w.last) t_m_wlast = cyc;
    if (s_w_valid[0] && s_w_ready[0] && s_w[0].last) t_s_wlast = cyc;
    for (int i = 0; i < N; i++) begin
      n_split        += int'(ev_split_r[i]) + int'(ev_split_w[i]);
      n_rlast_merged += int'(ev_merge[i]);
      n_limit        += int'(ev_limit[i]);
      n_fill         += int'(ev_fill[i]);
      if (rd_q[i] > max_q) max_q = rd_q[i];
      if (budget_stall[i]) n_budget_stall++;
      if (dut.cfg_decouple[i] && s_ar_valid[i]) begin
        n_decoupled++;
        check(!s_ar_ready[i], "decoupled port takes no request");
      end
      if (dut.cfg_decouple[i]) check(!s_r_valid[i] && !s_b_valid[i], "decoupled port gets no response");
    end
    // round-robin: with both requesting, consecutive grants go to different ports
    if (dut.u_exbar.ar_take) begin
      if (&dut.t_ar_valid) begin
        n_contend++;
        check(int'(dut.u_exbar.ar_gi) != last_gnt, "round-robin alternates under contention");
        n_rr_alt++;
      end
      last_gnt = int'(dut.u_exbar.ar_gi);
    end
    // reservation: transactions granted per port per period stay within budget
    if (recharge) begin
      n_recharge++;
      for (int i = 0; i < N; i++) begin
        per_period[i] = 0;
        budget_now[i] = int'(dut.cfg_budget[i]);
      end
    end else if (budget_check_on) begin
      for (int i = 0; i < N; i++) begin
        per_period[i] += int'(dut.t_ar_valid[i] && dut.t_ar_ready[i]) +
                         int'(dut.t_aw_valid[i] && dut.t_aw_ready[i]);
        if (per_period[i] > budget_now[i]) begin
          failures++;
          $display("[%0t] FAIL: port %0d exceeds its budget (%0d > %0d)", $time, i,
                   per_period[i], budget_now[i]);
          per_period[i] = 0;
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  logic [31:0] rd;

  task automatic share_run(input int b0, input int b1, output int beats0, output int beats1);
    int r0, r1;
    ctl_write(8'h40, 32'(b0));
    ctl_write(8'h44, 32'(b1));
    ctl_write(8'h04, 32'd400);
    ctl_write(8'h00, 32'd1);
    r0 = g_ha[0].u_ha.r_beats;
    r1 = g_ha[1].u_ha.r_beats;
    for (int k = 0; k < 60; k++) begin
      g_ha[0].u_ha.read(32'h0000_4000 + 32'(k * 64), 16, 4'd1);
      g_ha[1].u_ha.read(32'h0000_8000 + 32'(k * 64), 16, 4'd2);
    end
    @(posedge clk); budget_check_on = 1;
    repeat (4000) @(posedge clk);
    budget_check_on = 0;
    beats0 = g_ha[0].u_ha.r_beats - r0;
    beats1 = g_ha[1].u_ha.r_beats - r1;
    ctl_write(8'h00, 32'd0);
    wait_idle(20000);
  endtask

  initial begin
    int b0, b1;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // 1. registers
    ctl_read(8'h14, rd);
    check(rd[7:0] == 8'(N) && rd[15:8] == 8'd8, "INFO register");
    ctl_read(8'h08, rd);
    check(rd == 32'd16, "nominal burst default");

    // 2. latency on an idle interconnect
    g_ha[0].u_ha.read(32'h0000_0100, 1, 4'd3);
    wait_idle(200);
    check(t_m_ar - g_ha[0].u_ha.t_ar_hs == 4, $sformatf("d_AR = 4 (got %0d)", t_m_ar - g_ha[0].u_ha.t_ar_hs));
    check(g_ha[0].u_ha.t_r_first - t_m_r == 2, $sformatf("d_R = 2 (got %0d)", g_ha[0].u_ha.t_r_first - t_m_r));
    g_ha[0].u_ha.write(32'h0000_0200, 16, 4'd4, 32'h0, RESP_OKAY, 10);
    wait_idle(200);
    check(t_m_aw - g_ha[0].u_ha.t_aw_hs == 4, $sformatf("d_AW = 4 (got %0d)", t_m_aw - g_ha[0].u_ha.t_aw_hs));
    check(t_m_wlast - t_s_wlast == 2, $sformatf("d_W = 2 (got %0d)", t_m_wlast - t_s_wlast));
    check(g_ha[0].u_ha.t_b_hs - t_m_b == 2, $sformatf("d_B = 2 (got %0d)", g_ha[0].u_ha.t_b_hs - t_m_b));

    // 3. burst equalisation, data integrity
    g_ha[0].u_ha.write(32'h0000_0400, 64, 4'd5, 32'hA5A5_0000);
    g_ha[1].u_ha.write(32'h0000_0800, 40, 4'd6, 32'h5A5A_0000);
    wait_idle(2000);
    g_ha[0].u_ha.read(32'h0000_0400, 64, 4'd5, 32'hA5A5_0000);
    g_ha[1].u_ha.read(32'h0000_0800, 40, 4'd6, 32'h5A5A_0000);
    g_ha[1].u_ha.read(32'h0000_0C00, 256, 4'd7);
    wait_idle(4000);
    check(u_mem.max_ar_len == 15 && u_mem.max_aw_len == 15, "no piece longer than the nominal burst");

    // 4. response merging
    g_ha[0].u_ha.write(32'h0000_1000, 32, 4'd8, 32'h0, RESP_SLVERR);
    wait_idle(1000);

    // 5. outstanding limit
    ctl_write(8'h0C, 32'd2);
    max_q = 0;
    g_ha[0].u_ha.read(32'h0000_2000, 128, 4'd9);
    wait_idle(4000);
    check(max_q == 2, $sformatf("outstanding reads capped at 2 (max %0d)", max_q));
    ctl_write(8'h0C, 32'd8);

    // 6. contention, round-robin
    for (int k = 0; k < 20; k++) begin
      g_ha[0].u_ha.read(32'h0000_3000 + 32'(k * 64), 16, 4'd1);
      g_ha[1].u_ha.read(32'h0000_3800 + 32'(k * 64), 16, 4'd2);
    end
    wait_idle(4000);

    // 7. reservation: 90/10 and 10/90 of the transactions of a period
    share_run(9, 1, b0, b1);
    check(b0 > 5 * b1, $sformatf("HC-90-10 share: %0d vs %0d beats", b0, b1));
    share_run(1, 9, b0, b1);
    check(b1 > 5 * b0, $sformatf("HC-10-90 share: %0d vs %0d beats", b0, b1));

    // 8. decoupling of port 1
    ctl_write(8'h10, 32'h2);
    b1 = g_ha[1].u_ha.reads_done;
    g_ha[1].u_ha.read(32'h0000_0100, 4, 4'd2);
    g_ha[0].u_ha.read(32'h0000_0100, 4, 4'd1);
    repeat (100) @(posedge clk);
    check(g_ha[1].u_ha.reads_done == b1, "decoupled port completes nothing");
    check(g_ha[0].u_ha.idle(), "other port keeps working");
    ctl_write(8'h10, 32'h0);
    wait_idle(500);
    check(g_ha[1].u_ha.reads_done == b1 + 1, "port resumes after re-enable");

    // 9. soft reset of the datapath
    ctl_write(8'h04, 32'd777);
    ctl_write(8'h00, 32'h2);
    repeat (3) @(posedge clk);
    ctl_read(8'h04, rd);
    check(rd == 32'd777, "configuration survives the soft reset");
    g_ha[0].u_ha.read(32'h0000_0200, 16, 4'd4);
    wait_idle(500);

    // 10. port 1 sends a write address and withholds its data (gap), then is
    //     decoupled; port 0's writes queued behind it must still complete.
    begin
      int w0, n;
      w0 = g_ha[0].u_ha.writes_done;
      g_ha[1].u_ha.write(32'h0000_3000, 32, 4'd2, 32'h0, RESP_OKAY, 400);
      repeat (20) @(posedge clk);
      ctl_write(8'h10, 32'h2);
      for (int k = 0; k < 4; k++) g_ha[0].u_ha.write(32'h0000_3400 + 32'(k * 64), 16, 4'd1);
      n = 0;
      while (!g_ha[0].u_ha.idle() && n < 2000) begin @(posedge clk); n++; end
      check(g_ha[0].u_ha.writes_done == w0 + 4, "writes of the other port pass a cut-off burst");
      check(int'(dut.u_exbar.wr_cnt) == 0, "cut-off burst completed on the memory side");
    end

    // mechanisms seen
    check(n_split > 0,         $sformatf("burst split seen %0d times", n_split));
    check(n_rlast_merged > 0,  $sformatf("RLAST merge seen %0d times", n_rlast_merged));
    check(n_limit > 0,         $sformatf("outstanding limit reached %0d times", n_limit));
    check(n_contend > 0,       $sformatf("arbitration conflicts %0d", n_contend));
    check(n_budget_stall > 0,  $sformatf("budget stalls %0d", n_budget_stall));
    check(n_recharge > 0,      $sformatf("recharges %0d", n_recharge));
    check(n_decoupled > 0,     $sformatf("decoupled-port cycles %0d", n_decoupled));
    check(n_fill > 0,          $sformatf("filler beats %0d", n_fill));

    checks   += g_ha[0].u_ha.checks + g_ha[1].u_ha.checks;
    failures += g_ha[0].u_ha.failures + g_ha[1].u_ha.failures;
    $display("mechanisms: split=%0d rlast_merge=%0d limit=%0d contention=%0d budget_stall=%0d recharge=%0d decoupled=%0d fill=%0d",
             n_split, n_rlast_merged, n_limit, n_contend, n_budget_stall, n_recharge, n_decoupled, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
