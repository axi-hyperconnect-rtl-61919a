// tb_hc_ts -- self-checking test of the transaction supervisor's
// reservation budget. Both directions are kept busy with single-beat
// requests; a recharge pulse is given every PERIOD cycles. Checks: the
// transactions issued in a period equal the budget (never more), the budget
// counter follows them, a stall is flagged once it is spent, a read wins the
// last unit over a write, and without reservation the budget does not limit.
// Read data and write responses are returned so that the transactions
// complete end to end through both halves.
module tb_hc_ts;
  import hc_pkg::*;
  localparam int PERIOD = 40;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [8:0] cfg_nom_beats = 9'd16;
  logic [3:0] cfg_max_out = 4'd8;
  logic cfg_res_en = 1'b0, recharge = 1'b0, budget_stall, decoupled = 1'b0;
  logic [BUDGET_W-1:0] cfg_budget = 16'd5, budget_left;
  logic in_ar_valid = 1, in_ar_ready, in_r_valid, in_r_ready = 1;
  logic in_aw_valid = 1, in_aw_ready, in_w_valid = 1, in_w_ready, in_b_valid, in_b_ready = 1;
  logic out_ar_valid, out_ar_ready = 1, out_r_valid = 0, out_r_ready;
  logic out_aw_valid, out_aw_ready = 1, out_w_valid, out_w_ready = 1, out_b_valid = 0, out_b_ready;
  axi_ax_t in_ar = '{id: 4'd1, addr: 32'h40, len: 8'd0, size: 3'd2, burst: 2'b01};
  axi_ax_t in_aw = '{id: 4'd2, addr: 32'h80, len: 8'd0, size: 3'd2, burst: 2'b01};
  axi_ax_t out_ar, out_aw;
  axi_w_t  in_w = '{data: 32'h1, strb: 4'hF, last: 1'b1}, out_w;
  axi_r_t  in_r, out_r = '0;
  axi_b_t  in_b, out_b = '0;

  hc_ts #(.MAX_OUT(8)) dut (.*);

  int checks = 0, failures = 0;
  int rd_pend = 0, b_pend = 0, issued = 0, rd_n = 0, wr_n = 0, n_stall = 0, n_tie = 0;
  int r_back = 0, b_back = 0;
  int model_budget = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cfg_res_en && !recharge)
      check(int'(budget_left) == model_budget, $sformatf("budget %0d expected %0d", budget_left, model_budget));
    if (budget_stall) n_stall++;
    if (cfg_res_en && budget_left == 16'd1 && dut.rd_pending && dut.wr_pending) begin
      n_tie++;
      check(out_ar_valid && !out_aw_valid, "a read takes the last unit");
    end
    if (out_ar_valid && out_ar_ready) begin issued++; rd_n++; rd_pend++; if (cfg_res_en) model_budget--; end
    if (out_aw_valid && out_aw_ready) begin issued++; wr_n++; b_pend++; if (cfg_res_en) model_budget--; end
    if (recharge) model_budget = int'(cfg_budget);
    if (in_r_valid && in_r_ready) r_back++;
    if (in_b_valid && in_b_ready) b_back++;
    // responders
    if (out_r_valid && out_r_ready) rd_pend--;
    if (out_b_valid && out_b_ready) b_pend--;
    out_r_valid <= (rd_pend > 0);
    out_r <= '{id: 4'hF, data: 32'h5, resp: RESP_OKAY, last: 1'b1};
    out_b_valid <= (b_pend > 0);
    out_b <= '{id: 4'hF, resp: RESP_OKAY};
  end

  initial begin
    int in_period;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk);
    // without reservation, the budget does not limit
    check(issued > 2 * int'(cfg_budget), $sformatf("unlimited without reservation (%0d)", issued));
    // reservation on: periods of PERIOD cycles
    @(negedge clk);
    cfg_res_en = 1'b1;
    for (int p = 0; p < 12; p++) begin
      if (p == 6) cfg_budget = 16'd1;
      if (p == 9) cfg_budget = 16'd4;
      @(negedge clk);
      recharge = 1'b1;
      @(negedge clk);
      recharge = 1'b0;
      in_period = issued;
      repeat (PERIOD) @(negedge clk);
      check(issued - in_period == int'(cfg_budget),
            $sformatf("period %0d: %0d transactions for a budget of %0d", p, issued - in_period, cfg_budget));
      check(budget_stall, "stall flagged once the budget is spent");
    end
    cfg_res_en = 1'b0;
    repeat (50) @(negedge clk);
    in_ar_valid = 1'b0; in_aw_valid = 1'b0;
    repeat (50) @(negedge clk);
    check(n_tie > 0, "read/write tie seen");
    check(r_back == rd_n && b_back == wr_n, $sformatf("all completed: r %0d/%0d b %0d/%0d", r_back, rd_n, b_back, wr_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
