// tb_hc_central_unit -- self-checking test of the central control unit.
// Checks the recharge pulse: one cycle after reservation is enabled, then
// exactly every cfg_period cycles, none while disabled, a changed period
// taking effect, and a period of 0 behaving as 1; and the datapath reset:
// low with the external reset and for one cycle after a soft-reset request.
module tb_hc_central_unit;
  import hc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic cfg_res_en = 1'b0, soft_reset_req = 1'b0, recharge, dp_rst_n;
  logic [PERIOD_W-1:0] cfg_period = 32'd7;

  hc_central_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // gaps between recharge pulses, measured at each rising edge
  int since = 0, gaps[$], n_pulses = 0;
  always @(posedge clk) begin
    if (recharge) begin
      gaps.push_back(since);
      since = 1;
      n_pulses++;
    end else since++;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(!dp_rst_n, "datapath in reset with the external reset");
    rst_n = 1'b1;
    #1 check(dp_rst_n, "datapath out of reset");
    n_pulses = 0;  // ignore whatever the counter saw before the first reset edge
    repeat (20) @(negedge clk);
    check(n_pulses == 0, "no recharge while reservation is off");
    cfg_res_en = 1'b1;
    @(negedge clk);
    check(recharge, "recharge one cycle after enabling");
    gaps.delete();
    repeat (7 * 6 + 1) @(negedge clk);
    check(gaps.size() == 7, $sformatf("pulses in 6 periods: %0d", gaps.size()));
    for (int i = 1; i < gaps.size(); i++) check(gaps[i] == 7, $sformatf("period %0d", gaps[i]));
    cfg_period = 32'd3;
    repeat (20) @(negedge clk);
    gaps.delete();
    repeat (3 * 5) @(negedge clk);
    check(gaps.size() >= 4, "shorter period");
    for (int i = 1; i < gaps.size(); i++) check(gaps[i] == 3, $sformatf("period %0d (3)", gaps[i]));
    cfg_period = 32'd0;
    repeat (3) @(negedge clk);
    check(recharge, "period 0 acts as 1");
    @(negedge clk);
    check(recharge, "period 0 acts as 1 (next)");
    cfg_res_en = 1'b0;
    repeat (2) @(negedge clk);
    n_pulses = 0;
    repeat (20) @(negedge clk);
    check(n_pulses == 0, "no recharge after disabling");
    // soft reset: one cycle of datapath reset after the request
    soft_reset_req = 1'b1;
    @(negedge clk);
    soft_reset_req = 1'b0;
    check(!dp_rst_n, "soft reset asserts the datapath reset");
    @(negedge clk);
    check(dp_rst_n, "soft reset lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
