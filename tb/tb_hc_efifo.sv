// tb_hc_efifo -- self-checking test of the eFIFO (slave variant).
// Random traffic on all five channels at once, each checked against a
// reference queue (nothing reordered or modified); one-cycle latency per
// channel; and decoupling: no handshake toward the accelerator, grounded
// payloads, responses drained and dropped, request side still draining.
module tb_hc_efifo;
  import hc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic decouple = 1'b0;

  logic up_ar_valid = 0, up_ar_ready, up_aw_valid = 0, up_aw_ready, up_w_valid = 0, up_w_ready;
  logic up_r_valid, up_r_ready = 0, up_b_valid, up_b_ready = 0;
  logic dn_ar_valid, dn_ar_ready = 0, dn_aw_valid, dn_aw_ready = 0, dn_w_valid, dn_w_ready = 0;
  logic dn_r_valid = 0, dn_r_ready, dn_b_valid = 0, dn_b_ready;
  axi_ax_t up_ar = '0, up_aw = '0, dn_ar, dn_aw;
  axi_w_t  up_w = '0, dn_w;
  axi_r_t  up_r, dn_r = '0;
  axi_b_t  up_b, dn_b = '0;

  hc_efifo #(.SLAVE(1'b1), .DEPTH(4)) dut (.*);

  axi_ax_t q_ar[$], q_aw[$];
  axi_w_t  q_w[$];
  axi_r_t  q_r[$];
  axi_b_t  q_b[$];
  int checks = 0, failures = 0;
  bit dropping = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dn_ar_valid && dn_ar_ready) begin check(dn_ar == q_ar[0], "AR data"); void'(q_ar.pop_front()); end
    if (dn_aw_valid && dn_aw_ready) begin check(dn_aw == q_aw[0], "AW data"); void'(q_aw.pop_front()); end
    if (dn_w_valid && dn_w_ready)   begin check(dn_w == q_w[0], "W data");    void'(q_w.pop_front());  end
    if (up_r_valid && up_r_ready)   begin check(up_r == q_r[0], "R data");    void'(q_r.pop_front());  end
    if (up_b_valid && up_b_ready)   begin check(up_b == q_b[0], "B data");    void'(q_b.pop_front());  end
    if (up_ar_valid && up_ar_ready) q_ar.push_back(up_ar);
    if (up_aw_valid && up_aw_ready) q_aw.push_back(up_aw);
    if (up_w_valid && up_w_ready)   q_w.push_back(up_w);
    if (dn_r_valid && dn_r_ready && !dropping) q_r.push_back(dn_r);
    if (dn_b_valid && dn_b_ready && !dropping) q_b.push_back(dn_b);
    if (decouple) begin
      check(!up_ar_ready && !up_aw_ready && !up_w_ready, "decoupled: no ready toward the accelerator");
      check(!up_r_valid && !up_b_valid && up_r == '0 && up_b == '0, "decoupled: responses grounded");
    end
  end

  task automatic randomize_inputs(input bit resp_only);
    up_ar_valid <= !resp_only && $urandom_range(1); up_ar <= axi_ax_t'({$urandom, $urandom});
    up_aw_valid <= !resp_only && $urandom_range(1); up_aw <= axi_ax_t'({$urandom, $urandom});
    up_w_valid  <= !resp_only && $urandom_range(1); up_w  <= axi_w_t'({$urandom, $urandom});
    dn_r_valid  <= $urandom_range(1); dn_r <= axi_r_t'({$urandom, $urandom});
    dn_b_valid  <= $urandom_range(1); dn_b <= axi_b_t'($urandom);
    dn_ar_ready <= $urandom_range(1); dn_aw_ready <= $urandom_range(1); dn_w_ready <= $urandom_range(1);
    up_r_ready  <= $urandom_range(1); up_b_ready <= $urandom_range(1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // one-cycle latency on AR (request side) and R (response side)
    up_ar_valid <= 1'b1; up_ar <= '{id: 4'd3, addr: 32'h1234, len: 8'd7, size: 3'd2, burst: 2'b01};
    dn_r_valid  <= 1'b1; dn_r  <= '{id: 4'd1, data: 32'hCAFE, resp: 2'b00, last: 1'b1};
    @(posedge clk);
    up_ar_valid <= 1'b0; dn_r_valid <= 1'b0;
    #1 check(dn_ar_valid && dn_ar.addr == 32'h1234, "AR one-cycle latency");
    check(up_r_valid && up_r.data == 32'hCAFE, "R one-cycle latency");
    @(posedge clk);
    // drain those two
    dn_ar_ready <= 1'b1; up_r_ready <= 1'b1;
    @(posedge clk);
    dn_ar_ready <= 1'b0; up_r_ready <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < 3000; k++) begin
      randomize_inputs(1'b0);
      @(posedge clk);
    end
    // drain, then decouple
    up_ar_valid <= 0; up_aw_valid <= 0; up_w_valid <= 0; dn_r_valid <= 0; dn_b_valid <= 0;
    dn_ar_ready <= 1; dn_aw_ready <= 1; dn_w_ready <= 1; up_r_ready <= 1; up_b_ready <= 1;
    repeat (10) @(posedge clk);
    check(q_ar.size() == 0 && q_r.size() == 0 && q_w.size() == 0, "all queues drained");
    decouple <= 1'b1;
    dropping = 1;
    for (int k = 0; k < 300; k++) begin
      randomize_inputs(1'b0);
      @(posedge clk);
    end
    // responses were dropped, not queued: after re-coupling nothing stale appears
    dn_r_valid <= 0; dn_b_valid <= 0; up_ar_valid <= 0; up_aw_valid <= 0; up_w_valid <= 0;
    repeat (10) @(posedge clk);
    dropping = 0;
    decouple <= 1'b0;
    @(posedge clk);
    #1 check(!up_r_valid && !up_b_valid, "responses of a decoupled port are dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
