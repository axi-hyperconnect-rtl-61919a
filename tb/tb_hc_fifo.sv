// tb_hc_fifo -- self-checking test of the circular-buffer FIFO queue.
// Random pushes and pops against a reference queue; checks data order,
// occupancy, ready = not full, the one-cycle latency from a write into an
// empty queue to valid output, and one word per cycle when streaming.
module tb_hc_fifo;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [7:0] in_data = '0, out_data;
  logic [2:0] count;
  logic [7:0] model[$];
  int checks = 0, failures = 0;

  hc_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // reference model, updated on the handshakes of each edge
  always @(posedge clk) if (rst_n) begin
    check(out_valid == (model.size() != 0), "valid = not empty");
    check(in_ready == (model.size() < 4), "ready = not full");
    check(int'(count) == model.size(), "count");
    if (out_valid && out_ready) begin
      check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency: one write into the empty queue is visible one cycle later
    in_valid <= 1'b1; in_data <= 8'h3C;
    @(posedge clk);
    in_valid <= 1'b0;
    #1 check(out_valid && out_data == 8'h3C, "one-cycle latency");
    @(posedge clk);
    // streaming: one word per cycle with both sides always active
    out_ready <= 1'b1;
    n = 0;
    for (int k = 0; k < 20; k++) begin
      in_valid <= 1'b1; in_data <= 8'(k);
      @(posedge clk);
      if (in_ready) n++;
    end
    in_valid <= 1'b0;
    check(n == 20, "full throughput");
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      in_valid  <= ($urandom_range(1) == 1);
      in_data   <= 8'($urandom);
      out_ready <= ($urandom_range(2) != 0) ^ (k[8]);
      @(posedge clk);
    end
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
