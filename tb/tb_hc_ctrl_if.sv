// tb_hc_ctrl_if -- self-checking test of the AXI4-Lite control interface.
// Writes every register through the bus and reads it back, checks the
// configuration outputs, reset values, the read-only INFO register, the
// clamping of the outstanding limit, the self-clearing soft-reset pulse,
// that unmapped offsets read 0, and the one-cycle B and R responses.
module tb_hc_ctrl_if;
  import hc_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 1;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 1;
  logic [7:0] s_awaddr = 0, s_araddr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0] s_bresp, s_rresp;
  logic cfg_res_en, soft_reset_req;
  logic [PERIOD_W-1:0] cfg_period;
  logic [8:0] cfg_nom_beats;
  logic [3:0] cfg_max_out;
  logic [N-1:0] cfg_decouple;
  logic [BUDGET_W-1:0] cfg_budget [N];

  hc_ctrl_if #(.N(N), .MAX_OUT(8), .AW(8)) dut (.*);

  int checks = 0, failures = 0, n_soft = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n && soft_reset_req) n_soft++;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_wdata = d; s_awvalid = 1; s_wvalid = 1;
    #1 check(s_awready && s_wready, "write accepted at once");
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    check(s_bvalid && s_bresp == RESP_OKAY, "B one cycle after the write");
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    #1 check(s_arready, "read accepted at once");
    @(negedge clk);
    s_arvalid = 0;
    check(s_rvalid && s_rresp == RESP_OKAY, "R one cycle after the read");
    d = s_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    check(!cfg_res_en && cfg_period == 1024 && cfg_nom_beats == 16 && cfg_max_out == 8 &&
          cfg_decouple == 0 && cfg_budget[0] == 0, "reset values");
    rd(8'h14, d); check(d == 32'h0000_0803, $sformatf("INFO %h", d));
    // each register
    wr(8'h04, 32'd5000);  rd(8'h04, d); check(d == 5000 && cfg_period == 5000, "PERIOD");
    wr(8'h08, 32'd4);     rd(8'h08, d); check(d == 4 && cfg_nom_beats == 4, "NOMINAL");
    wr(8'h0C, 32'd3);     rd(8'h0C, d); check(d == 3 && cfg_max_out == 3, "MAXOUT");
    wr(8'h0C, 32'd50);    rd(8'h0C, d); check(d == 8 && cfg_max_out == 8, "MAXOUT clamped");
    wr(8'h0C, 32'd0);     rd(8'h0C, d); check(d == 1 && cfg_max_out == 1, "MAXOUT of 0 raised to 1");
    wr(8'h10, 32'h5);     rd(8'h10, d); check(d == 5 && cfg_decouple == 3'b101, "DECOUPLE");
    for (int i = 0; i < N; i++) begin
      wr(8'h40 + 8'(4 * i), 32'(100 + i));
    end
    for (int i = 0; i < N; i++) begin
      rd(8'h40 + 8'(4 * i), d);
      check(d == 32'(100 + i) && cfg_budget[i] == 16'(100 + i), $sformatf("BUDGET %0d", i));
    end
    wr(8'h00, 32'h1);     rd(8'h00, d); check(d == 1 && cfg_res_en, "CTRL enable");
    check(n_soft == 0, "no soft reset yet");
    wr(8'h00, 32'h3);     rd(8'h00, d); check(d == 1, "soft-reset bit reads 0");
    check(n_soft == 1, "soft reset is a single pulse");
    rd(8'h7C, d); check(d == 0, "unmapped offset reads 0");
    wr(8'h7C, 32'hFFFF_FFFF);
    check(cfg_period == 5000 && cfg_nom_beats == 4 && cfg_decouple == 3'b101, "unmapped write ignored");
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
