// hc_fifo -- proactive circular-buffer FIFO queue, the building block of
// every eFIFO.
//
// A write is accepted whenever the buffer is not full ("proactive": always
// ready to receive unless full); the ready output depends only on state, so
// no combinational path runs from the consumer back to the producer. Storage
// is a register array addressed by a write and a read pointer that wrap at
// DEPTH. A word written at clock edge t is presented on out_data with
// out_valid high from edge t on, so the queue adds exactly one clock cycle of
// latency, which is what the design's latency budget assumes. Full
// throughput (one word per cycle) is sustained with DEPTH >= 2.
//
// The one-cycle latency and the circular buffer follow the description of the
// design; the depth (default 4) is this design's choice.
module hc_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;
  logic            push, pop;

  assign in_ready  = (count != DEPTH[$bits(count)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // a producer never writes a full queue and a consumer never reads an empty one
  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
