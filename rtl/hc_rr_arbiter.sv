// hc_rr_arbiter -- round-robin arbiter with a granularity of one grant.
//
// Picks, among the requesting inputs, the first one at or after the pointer
// (wrapping at N). The choice is combinational; when `advance` is high (the
// grant was used) the pointer moves to the input after the one granted, so
// every requester receives exactly one transaction per round. The pointer
// starts at input 0 after reset.
module hc_rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned j;
      j = (32'(ptr) + k) % N;
      if (!gnt_valid && req[j]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

endmodule
