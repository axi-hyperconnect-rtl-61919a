// hc_ts_read -- read management of a transaction supervisor.
//
// Burst equalisation: a read request of B beats is issued toward the crossbar
// as ceil(B / NOM) sub-requests of NOM beats (the last one shorter), where
// NOM is the run-time nominal burst length cfg_nom_beats. INCR bursts advance
// the address by NOM << size per sub-request; FIXED bursts keep it; WRAP
// bursts are passed whole. A request of at most NOM beats passes unchanged.
//
// Outstanding limit: every sub-request issued is recorded in a queue of
// {original ID, final-piece flag}; at most cfg_max_out entries (and never
// more than MAX_OUT) may be pending, and an entry leaves when the R beat
// carrying RLAST of its sub-burst returns.
//
// Budget: a sub-request is only presented while `budget_ok` is high (the
// reservation budget is kept by hc_ts); `issue` pulses for each one issued.
//
// Merging: read data pass combinationally (no added latency) from the
// crossbar to the port's eFIFO; the ID is restored from the queue and RLAST
// is suppressed on all but the final sub-burst of the original request.
//
// Timing: the accepted request is held in a register and drives the output
// channel, so one clock cycle is added on AR whatever the burst length. A new
// request is accepted in the same cycle as the last piece of the previous one
// leaves. Splitting, merging and the outstanding limit follow the described
// behaviour; the queue structure and the handling of WRAP are this design's
// choices.
module hc_ts_read
  import hc_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [8:0] cfg_nom_beats,  // 1..256; 0 is taken as 256
  input  logic [$clog2(MAX_OUT+1)-1:0] cfg_max_out,
  input  logic    budget_ok,
  output logic    pending,           // a sub-request is waiting for budget/limit
  output logic    issue,
  // from the port eFIFO
  input  logic    in_ar_valid, output logic in_ar_ready, input  axi_ax_t in_ar,
  output logic    in_r_valid,  input  logic in_r_ready,  output axi_r_t  in_r,
  // toward the crossbar
  output logic    out_ar_valid, input logic out_ar_ready, output axi_ax_t out_ar,
  input  logic    out_r_valid,  output logic out_r_ready, input  axi_r_t  out_r
);
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            final_piece;
  } rq_t;

  localparam int unsigned CW = $clog2(MAX_OUT+1);

  // request being split
  logic            held;
  axi_ax_t         cur;
  logic [8:0]      remaining;   // beats still to issue, 1..256

  logic [8:0]      nom, sub_beats;
  logic            last_sub, lim_ok, fire;
  logic [CW-1:0]   q_count;
  logic            q_in_ready, q_valid;
  rq_t             q_head;

  assign nom       = (cfg_nom_beats == 9'd0) ? 9'd256 : cfg_nom_beats;
  assign sub_beats = (cur.burst == BURST_WRAP || remaining <= nom) ? remaining : nom;
  assign last_sub  = (sub_beats == remaining);
  assign lim_ok    = (q_count < cfg_max_out) && q_in_ready;

  assign pending      = held && lim_ok;
  assign out_ar_valid = held && lim_ok && budget_ok;
  assign fire         = out_ar_valid && out_ar_ready;
  assign issue        = fire;
  assign in_ar_ready  = !held || (fire && last_sub);

  always_comb begin
    out_ar     = cur;
    out_ar.len = 8'(sub_beats - 9'd1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held      <= 1'b0;
      cur       <= '0;
      remaining <= '0;
    end else if (in_ar_valid && in_ar_ready) begin
      held      <= 1'b1;
      cur       <= in_ar;
      remaining <= {1'b0, in_ar.len} + 9'd1;
    end else if (fire) begin
      if (last_sub) begin
        held <= 1'b0;
      end else begin
        remaining <= remaining - sub_beats;
        if (cur.burst == BURST_INCR)
          cur.addr <= cur.addr + (ADDR_W'(sub_beats) << cur.size);
      end
    end
  end

  // pending sub-requests, in issue order (responses return in order)
  hc_fifo #(.T(rq_t), .DEPTH(MAX_OUT)) u_q (
    .clk, .rst_n,
    .in_valid(fire), .in_ready(q_in_ready),
    .in_data('{id: cur.id, final_piece: last_sub}),
    .out_valid(q_valid), .out_ready(out_r_valid && out_r_ready && out_r.last),
    .out_data(q_head), .count(q_count));

  // merge read data back into the original burst
  assign in_r_valid  = out_r_valid && q_valid;
  assign out_r_ready = in_r_ready && q_valid;
  always_comb begin
    in_r      = out_r;
    in_r.id   = q_head.id;
    in_r.last = out_r.last && q_head.final_piece;
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_r_valid |-> q_valid);

endmodule
