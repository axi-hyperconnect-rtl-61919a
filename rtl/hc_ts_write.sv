// hc_ts_write -- write management of a transaction supervisor.
//
// Splits write requests exactly as hc_ts_read splits reads (nominal burst
// cfg_nom_beats, INCR address stepping, FIXED kept, WRAP passed whole), and
// splits the write data to match: for every sub-request issued, its beat
// count enters a W queue, and the data beats that follow are forwarded with
// WLAST regenerated at the end of each sub-burst. Write data are forwarded
// only once their sub-request has been issued.
//
// Each sub-request also enters a B queue of {original ID, final flag}. Write
// responses of non-final pieces are consumed here and only remembered; the
// response of the final piece is forwarded with the original ID and the worst
// response seen over all pieces (an error in any piece is reported). The B
// queue occupancy is the number of outstanding writes, limited to
// cfg_max_out (at most MAX_OUT).
//
// Decoupling: while `decoupled` is high the accelerator can send no more
// data, so any beat still owed to a piece already issued is supplied here
// as a zero-strobe beat (memory is left unchanged) once the port's buffered
// data run out. A burst cut short by decoupling thus still completes and
// cannot hold the shared write-data channel. Re-enable a port only after its
// accelerator has been reset or has finished its bursts.
//
// Timing: one clock cycle on AW (registered request), none on W and B, which
// are steered combinationally. `issue` pulses for each sub-request issued,
// which hc_ts charges to the reservation budget.
module hc_ts_write
  import hc_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [8:0] cfg_nom_beats,  // 1..256; 0 is taken as 256
  input  logic [$clog2(MAX_OUT+1)-1:0] cfg_max_out,
  input  logic    budget_ok,
  input  logic    decoupled,         // port cut off: fill missing write data
  output logic    pending,
  output logic    issue,
  // from the port eFIFO
  input  logic    in_aw_valid, output logic in_aw_ready, input  axi_ax_t in_aw,
  input  logic    in_w_valid,  output logic in_w_ready,  input  axi_w_t  in_w,
  output logic    in_b_valid,  input  logic in_b_ready,  output axi_b_t  in_b,
  // toward the crossbar
  output logic    out_aw_valid, input logic out_aw_ready, output axi_ax_t out_aw,
  output logic    out_w_valid,  input logic out_w_ready,  output axi_w_t  out_w,
  input  logic    out_b_valid,  output logic out_b_ready, input  axi_b_t  out_b
);
  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            final_piece;
  } bq_t;

  localparam int unsigned CW = $clog2(MAX_OUT+1);

  logic            held;
  axi_ax_t         cur;
  logic [8:0]      remaining;

  logic [8:0]      nom, sub_beats;
  logic            last_sub, lim_ok, fire;
  logic [CW-1:0]   bq_count, wq_count;
  logic            bq_in_ready, bq_valid, wq_in_ready, wq_valid;
  bq_t             bq_head;
  logic [8:0]      wq_head;       // beats of the sub-burst at the head
  logic [8:0]      beat_cnt;      // beats already forwarded of that sub-burst
  logic [1:0]      resp_acc;      // worst response of the pieces seen so far
  logic            w_fire, w_last, w_fill, b_fire;

  assign nom       = (cfg_nom_beats == 9'd0) ? 9'd256 : cfg_nom_beats;
  assign sub_beats = (cur.burst == BURST_WRAP || remaining <= nom) ? remaining : nom;
  assign last_sub  = (sub_beats == remaining);
  assign lim_ok    = (bq_count < cfg_max_out) && bq_in_ready && wq_in_ready;

  assign pending      = held && lim_ok;
  assign out_aw_valid = held && lim_ok && budget_ok;
  assign fire         = out_aw_valid && out_aw_ready;
  assign issue        = fire;
  assign in_aw_ready  = !held || (fire && last_sub);

  always_comb begin
    out_aw     = cur;
    out_aw.len = 8'(sub_beats - 9'd1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held      <= 1'b0;
      cur       <= '0;
      remaining <= '0;
    end else if (in_aw_valid && in_aw_ready) begin
      held      <= 1'b1;
      cur       <= in_aw;
      remaining <= {1'b0, in_aw.len} + 9'd1;
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

  // ---------------- write data splitting ----------------
  hc_fifo #(.T(logic [8:0]), .DEPTH(MAX_OUT)) u_wq (
    .clk, .rst_n,
    .in_valid(fire), .in_ready(wq_in_ready), .in_data(sub_beats),
    .out_valid(wq_valid), .out_ready(w_fire && w_last),
    .out_data(wq_head), .count(wq_count));

  assign w_last      = (beat_cnt == wq_head - 9'd1);
  assign w_fill      = decoupled && !in_w_valid;
  assign out_w_valid = wq_valid && (in_w_valid || decoupled);
  assign in_w_ready  = out_w_ready && wq_valid;
  assign w_fire      = out_w_valid && out_w_ready;
  always_comb begin
    out_w      = w_fill ? '{data: '0, strb: '0, last: 1'b0} : in_w;
    out_w.last = w_last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      beat_cnt <= '0;
    else if (w_fire) beat_cnt <= w_last ? 9'd0 : beat_cnt + 9'd1;
  end

  // ---------------- write response merging ----------------
  hc_fifo #(.T(bq_t), .DEPTH(MAX_OUT)) u_bq (
    .clk, .rst_n,
    .in_valid(fire), .in_ready(bq_in_ready),
    .in_data('{id: cur.id, final_piece: last_sub}),
    .out_valid(bq_valid), .out_ready(b_fire),
    .out_data(bq_head), .count(bq_count));

  assign in_b_valid  = out_b_valid && bq_valid && bq_head.final_piece;
  assign out_b_ready = bq_valid && (bq_head.final_piece ? in_b_ready : 1'b1);
  assign b_fire      = out_b_valid && out_b_ready;
  assign in_b.id     = bq_head.id;
  assign in_b.resp   = resp_merge(resp_acc, out_b.resp);

  always_ff @(posedge clk) begin
    if (!rst_n) resp_acc <= RESP_OKAY;
    else if (b_fire) resp_acc <= bq_head.final_piece ? RESP_OKAY
                                                     : resp_merge(resp_acc, out_b.resp);
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_b_valid |-> bq_valid);

endmodule
