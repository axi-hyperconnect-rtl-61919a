// hc_ts -- transaction supervisor of one accelerator port.
//
// Joins the independent read management (hc_ts_read) and write management
// (hc_ts_write) and keeps the port's reservation budget: the number of
// (equalised) transactions the port may still issue in the current
// reservation period. Each sub-request issued on AR or AW costs one unit;
// when the budget is exhausted no further request is presented to the
// crossbar until the central unit's `recharge` pulse, common to all ports and
// issued once per reservation period, reloads it to `cfg_budget`. With
// `cfg_res_en` low the budget is not enforced.
//
// Reads and writes share the one budget. When a single unit is left and both
// a read and a write are waiting, the read takes it and the write waits; this
// tie rule is this design's choice. A recharge in the same cycle as an issue
// reloads the full budget.
//
// Decoupling: `decoupled` (the port's decouple bit) is passed to the write
// management, which completes write bursts the accelerator can no longer
// finish; the eFIFO in front cuts the accelerator itself off.
//
// Timing: one clock cycle on AR and AW, none on R, W and B.
module hc_ts
  import hc_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [8:0] cfg_nom_beats,
  input  logic [$clog2(MAX_OUT+1)-1:0] cfg_max_out,
  input  logic    cfg_res_en,
  input  logic [BUDGET_W-1:0] cfg_budget,
  input  logic    recharge,
  input  logic    decoupled,         // port cut off (see hc_ts_write)
  output logic [BUDGET_W-1:0] budget_left,
  output logic    budget_stall,      // a request is held back by the budget
  // from the port eFIFO
  input  logic    in_ar_valid, output logic in_ar_ready, input  axi_ax_t in_ar,
  output logic    in_r_valid,  input  logic in_r_ready,  output axi_r_t  in_r,
  input  logic    in_aw_valid, output logic in_aw_ready, input  axi_ax_t in_aw,
  input  logic    in_w_valid,  output logic in_w_ready,  input  axi_w_t  in_w,
  output logic    in_b_valid,  input  logic in_b_ready,  output axi_b_t  in_b,
  // toward the crossbar
  output logic    out_ar_valid, input logic out_ar_ready, output axi_ax_t out_ar,
  input  logic    out_r_valid,  output logic out_r_ready, input  axi_r_t  out_r,
  output logic    out_aw_valid, input logic out_aw_ready, output axi_ax_t out_aw,
  output logic    out_w_valid,  input logic out_w_ready,  output axi_w_t  out_w,
  input  logic    out_b_valid,  output logic out_b_ready, input  axi_b_t  out_b
);
  logic [BUDGET_W-1:0] budget;
  logic rd_pending, wr_pending, rd_issue, wr_issue, rd_ok, wr_ok;

  assign rd_ok = !cfg_res_en || (budget != '0);
  assign wr_ok = !cfg_res_en || (budget > BUDGET_W'(1)) || (budget == BUDGET_W'(1) && !rd_pending);

  assign budget_left  = budget;
  assign budget_stall = (rd_pending && !rd_ok) || (wr_pending && !wr_ok);

  always_ff @(posedge clk) begin
    if (!rst_n)        budget <= '0;
    else if (recharge) budget <= cfg_budget;
    else if (cfg_res_en)
      budget <= budget - BUDGET_W'(rd_issue) - BUDGET_W'(wr_issue);
  end

  hc_ts_read #(.MAX_OUT(MAX_OUT)) u_rd (
    .clk, .rst_n, .cfg_nom_beats, .cfg_max_out,
    .budget_ok(rd_ok), .pending(rd_pending), .issue(rd_issue),
    .in_ar_valid, .in_ar_ready, .in_ar,
    .in_r_valid, .in_r_ready, .in_r,
    .out_ar_valid, .out_ar_ready, .out_ar,
    .out_r_valid, .out_r_ready, .out_r);

  hc_ts_write #(.MAX_OUT(MAX_OUT)) u_wr (
    .clk, .rst_n, .cfg_nom_beats, .cfg_max_out,
    .budget_ok(wr_ok), .decoupled, .pending(wr_pending), .issue(wr_issue),
    .in_aw_valid, .in_aw_ready, .in_aw,
    .in_w_valid, .in_w_ready, .in_w,
    .in_b_valid, .in_b_ready, .in_b,
    .out_aw_valid, .out_aw_ready, .out_aw,
    .out_w_valid, .out_w_ready, .out_w,
    .out_b_valid, .out_b_ready, .out_b);

  // the budget never goes below zero
  assert property (@(posedge clk) disable iff (!rst_n)
    cfg_res_en && !recharge |-> (32'(rd_issue) + 32'(wr_issue)) <= 32'(budget));

endmodule
