// hc_efifo -- "efficient FIFO queuing" module: a buffered AXI interface.
//
// One eFIFO sits at each accelerator port (slave variant, SLAVE=1) and one at
// the interconnect's master port toward the processing system (SLAVE=0). It
// holds five independent hc_fifo queues, one per AXI channel. Requests (AR,
// AW, W) travel from the upstream side (up_*) to the downstream side (dn_*),
// responses (R, B) the other way. Nothing in a beat is modified, and each
// channel adds exactly one clock cycle.
//
// Decoupling (slave variant only): while `decouple` is high every handshake
// toward the accelerator is held low and every payload toward it is driven
// to zero, so the accelerator can neither issue nor receive anything. Beats
// already queued on the request side keep draining downstream. Responses that
// arrive for a decoupled port are consumed and dropped, so that a disabled
// port can never stall the shared response channels; dropping them is this
// design's choice. Write bursts whose address has already passed but whose
// data the accelerator can no longer send are completed by the transaction
// supervisor behind (hc_ts_write). The master variant ignores `decouple`.
//
// Queue depth (default 4) is this design's choice.
module hc_efifo
  import hc_pkg::*;
#(
  parameter bit          SLAVE = 1'b1,
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    decouple,
  // upstream side (accelerator for the slave variant, crossbar for the master)
  input  logic    up_ar_valid, output logic up_ar_ready, input  axi_ax_t up_ar,
  input  logic    up_aw_valid, output logic up_aw_ready, input  axi_ax_t up_aw,
  input  logic    up_w_valid,  output logic up_w_ready,  input  axi_w_t  up_w,
  output logic    up_r_valid,  input  logic up_r_ready,  output axi_r_t  up_r,
  output logic    up_b_valid,  input  logic up_b_ready,  output axi_b_t  up_b,
  // downstream side (transaction supervisor / processing-system port)
  output logic    dn_ar_valid, input  logic dn_ar_ready, output axi_ax_t dn_ar,
  output logic    dn_aw_valid, input  logic dn_aw_ready, output axi_ax_t dn_aw,
  output logic    dn_w_valid,  input  logic dn_w_ready,  output axi_w_t  dn_w,
  input  logic    dn_r_valid,  output logic dn_r_ready,  input  axi_r_t  dn_r,
  input  logic    dn_b_valid,  output logic dn_b_ready,  input  axi_b_t  dn_b
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic dec;
  assign dec = SLAVE && decouple;

  logic ar_rdy, aw_rdy, w_rdy, r_vld, b_vld;
  axi_r_t r_q;
  axi_b_t b_q;
  logic [CW-1:0] c_ar, c_aw, c_w, c_r, c_b;

  hc_fifo #(.T(axi_ax_t), .DEPTH(DEPTH)) u_ar (
    .clk, .rst_n,
    .in_valid(up_ar_valid && !dec), .in_ready(ar_rdy), .in_data(up_ar),
    .out_valid(dn_ar_valid), .out_ready(dn_ar_ready), .out_data(dn_ar), .count(c_ar));

  hc_fifo #(.T(axi_ax_t), .DEPTH(DEPTH)) u_aw (
    .clk, .rst_n,
    .in_valid(up_aw_valid && !dec), .in_ready(aw_rdy), .in_data(up_aw),
    .out_valid(dn_aw_valid), .out_ready(dn_aw_ready), .out_data(dn_aw), .count(c_aw));

  hc_fifo #(.T(axi_w_t), .DEPTH(DEPTH)) u_w (
    .clk, .rst_n,
    .in_valid(up_w_valid && !dec), .in_ready(w_rdy), .in_data(up_w),
    .out_valid(dn_w_valid), .out_ready(dn_w_ready), .out_data(dn_w), .count(c_w));

  hc_fifo #(.T(axi_r_t), .DEPTH(DEPTH)) u_r (
    .clk, .rst_n,
    .in_valid(dn_r_valid), .in_ready(dn_r_ready), .in_data(dn_r),
    .out_valid(r_vld), .out_ready(dec ? 1'b1 : up_r_ready), .out_data(r_q), .count(c_r));

  hc_fifo #(.T(axi_b_t), .DEPTH(DEPTH)) u_b (
    .clk, .rst_n,
    .in_valid(dn_b_valid), .in_ready(dn_b_ready), .in_data(dn_b),
    .out_valid(b_vld), .out_ready(dec ? 1'b1 : up_b_ready), .out_data(b_q), .count(c_b));

  // accelerator-facing handshakes and payloads are grounded while decoupled
  assign up_ar_ready = ar_rdy && !dec;
  assign up_aw_ready = aw_rdy && !dec;
  assign up_w_ready  = w_rdy  && !dec;
  assign up_r_valid  = r_vld  && !dec;
  assign up_b_valid  = b_vld  && !dec;
  assign up_r        = dec ? '0 : r_q;
  assign up_b        = dec ? '0 : b_q;

endmodule
