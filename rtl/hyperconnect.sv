// hyperconnect -- predictable AXI interconnect for N hardware accelerators
// sharing one master port toward the processing system (memory subsystem).
//
// Datapath of an address request: slave eFIFO (1 cycle) -> transaction
// supervisor, which equalises the burst, enforces the outstanding limit and
// the reservation budget (1 cycle) -> crossbar round-robin arbitration
// (1 cycle) -> master eFIFO (1 cycle): four cycles on AR and AW when nothing
// contends. Read data, write data and write responses only cross the two
// eFIFOs (2 cycles); supervisors and crossbar steer them combinationally
// using the order recorded when the addresses were granted. Transactions
// complete in order: the memory side must answer in request order.
//
// Interface: N AXI slave ports s_* (unpacked arrays of channel structs
// indexed by port, valid/ready as bit vectors), one AXI master port m_*, and
// an AXI4-Lite control slave ctl_* (register map in hc_ctrl_if) through which
// the hypervisor sets budgets, period, nominal burst, outstanding limit and
// per-port decoupling. The configuration registers are reset only by rst_n;
// the datapath is also reset by the soft-reset bit.
//
// The block structure and the latencies follow the described architecture.
// N = 2 is the configuration evaluated; FIFO_DEPTH, MAX_OUT and ROUTE_DEPTH
// are this design's choices.
module hyperconnect
  import hc_pkg::*;
#(
  parameter int unsigned N           = 2,
  parameter int unsigned FIFO_DEPTH  = 4,
  parameter int unsigned MAX_OUT     = 8,
  parameter int unsigned ROUTE_DEPTH = 16,
  parameter int unsigned CTL_AW      = 8
) (
  input  logic clk,
  input  logic rst_n,
  // accelerator ports
  input  logic [N-1:0] s_ar_valid, output logic [N-1:0] s_ar_ready, input  axi_ax_t s_ar [N],
  output logic [N-1:0] s_r_valid,  input  logic [N-1:0] s_r_ready,  output axi_r_t  s_r  [N],
  input  logic [N-1:0] s_aw_valid, output logic [N-1:0] s_aw_ready, input  axi_ax_t s_aw [N],
  input  logic [N-1:0] s_w_valid,  output logic [N-1:0] s_w_ready,  input  axi_w_t  s_w  [N],
  output logic [N-1:0] s_b_valid,  input  logic [N-1:0] s_b_ready,  output axi_b_t  s_b  [N],
  // master port toward the processing system
  output logic m_ar_valid, input  logic m_ar_ready, output axi_ax_t m_ar,
  input  logic m_r_valid,  output logic m_r_ready,  input  axi_r_t  m_r,
  output logic m_aw_valid, input  logic m_aw_ready, output axi_ax_t m_aw,
  output logic m_w_valid,  input  logic m_w_ready,  output axi_w_t  m_w,
  input  logic m_b_valid,  output logic m_b_ready,  input  axi_b_t  m_b,
  // AXI4-Lite control interface
  input  logic ctl_awvalid, output logic ctl_awready, input logic [CTL_AW-1:0] ctl_awaddr,
  input  logic ctl_wvalid,  output logic ctl_wready,  input logic [31:0] ctl_wdata,
  output logic ctl_bvalid,  input  logic ctl_bready,  output logic [1:0] ctl_bresp,
  input  logic ctl_arvalid, output logic ctl_arready, input logic [CTL_AW-1:0] ctl_araddr,
  output logic ctl_rvalid,  input  logic ctl_rready,  output logic [31:0] ctl_rdata,
  output logic [1:0] ctl_rresp,
  // status
  output logic [N-1:0]         budget_stall,
  output logic [BUDGET_W-1:0]  budget_left [N],
  output logic                 recharge
);
  localparam int unsigned CW = $clog2(MAX_OUT+1);

  // ---------------- control ----------------
  logic                cfg_res_en, soft_reset_req, dp_rst_n;
  logic [PERIOD_W-1:0] cfg_period;
  logic [8:0]          cfg_nom_beats;
  logic [CW-1:0]       cfg_max_out;
  logic [N-1:0]        cfg_decouple;
  logic [BUDGET_W-1:0] cfg_budget [N];

  hc_ctrl_if #(.N(N), .MAX_OUT(MAX_OUT), .AW(CTL_AW)) u_ctrl (
    .clk, .rst_n,
    .s_awvalid(ctl_awvalid), .s_awready(ctl_awready), .s_awaddr(ctl_awaddr),
    .s_wvalid(ctl_wvalid),   .s_wready(ctl_wready),   .s_wdata(ctl_wdata),
    .s_bvalid(ctl_bvalid),   .s_bready(ctl_bready),   .s_bresp(ctl_bresp),
    .s_arvalid(ctl_arvalid), .s_arready(ctl_arready), .s_araddr(ctl_araddr),
    .s_rvalid(ctl_rvalid),   .s_rready(ctl_rready),   .s_rdata(ctl_rdata),
    .s_rresp(ctl_rresp),
    .cfg_res_en, .soft_reset_req, .cfg_period, .cfg_nom_beats, .cfg_max_out,
    .cfg_decouple, .cfg_budget);

  hc_central_unit u_ccu (
    .clk, .rst_n, .cfg_res_en, .cfg_period, .soft_reset_req,
    .recharge, .dp_rst_n);

  // ---------------- internal channels ----------------
  // eFIFO -> TS
  logic [N-1:0] e_ar_valid, e_ar_ready, e_aw_valid, e_aw_ready, e_w_valid, e_w_ready;
  logic [N-1:0] e_r_valid, e_r_ready, e_b_valid, e_b_ready;
  axi_ax_t e_ar [N];
  axi_ax_t e_aw [N];
  axi_w_t  e_w  [N];
  axi_r_t  e_r  [N];
  axi_b_t  e_b  [N];
  // TS -> EXBAR
  logic [N-1:0] t_ar_valid, t_ar_ready, t_aw_valid, t_aw_ready, t_w_valid, t_w_ready;
  logic [N-1:0] t_r_valid, t_r_ready, t_b_valid, t_b_ready;
  axi_ax_t t_ar [N];
  axi_ax_t t_aw [N];
  axi_w_t  t_w  [N];
  axi_r_t  t_r;
  axi_b_t  t_b;
  // EXBAR -> master eFIFO
  logic x_ar_valid, x_ar_ready, x_aw_valid, x_aw_ready, x_w_valid, x_w_ready;
  logic x_r_valid, x_r_ready, x_b_valid, x_b_ready;
  axi_ax_t x_ar, x_aw;
  axi_w_t  x_w;
  axi_r_t  x_r;
  axi_b_t  x_b;

  for (genvar i = 0; i < N; i++) begin : g_port
    hc_efifo #(.SLAVE(1'b1), .DEPTH(FIFO_DEPTH)) u_efifo (
      .clk, .rst_n(dp_rst_n), .decouple(cfg_decouple[i]),
      .up_ar_valid(s_ar_valid[i]), .up_ar_ready(s_ar_ready[i]), .up_ar(s_ar[i]),
      .up_aw_valid(s_aw_valid[i]), .up_aw_ready(s_aw_ready[i]), .up_aw(s_aw[i]),
      .up_w_valid (s_w_valid[i]),  .up_w_ready (s_w_ready[i]),  .up_w (s_w[i]),
      .up_r_valid (s_r_valid[i]),  .up_r_ready (s_r_ready[i]),  .up_r (s_r[i]),
      .up_b_valid (s_b_valid[i]),  .up_b_ready (s_b_ready[i]),  .up_b (s_b[i]),
      .dn_ar_valid(e_ar_valid[i]), .dn_ar_ready(e_ar_ready[i]), .dn_ar(e_ar[i]),
      .dn_aw_valid(e_aw_valid[i]), .dn_aw_ready(e_aw_ready[i]), .dn_aw(e_aw[i]),
      .dn_w_valid (e_w_valid[i]),  .dn_w_ready (e_w_ready[i]),  .dn_w (e_w[i]),
      .dn_r_valid (e_r_valid[i]),  .dn_r_ready (e_r_ready[i]),  .dn_r (e_r[i]),
      .dn_b_valid (e_b_valid[i]),  .dn_b_ready (e_b_ready[i]),  .dn_b (e_b[i]));

    hc_ts #(.MAX_OUT(MAX_OUT)) u_ts (
      .clk, .rst_n(dp_rst_n), .cfg_nom_beats, .cfg_max_out, .cfg_res_en,
      .cfg_budget(cfg_budget[i]), .recharge, .decoupled(cfg_decouple[i]),
      .budget_left(budget_left[i]),
      .budget_stall(budget_stall[i]),
      .in_ar_valid(e_ar_valid[i]), .in_ar_ready(e_ar_ready[i]), .in_ar(e_ar[i]),
      .in_r_valid (e_r_valid[i]),  .in_r_ready (e_r_ready[i]),  .in_r (e_r[i]),
      .in_aw_valid(e_aw_valid[i]), .in_aw_ready(e_aw_ready[i]), .in_aw(e_aw[i]),
      .in_w_valid (e_w_valid[i]),  .in_w_ready (e_w_ready[i]),  .in_w (e_w[i]),
      .in_b_valid (e_b_valid[i]),  .in_b_ready (e_b_ready[i]),  .in_b (e_b[i]),
      .out_ar_valid(t_ar_valid[i]), .out_ar_ready(t_ar_ready[i]), .out_ar(t_ar[i]),
      .out_r_valid (t_r_valid[i]),  .out_r_ready (t_r_ready[i]),  .out_r (t_r),
      .out_aw_valid(t_aw_valid[i]), .out_aw_ready(t_aw_ready[i]), .out_aw(t_aw[i]),
      .out_w_valid (t_w_valid[i]),  .out_w_ready (t_w_ready[i]),  .out_w (t_w[i]),
      .out_b_valid (t_b_valid[i]),  .out_b_ready (t_b_ready[i]),  .out_b (t_b));
  end

  hc_exbar #(.N(N), .ROUTE_DEPTH(ROUTE_DEPTH)) u_exbar (
    .clk, .rst_n(dp_rst_n),
    .s_ar_valid(t_ar_valid), .s_ar_ready(t_ar_ready), .s_ar(t_ar),
    .s_r_valid (t_r_valid),  .s_r_ready (t_r_ready),  .s_r (t_r),
    .s_aw_valid(t_aw_valid), .s_aw_ready(t_aw_ready), .s_aw(t_aw),
    .s_w_valid (t_w_valid),  .s_w_ready (t_w_ready),  .s_w (t_w),
    .s_b_valid (t_b_valid),  .s_b_ready (t_b_ready),  .s_b (t_b),
    .m_ar_valid(x_ar_valid), .m_ar_ready(x_ar_ready), .m_ar(x_ar),
    .m_r_valid (x_r_valid),  .m_r_ready (x_r_ready),  .m_r (x_r),
    .m_aw_valid(x_aw_valid), .m_aw_ready(x_aw_ready), .m_aw(x_aw),
    .m_w_valid (x_w_valid),  .m_w_ready (x_w_ready),  .m_w (x_w),
    .m_b_valid (x_b_valid),  .m_b_ready (x_b_ready),  .m_b (x_b));

  hc_efifo #(.SLAVE(1'b0), .DEPTH(FIFO_DEPTH)) u_efifo_m (
    .clk, .rst_n(dp_rst_n), .decouple(1'b0),
    .up_ar_valid(x_ar_valid), .up_ar_ready(x_ar_ready), .up_ar(x_ar),
    .up_aw_valid(x_aw_valid), .up_aw_ready(x_aw_ready), .up_aw(x_aw),
    .up_w_valid (x_w_valid),  .up_w_ready (x_w_ready),  .up_w (x_w),
    .up_r_valid (x_r_valid),  .up_r_ready (x_r_ready),  .up_r (x_r),
    .up_b_valid (x_b_valid),  .up_b_ready (x_b_ready),  .up_b (x_b),
    .dn_ar_valid(m_ar_valid), .dn_ar_ready(m_ar_ready), .dn_ar(m_ar),
    .dn_aw_valid(m_aw_valid), .dn_aw_ready(m_aw_ready), .dn_aw(m_aw),
    .dn_w_valid (m_w_valid),  .dn_w_ready (m_w_ready),  .dn_w (m_w),
    .dn_r_valid (m_r_valid),  .dn_r_ready (m_r_ready),  .dn_r (m_r),
    .dn_b_valid (m_b_valid),  .dn_b_ready (m_b_ready),  .dn_b (m_b));

endmodule
