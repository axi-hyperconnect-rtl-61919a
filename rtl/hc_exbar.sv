// hc_exbar -- "efficient crossbar": arbitrates the address requests of the N
// transaction supervisors onto the single master port and routes the data and
// response channels back.
//
// Address channels: AR and AW each have a round-robin arbiter (hc_rr_arbiter)
// with a fixed granularity of one transaction per port per round. The granted
// request is captured in an output register, so the crossbar adds one clock
// cycle per address request; a new grant is made whenever that register is
// empty or is being emptied in the same cycle, giving one request per cycle.
//
// Routing information: at each grant the winning port index is pushed into a
// circular buffer (an hc_fifo): one for reads, and two for writes (one for
// the W channel, one for B). Because the memory side answers in order, the
// head of each buffer names the port that owns the current R burst, W burst
// or B response. R, W and B are steered combinationally from the head entry
// (no added latency), and the entry is released on RLAST, WLAST and on the B
// handshake respectively. A grant is withheld while the buffer it needs is
// full; ROUTE_DEPTH bounds the transactions in flight through the crossbar.
//
// The arbitration policy, the one-cycle latency and the circular routing
// buffer follow the described design; ROUTE_DEPTH (default 16) is this
// design's choice. N must be at least 2.
module hc_exbar
  import hc_pkg::*;
#(
  parameter int unsigned N           = 2,
  parameter int unsigned ROUTE_DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  // transaction-supervisor side
  input  logic [N-1:0] s_ar_valid, output logic [N-1:0] s_ar_ready, input  axi_ax_t s_ar [N],
  output logic [N-1:0] s_r_valid,  input  logic [N-1:0] s_r_ready,  output axi_r_t  s_r,
  input  logic [N-1:0] s_aw_valid, output logic [N-1:0] s_aw_ready, input  axi_ax_t s_aw [N],
  input  logic [N-1:0] s_w_valid,  output logic [N-1:0] s_w_ready,  input  axi_w_t  s_w [N],
  output logic [N-1:0] s_b_valid,  input  logic [N-1:0] s_b_ready,  output axi_b_t  s_b,
  // master side (toward the master eFIFO)
  output logic m_ar_valid, input  logic m_ar_ready, output axi_ax_t m_ar,
  input  logic m_r_valid,  output logic m_r_ready,  input  axi_r_t  m_r,
  output logic m_aw_valid, input  logic m_aw_ready, output axi_ax_t m_aw,
  output logic m_w_valid,  input  logic m_w_ready,  output axi_w_t  m_w,
  input  logic m_b_valid,  output logic m_b_ready,  input  axi_b_t  m_b
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned RW = $clog2(ROUTE_DEPTH+1);
  typedef logic [IW-1:0] idx_t;

  // ---------------- read address ----------------
  logic ar_gv, ar_take, ar_space, rr_in_ready, rr_valid;
  idx_t ar_gi, rr_head;
  logic [RW-1:0] rr_cnt;

  assign ar_space = !m_ar_valid || m_ar_ready;
  assign ar_take  = ar_gv && ar_space && rr_in_ready;

  hc_rr_arbiter #(.N(N)) u_ar_arb (
    .clk, .rst_n, .req(s_ar_valid), .advance(ar_take),
    .gnt_valid(ar_gv), .gnt_idx(ar_gi));

  always_comb begin
    s_ar_ready = '0;
    s_ar_ready[ar_gi] = ar_take;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_ar_valid <= 1'b0;
      m_ar       <= '0;
    end else if (ar_space) begin
      m_ar_valid <= ar_take;
      if (ar_take) m_ar <= s_ar[ar_gi];
    end
  end

  hc_fifo #(.T(idx_t), .DEPTH(ROUTE_DEPTH)) u_r_route (
    .clk, .rst_n,
    .in_valid(ar_take), .in_ready(rr_in_ready), .in_data(ar_gi),
    .out_valid(rr_valid), .out_ready(m_r_valid && m_r_ready && m_r.last),
    .out_data(rr_head), .count(rr_cnt));

  always_comb begin
    s_r_valid = '0;
    s_r_valid[rr_head] = m_r_valid && rr_valid;
  end
  assign s_r       = m_r;
  assign m_r_ready = rr_valid && s_r_ready[rr_head];

  // ---------------- write address ----------------
  logic aw_gv, aw_take, aw_space, wr_in_ready, wr_valid, br_in_ready, br_valid;
  idx_t aw_gi, wr_head, br_head;
  logic [RW-1:0] wr_cnt, br_cnt;

  assign aw_space = !m_aw_valid || m_aw_ready;
  assign aw_take  = aw_gv && aw_space && wr_in_ready && br_in_ready;

  hc_rr_arbiter #(.N(N)) u_aw_arb (
    .clk, .rst_n, .req(s_aw_valid), .advance(aw_take),
    .gnt_valid(aw_gv), .gnt_idx(aw_gi));

  always_comb begin
    s_aw_ready = '0;
    s_aw_ready[aw_gi] = aw_take;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_aw_valid <= 1'b0;
      m_aw       <= '0;
    end else if (aw_space) begin
      m_aw_valid <= aw_take;
      if (aw_take) m_aw <= s_aw[aw_gi];
    end
  end

  hc_fifo #(.T(idx_t), .DEPTH(ROUTE_DEPTH)) u_w_route (
    .clk, .rst_n,
    .in_valid(aw_take), .in_ready(wr_in_ready), .in_data(aw_gi),
    .out_valid(wr_valid), .out_ready(m_w_valid && m_w_ready && m_w.last),
    .out_data(wr_head), .count(wr_cnt));

  hc_fifo #(.T(idx_t), .DEPTH(ROUTE_DEPTH)) u_b_route (
    .clk, .rst_n,
    .in_valid(aw_take), .in_ready(br_in_ready), .in_data(aw_gi),
    .out_valid(br_valid), .out_ready(m_b_valid && m_b_ready),
    .out_data(br_head), .count(br_cnt));

  // write data follow the order of the granted write addresses
  assign m_w_valid = wr_valid && s_w_valid[wr_head];
  assign m_w       = s_w[wr_head];
  always_comb begin
    s_w_ready = '0;
    s_w_ready[wr_head] = wr_valid && m_w_ready;
  end

  always_comb begin
    s_b_valid = '0;
    s_b_valid[br_head] = m_b_valid && br_valid;
  end
  assign s_b       = m_b;
  assign m_b_ready = br_valid && s_b_ready[br_head];

  // responses only arrive for transactions that were routed
  assert property (@(posedge clk) disable iff (!rst_n) m_r_valid |-> rr_valid);
  assert property (@(posedge clk) disable iff (!rst_n) m_b_valid |-> br_valid);

endmodule
