// mem_slave_model -- behavioural model of the memory side (the processing
// system's slave port and the DRAM behind it), for simulation only.
//
// Accepts AR, AW and W (W beats may arrive before their AW) and answers in
// request order, as the memory controllers the interconnect is made for do.
// The first R beat of a read leaves LAT cycles after its AR was accepted,
// then one beat per cycle. Memory holds MEM_WORDS 32-bit words initialised
// to hash(word index) (see init_word); addresses wrap at the memory size.
// Transactions whose start address lies in [ERR_LO, ERR_HI) are answered
// with SLVERR. With STALL set, the ready outputs and R/B valid toggle
// pseudo-randomly to exercise back-pressure. Counters report the traffic
// seen (transactions, longest burst, beats).
module mem_slave_model
  import hc_pkg::*;
#(
  parameter int          LAT       = 2,
  parameter int          MEM_WORDS = 16384,
  parameter bit          STALL     = 1'b0,
  parameter logic [31:0] ERR_LO    = 32'h0000_1040,
  parameter logic [31:0] ERR_HI    = 32'h0000_1080
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ar_valid, output logic ar_ready, input  axi_ax_t ar,
  output logic r_valid,  input  logic r_ready,  output axi_r_t  r,
  input  logic aw_valid, output logic aw_ready, input  axi_ax_t aw,
  input  logic w_valid,  output logic w_ready,  input  axi_w_t  w,
  output logic b_valid,  input  logic b_ready,  output axi_b_t  b
);
  typedef struct {
    axi_ax_t ax;
    longint  t;
  } req_t;

  logic [DATA_W-1:0] mem [MEM_WORDS];
  req_t     rq[$];
  axi_ax_t  awq[$];
  axi_w_t   wq[$];
  axi_b_t   bq[$];
  longint   cyc;
  int       rbeat, wbeat;

  // statistics
  int n_ar, n_aw, n_r_beats, n_w_beats, max_ar_len, max_aw_len;

  function automatic logic [31:0] init_word(input int unsigned i);
    return i * 32'h9E37_79B1 + 32'h0001_2345;
  endfunction

  function automatic int unsigned widx(input axi_ax_t a, input int beat);
    logic [31:0] byte_addr;
    byte_addr = (a.burst == BURST_FIXED) ? a.addr : a.addr + 32'(beat << a.size);
    return (byte_addr >> 2) % MEM_WORDS;
  endfunction

  function automatic logic is_err(input logic [31:0] addr);
    return addr >= ERR_LO && addr < ERR_HI;
  endfunction

  initial begin
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = init_word(i);
    ar_ready = 1'b0; aw_ready = 1'b0; w_ready = 1'b0;
    r_valid = 1'b0; b_valid = 1'b0; r = '0; b = '0;
    cyc = 0; rbeat = 0; wbeat = 0;
    n_ar = 0; n_aw = 0; n_r_beats = 0; n_w_beats = 0; max_ar_len = 0; max_aw_len = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      rq.delete(); awq.delete(); wq.delete(); bq.delete();
      rbeat = 0; wbeat = 0;
      ar_ready <= 1'b0; aw_ready <= 1'b0; w_ready <= 1'b0;
      r_valid <= 1'b0; b_valid <= 1'b0;
    end else begin
      // ---- handshakes at this edge ----
      if (ar_valid && ar_ready) begin
        rq.push_back('{ax: ar, t: cyc});
        n_ar++;
        if (int'(ar.len) > max_ar_len) max_ar_len = int'(ar.len);
      end
      if (aw_valid && aw_ready) begin
        awq.push_back(aw);
        n_aw++;
        if (int'(aw.len) > max_aw_len) max_aw_len = int'(aw.len);
      end
      if (w_valid && w_ready) begin
        wq.push_back(w);
        n_w_beats++;
      end
      if (r_valid && r_ready) begin
        n_r_beats++;
        if (rbeat == int'(rq[0].ax.len)) begin
          void'(rq.pop_front());
          rbeat = 0;
        end else rbeat++;
      end
      if (b_valid && b_ready) void'(bq.pop_front());

      // ---- write data into memory, in AW order ----
      while (awq.size() > 0 && wq.size() > 0) begin
        axi_w_t wb;
        wb = wq.pop_front();
        if (!is_err(awq[0].addr)) begin
          int unsigned k;
          k = widx(awq[0], wbeat);
          for (int s = 0; s < STRB_W; s++)
            if (wb.strb[s]) mem[k][8*s +: 8] = wb.data[8*s +: 8];
        end
        if (wbeat == int'(awq[0].len)) begin
          bq.push_back('{id: awq[0].id, resp: is_err(awq[0].addr) ? RESP_SLVERR : RESP_OKAY});
          void'(awq.pop_front());
          wbeat = 0;
        end else wbeat++;
      end

      // ---- outputs for the next cycle ----
      ar_ready <= STALL ? ($urandom_range(3) != 0) : 1'b1;
      aw_ready <= STALL ? ($urandom_range(3) != 0) : 1'b1;
      w_ready  <= STALL ? ($urandom_range(3) != 0) : 1'b1;
      if (r_valid && !r_ready) begin
        // hold the beat until it is taken
      end else if (rq.size() > 0 && cyc + 1 >= rq[0].t + LAT && (!STALL || $urandom_range(3) != 0)) begin
        r_valid <= 1'b1;
        r <= '{id: rq[0].ax.id,
               data: mem[widx(rq[0].ax, rbeat)],
               resp: is_err(rq[0].ax.addr) ? RESP_SLVERR : RESP_OKAY,
               last: (rbeat == int'(rq[0].ax.len))};
      end else begin
        r_valid <= 1'b0;
      end
      if (b_valid && !b_ready) begin
        // hold the response until it is taken
      end else if (bq.size() > 0 && (!STALL || $urandom_range(3) != 0)) begin
        b_valid <= 1'b1;
        b <= bq[0];
      end else begin
        b_valid <= 1'b0;
      end
    end
  end

endmodule
