// tb_hc_ts_write -- self-checking test of the write management.
// Random write requests are split; pieces are compared with a reference
// split. Write data are sent as one stream, and must leave in order with
// WLAST exactly at the end of each piece and never ahead of their piece's
// address. A responder answers every piece with a random response; the
// accelerator must receive one B per request, with its original ID and the
// worst response of its pieces. The outstanding limit and the one-cycle AW
// latency are checked too. Finally a write is cut off by decoupling after
// five of its beats: the supervisor must fill the rest with zero-strobe beats
// so that all its pieces complete.
module tb_hc_ts_write;
  import hc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [8:0] cfg_nom_beats = 9'd8;
  logic [3:0] cfg_max_out = 4'd4;
  logic budget_ok = 1'b1, pending, issue, decoupled = 1'b0;
  logic in_aw_valid = 0, in_aw_ready, in_w_valid = 0, in_w_ready, in_b_valid, in_b_ready = 1;
  logic out_aw_valid, out_aw_ready = 1, out_w_valid, out_w_ready = 1, out_b_valid = 0, out_b_ready;
  axi_ax_t in_aw = '0, out_aw;
  axi_w_t  in_w = '0, out_w;
  axi_b_t  in_b, out_b = '0;

  hc_ts_write #(.MAX_OUT(8)) dut (.*);

  typedef struct { logic [ID_W-1:0] id; logic [1:0] resp; int pieces; } orig_t;
  axi_ax_t exp_piece[$];
  int      piece_beats[$];     // beats of pieces issued, for WLAST checking
  axi_ax_t bresp_q[$];         // pieces whose data are complete, awaiting B
  orig_t   orig_q[$];          // requests awaiting their merged B
  logic [1:0] piece_resp[$];   // responses to give, per issued piece, in order
  int checks = 0, failures = 0, outstanding = 0, max_seen = 0;
  int n_taken = 0, wbeat = 0, n_limit = 0;
  logic [31:0] w_sent = 0, w_seen = 0;
  int total_beats = 0, n_fill = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  task automatic add_request(input axi_ax_t a, input int nom);
    int rem, b, np;
    logic [1:0] worst;
    logic [31:0] addr;
    rem = int'(a.len) + 1;
    total_beats += rem;
    addr = a.addr;
    np = 0;
    worst = RESP_OKAY;
    while (rem > 0) begin
      logic [1:0] r;
      b = (a.burst == BURST_WRAP || rem <= nom) ? rem : nom;
      exp_piece.push_back('{id: a.id, addr: addr, len: 8'(b - 1), size: a.size, burst: a.burst});
      r = ($urandom_range(7) == 0) ? RESP_SLVERR : RESP_OKAY;
      piece_resp.push_back(r);
      worst = resp_merge(worst, r);
      if (a.burst == BURST_INCR) addr += 32'(b) << a.size;
      rem -= b;
      np++;
    end
    orig_q.push_back('{id: a.id, resp: worst, pieces: np});
  endtask

  logic [1:0] b_give[$];
  always @(posedge clk) if (rst_n) begin
    if (in_aw_valid && in_aw_ready) n_taken++;
    if (out_aw_valid) check(budget_ok, "nothing offered without budget");
    if (dut.held && !dut.lim_ok) n_limit++;
    if (out_aw_valid && out_aw_ready) begin
      check(out_aw == exp_piece[0], $sformatf("piece addr=%h len=%0d expected addr=%h len=%0d",
            out_aw.addr, out_aw.len, exp_piece[0].addr, exp_piece[0].len));
      void'(exp_piece.pop_front());
      piece_beats.push_back(int'(out_aw.len) + 1);
      b_give.push_back(piece_resp.pop_front());
      outstanding++;
    end
    if (outstanding > max_seen) max_seen = outstanding;
    check(outstanding <= int'(cfg_max_out), "outstanding limit");
    if (out_w_valid && out_w_ready) begin
      check(piece_beats.size() > 0, "write data never ahead of their address");
      if (out_w.strb == '0) begin
        // beat supplied by the supervisor for a decoupled port
        check(decoupled && out_w.data == '0, "filler beats only while decoupled");
        n_fill++;
      end else begin
        check(out_w.data == w_seen, "write data in order");
        w_seen++;
      end
      check(out_w.last == (wbeat == piece_beats[0] - 1), "WLAST at the end of each piece");
      if (wbeat == piece_beats[0] - 1) begin
        void'(piece_beats.pop_front());
        wbeat = 0;
      end else wbeat++;
    end
    if (in_b_valid && in_b_ready) begin
      check(in_b.id == orig_q[0].id && in_b.resp == orig_q[0].resp,
            $sformatf("merged B id=%0d resp=%0d expected id=%0d resp=%0d",
                      in_b.id, in_b.resp, orig_q[0].id, orig_q[0].resp));
      void'(orig_q.pop_front());
    end
    // responder: one B per piece, once its data have passed, random gaps
    if (out_b_valid && out_b_ready) begin
      void'(b_give.pop_front());
      outstanding--;
    end
    if (!(out_b_valid && !out_b_ready)) begin
      if (b_give.size() > piece_beats.size() && $urandom_range(2) != 0) begin
        out_b_valid <= 1'b1;
        out_b <= '{id: 4'hF, resp: b_give[0]};
      end else out_b_valid <= 1'b0;
    end
  end

  // write data stream: all beats in order, random gaps
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (in_w_valid && in_w_ready_q) begin w_sent++; in_w_valid = 1'b0; end
      if (!in_w_valid && !decoupled && int'(w_sent) < total_beats && $urandom_range(3) != 0) begin
        in_w = '{data: w_sent, strb: '1, last: 1'b0};
        in_w_valid = 1'b1;
      end
    end
  end
  // handshake seen at the last edge
  logic in_w_ready_q = 1'b0;
  always @(posedge clk) in_w_ready_q <= in_w_valid && in_w_ready;

  initial begin
    axi_ax_t a;
    int taken;
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency: a short request crosses in one cycle
    a = '{id: 4'd2, addr: 32'h100, len: 8'd3, size: 3'd2, burst: BURST_INCR};
    add_request(a, 8);
    @(negedge clk);
    in_aw = a; in_aw_valid = 1'b1;
    @(negedge clk);
    in_aw_valid = 1'b0;
    check(out_aw_valid && out_aw.addr == 32'h100, "one-cycle latency on AW");
    for (int k = 0; k < 300; k++) begin
      a.id    = 4'($urandom);
      a.addr  = $urandom & 32'hFFFF_FF00;
      a.len   = (k % 10 == 0) ? 8'd255 : 8'($urandom_range(40));
      a.size  = 3'($urandom_range(2));
      a.burst = (k % 7 == 3) ? BURST_FIXED : (k % 11 == 5) ? BURST_WRAP : BURST_INCR;
      if (a.burst == BURST_WRAP) a.len = 8'd3;
      add_request(a, int'(cfg_nom_beats));
      taken = n_taken;
      in_aw = a; in_aw_valid = 1'b1;
      while (n_taken == taken) begin
        @(negedge clk);
        out_aw_ready = ($urandom_range(3) != 0);
        out_w_ready  = ($urandom_range(3) != 0);
        budget_ok    = ($urandom_range(5) != 0);
        in_b_ready   = ($urandom_range(4) != 0);
      end
      in_aw_valid = 1'b0;
    end
    t0 = 0;
    while (orig_q.size() > 0 && t0 < 100000) begin
      @(negedge clk); t0++;
      out_aw_ready = 1'b1; out_w_ready = 1'b1; budget_ok = 1'b1; in_b_ready = 1'b1;
    end
    check(orig_q.size() == 0, "all requests completed");
    check(int'(w_seen) == total_beats, "all write data forwarded");
    check(max_seen == 4 && n_limit > 0, $sformatf("outstanding limit reached (max %0d)", max_seen));
    // decoupling in the middle of a 24-beat write (three pieces of 8): five
    // beats arrive, then the port is cut off; the remaining 19 beats must be
    // supplied as zero-strobe filler so that every piece completes
    a = '{id: 4'd6, addr: 32'h4000, len: 8'd23, size: 3'd2, burst: BURST_INCR};
    add_request(a, 8);
    taken = n_taken;
    @(negedge clk);
    in_aw = a; in_aw_valid = 1'b1;
    while (n_taken == taken) @(negedge clk);
    in_aw_valid = 1'b0;
    while (int'(w_seen) < total_beats - 19) @(negedge clk);
    decoupled = 1'b1;
    t0 = 0;
    while (orig_q.size() > 0 && t0 < 1000) begin @(negedge clk); t0++; end
    check(orig_q.size() == 0, "write cut short by decoupling completes");
    check(n_fill == 19, $sformatf("missing beats filled (%0d of 19)", n_fill));
    check(exp_piece.size() == 0 && piece_beats.size() == 0, "all pieces issued and closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
