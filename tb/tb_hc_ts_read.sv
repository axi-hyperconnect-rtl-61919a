// tb_hc_ts_read -- self-checking test of the read management.
// Requests of random length (1..256 beats, INCR/FIXED/WRAP) are split; every
// piece is compared with a reference split computed here (address, length,
// ID). A responder returns the pieces' data in order with random
// back-pressure; the merged stream must carry the original ID and RLAST only
// at the end of each original request. The outstanding count must never
// exceed the limit, which must be reached; nothing may leave while the
// budget is withheld; a request crosses in one cycle when nothing stalls.
module tb_hc_ts_read;
  import hc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [8:0] cfg_nom_beats = 9'd16;
  logic [3:0] cfg_max_out = 4'd3;
  logic budget_ok = 1'b1, pending, issue;
  logic in_ar_valid = 0, in_ar_ready, in_r_valid, in_r_ready = 1;
  logic out_ar_valid, out_ar_ready = 1, out_r_valid = 0, out_r_ready;
  axi_ax_t in_ar = '0, out_ar;
  axi_r_t  in_r, out_r = '0;

  hc_ts_read #(.MAX_OUT(8)) dut (.*);

  axi_ax_t exp_piece[$];     // pieces still to be issued, in order
  axi_ax_t resp_q[$];        // pieces issued, awaiting data
  typedef struct { logic [ID_W-1:0] id; int beats; } orig_t;
  orig_t   orig_q[$];
  int checks = 0, failures = 0, outstanding = 0, max_seen = 0, rbeat = 0, obeat = 0;
  int n_limit = 0, n_taken = 0;
  logic [31:0] data_ctr = 0, exp_data_ctr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  // reference split of one request into pieces
  task automatic add_request(input axi_ax_t a, input int nom);
    int rem, b;
    logic [31:0] addr;
    rem = int'(a.len) + 1;
    addr = a.addr;
    orig_q.push_back('{id: a.id, beats: rem});
    while (rem > 0) begin
      b = (a.burst == BURST_WRAP || rem <= nom) ? rem : nom;
      exp_piece.push_back('{id: a.id, addr: addr, len: 8'(b - 1), size: a.size, burst: a.burst});
      if (a.burst == BURST_INCR) addr += 32'(b) << a.size;
      rem -= b;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_ar_valid) check(budget_ok, "nothing offered without budget");
    if (out_ar_valid && out_ar_ready) begin
      check(out_ar == exp_piece[0], $sformatf("piece addr=%h len=%0d expected addr=%h len=%0d",
            out_ar.addr, out_ar.len, exp_piece[0].addr, exp_piece[0].len));
      void'(exp_piece.pop_front());
      resp_q.push_back(out_ar);
      outstanding++;
    end
    if (dut.held && !dut.lim_ok) n_limit++;
    if (in_ar_valid && in_ar_ready) n_taken++;
    if (outstanding > max_seen) max_seen = outstanding;
    check(outstanding <= int'(cfg_max_out), "outstanding limit");
    if (in_r_valid && in_r_ready) begin
      check(in_r.id == orig_q[0].id, "merged R carries the original ID");
      check(in_r.data == exp_data_ctr, "merged R data in order");
      exp_data_ctr++;
      check(in_r.last == (obeat == orig_q[0].beats - 1), "RLAST only at the end of the request");
      if (obeat == orig_q[0].beats - 1) begin void'(orig_q.pop_front()); obeat = 0; end
      else obeat++;
    end
    // responder: data of the issued pieces, in order, with random gaps
    if (out_r_valid && out_r_ready) begin
      data_ctr++;
      if (out_r.last) begin
        void'(resp_q.pop_front());
        outstanding--;
        rbeat = 0;
      end else rbeat++;
    end
    if (!(out_r_valid && !out_r_ready)) begin
      if (resp_q.size() > 0 && $urandom_range(3) != 0) begin
        out_r_valid <= 1'b1;
        out_r <= '{id: 4'hF, data: data_ctr, resp: RESP_OKAY, last: (rbeat == int'(resp_q[0].len))};
      end else out_r_valid <= 1'b0;
    end
  end

  initial begin
    axi_ax_t a;
    longint t0;
    int taken;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency: a short request crosses in one cycle
    a = '{id: 4'd2, addr: 32'h100, len: 8'd3, size: 3'd2, burst: BURST_INCR};
    add_request(a, 16);
    in_ar <= a; in_ar_valid <= 1'b1;
    @(posedge clk);
    in_ar_valid <= 1'b0;
    #1 check(out_ar_valid && out_ar.addr == 32'h100, "one-cycle latency on AR");
    repeat (40) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      int nom;
      a.id    = 4'($urandom);
      a.addr  = $urandom & 32'hFFFF_FF00;
      a.len   = (k % 10 == 0) ? 8'd255 : 8'($urandom_range(70));
      a.size  = 3'($urandom_range(2));
      a.burst = (k % 7 == 3) ? BURST_FIXED : (k % 11 == 5) ? BURST_WRAP : BURST_INCR;
      if (a.burst == BURST_WRAP) a.len = 8'd7;
      nom = int'(cfg_nom_beats);
      add_request(a, nom);
      taken = n_taken;
      @(negedge clk);
      in_ar = a; in_ar_valid = 1'b1;
      while (n_taken == taken) begin
        @(negedge clk);
        out_ar_ready = ($urandom_range(3) != 0);
        budget_ok    = ($urandom_range(5) != 0);
        in_r_ready   = ($urandom_range(4) != 0);
      end
      in_ar_valid = 1'b0;
      if (k == 150) begin
        // change the configuration between requests, once all is drained
        out_ar_ready = 1'b1; budget_ok = 1'b1; in_r_ready = 1'b1;
        while (orig_q.size() > 0) @(negedge clk);
        cfg_nom_beats = 9'd4;
        cfg_max_out   = 4'd8;
      end
    end
    t0 = 0;
    while ((orig_q.size() > 0 || exp_piece.size() > 0) && t0 < 100000) begin
      @(negedge clk); t0++;
      out_ar_ready = 1'b1; budget_ok = 1'b1; in_r_ready = 1'b1;
    end
    check(orig_q.size() == 0, "all requests completed");
    check(max_seen == 3 || max_seen == 8, $sformatf("limit reached (max %0d)", max_seen));
    check(n_limit > 0, "outstanding limit stalled the supervisor");
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
