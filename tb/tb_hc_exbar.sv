// tb_hc_exbar -- self-checking test of the crossbar with three ports and a
// routing buffer of four entries. Every port issues random reads and writes
// (ID = port number, write data tagged with the port). A master-side
// responder answers in order after a random delay. Checks: one-cycle AR
// latency; round-robin fairness (a waiting port is passed over at most N-1
// times); R and B reach only the port that issued the request; W beats
// leave in the order of the granted AWs, whole bursts at a time; the
// in-flight count never exceeds the routing buffer.
module tb_hc_exbar;
  import hc_pkg::*;
  localparam int N = 3;
  localparam int RD = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [N-1:0] s_ar_valid = '0, s_ar_ready, s_r_valid, s_r_ready = '1;
  logic [N-1:0] s_aw_valid = '0, s_aw_ready, s_w_valid = '0, s_w_ready, s_b_valid, s_b_ready = '1;
  axi_ax_t s_ar [N];
  axi_ax_t s_aw [N];
  axi_w_t  s_w  [N];
  axi_r_t  s_r;
  axi_b_t  s_b;
  logic m_ar_valid, m_ar_ready = 1, m_r_valid = 0, m_r_ready, m_aw_valid, m_aw_ready = 1;
  logic m_w_valid, m_w_ready = 1, m_b_valid = 0, m_b_ready;
  axi_ax_t m_ar, m_aw;
  axi_w_t  m_w;
  axi_r_t  m_r = '0;
  axi_b_t  m_b = '0;

  hc_exbar #(.N(N), .ROUTE_DEPTH(RD)) dut (.*);

  int checks = 0, failures = 0;
  int miss [N];
  int ar_taken [N], aw_taken [N];
  int wlen_q [N][$];                 // lengths of this port's granted AWs
  int wbeat [N];
  axi_ax_t mr_q[$];                  // reads accepted on the master side
  axi_ax_t maw_q[$];                 // writes accepted on the master side
  int mwbeat = 0, mrbeat = 0, rd_inflight = 0, max_inflight = 0, n_rr = 0;
  int mb_pend = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("[%0t] FAIL: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    // round-robin fairness on AR
    if (|(s_ar_valid & s_ar_ready)) begin
      for (int q = 0; q < N; q++) begin
        if (s_ar_valid[q] && s_ar_ready[q]) miss[q] = 0;
        else if (s_ar_valid[q]) begin
          miss[q]++;
          n_rr++;
          check(miss[q] <= N - 1, $sformatf("port %0d passed over %0d times", q, miss[q]));
        end
      end
    end
    check($countones(s_ar_ready) <= 1 && $countones(s_aw_ready) <= 1, "one grant per cycle");
    for (int p = 0; p < N; p++) begin
      if (s_ar_valid[p] && s_ar_ready[p]) begin ar_taken[p]++; rd_inflight++; end
      if (s_aw_valid[p] && s_aw_ready[p]) begin aw_taken[p]++; wlen_q[p].push_back(int'(s_aw[p].len)); end
      if (s_w_valid[p] && s_w_ready[p]) begin
        if (wbeat[p] == wlen_q[p][0]) begin wbeat[p] = 0; void'(wlen_q[p].pop_front()); end
        else wbeat[p]++;
      end
      if (s_r_valid[p]) check(int'(s_r.id) == p, "R reaches the requesting port only");
      if (s_b_valid[p]) check(int'(s_b.id) == p, "B reaches the requesting port only");
    end
    if (rd_inflight > max_inflight) max_inflight = rd_inflight;
    check(rd_inflight <= RD + 1, "in-flight reads bounded by the routing buffer");
    // master side
    if (m_ar_valid && m_ar_ready) mr_q.push_back(m_ar);
    if (m_aw_valid && m_aw_ready) maw_q.push_back(m_aw);
    if (m_w_valid && m_w_ready) begin
      check(int'(m_w.data[31:28]) == int'(dut.wr_head), "W beat comes from the port at the head");
      check(m_w.data[27:0] == 28'(mwbeat), $sformatf("W beats of a burst stay together (%0d/%0d)", m_w.data[27:0], mwbeat));
      if (m_w.last) mwbeat = 0; else mwbeat++;
    end
    if (m_r_valid && m_r_ready) begin
      if (m_r.last) begin void'(mr_q.pop_front()); rd_inflight--; mrbeat = 0; end else mrbeat++;
    end
    if (!(m_r_valid && !m_r_ready)) begin
      if (mr_q.size() > 0 && $urandom_range(3) == 0) begin
        m_r_valid <= 1'b1;
        m_r <= '{id: mr_q[0].id, data: 32'(mrbeat), resp: RESP_OKAY, last: mrbeat == int'(mr_q[0].len)};
      end else m_r_valid <= 1'b0;
    end
    if (m_b_valid && m_b_ready) void'(maw_q.pop_front());
    if (!(m_b_valid && !m_b_ready)) begin
      if (maw_q.size() > 0 && !(m_b_valid && m_b_ready && maw_q.size() == 0) && $urandom_range(3) == 0
          && dut.wr_cnt < dut.br_cnt) begin
        m_b_valid <= 1'b1;
        m_b <= '{id: maw_q[0].id, resp: RESP_OKAY};
      end else m_b_valid <= 1'b0;
    end
  end

  // sources, driven on the falling edge
  initial begin
    for (int p = 0; p < N; p++) begin
      s_ar[p] = '0; s_aw[p] = '0; s_w[p] = '0; miss[p] = 0; ar_taken[p] = 0; aw_taken[p] = 0; wbeat[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // one-cycle latency
    @(negedge clk);
    s_ar_valid[1] = 1'b1; s_ar[1] = '{id: 4'd1, addr: 32'hABC0, len: 8'd0, size: 3'd2, burst: 2'b01};
    @(negedge clk);
    s_ar_valid[1] = 1'b0;
    check(m_ar_valid && m_ar.addr == 32'hABC0, "one-cycle latency on AR");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        // requests stay valid until taken (the last edge's handshake is seen here)
        if (!s_ar_valid[p] || prev_ar_taken[p] != ar_taken[p]) begin
          s_ar_valid[p] = (k < 2800) && ($urandom_range(2) != 0);
          s_ar[p] = '{id: 4'(p), addr: $urandom, len: 8'($urandom_range(5)), size: 3'd2, burst: 2'b01};
        end
        if (!s_aw_valid[p] || prev_aw_taken[p] != aw_taken[p]) begin
          s_aw_valid[p] = (k < 2800) && ($urandom_range(3) == 0);
          s_aw[p] = '{id: 4'(p), addr: $urandom, len: 8'($urandom_range(3)), size: 3'd2, burst: 2'b01};
        end
        prev_ar_taken[p] = ar_taken[p];
        prev_aw_taken[p] = aw_taken[p];
        // write data of granted AWs, tagged with the port and the beat
        s_w_valid[p] = (wlen_q[p].size() > 0);
        if (s_w_valid[p])
          s_w[p] = '{data: {4'(p), 28'(wbeat[p])}, strb: '1, last: wbeat[p] == wlen_q[p][0]};
      end
      m_ar_ready = ($urandom_range(3) != 0);
      m_aw_ready = ($urandom_range(3) != 0);
      m_w_ready  = ($urandom_range(3) != 0);
      s_r_ready  = N'($urandom);
      s_b_ready  = N'($urandom);
    end
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      m_ar_ready = 1; m_aw_ready = 1; m_w_ready = 1; s_r_ready = '1; s_b_ready = '1;
      for (int p = 0; p < N; p++) begin
        if (prev_ar_taken[p] != ar_taken[p]) s_ar_valid[p] = 1'b0;
        if (prev_aw_taken[p] != aw_taken[p]) s_aw_valid[p] = 1'b0;
        prev_ar_taken[p] = ar_taken[p];
        prev_aw_taken[p] = aw_taken[p];
        if (wlen_q[p].size() > 0) begin
          s_w_valid[p] = 1'b1;
          s_w[p] = '{data: {4'(p), 28'(wbeat[p])}, strb: '1, last: wbeat[p] == wlen_q[p][0]};
        end else s_w_valid[p] = 1'b0;
      end
    end
    check(mr_q.size() == 0 && maw_q.size() == 0, "all transactions completed");
    check(n_rr > 0, "arbitration conflicts seen");
    check(max_inflight >= RD, $sformatf("routing buffer filled (%0d)", max_inflight));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int prev_ar_taken [N] = '{default: 0};
  int prev_aw_taken [N] = '{default: 0};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
