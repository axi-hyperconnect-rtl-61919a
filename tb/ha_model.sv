// ha_model -- behavioural hardware accelerator (AXI master) for simulation.
//
// A test queues reads and writes with read()/write(); independent processes
// issue AR, AW and W from those queues, back to back while work is queued
// (several requests may be outstanding) and check every R beat and B response as it arrives:
// in-order IDs, data equal to init_word(word index) XOR key, RLAST only on
// the last beat of each request, and the expected response code. Write data
// are init_word(word index) XOR key as well, so a later read with the same
// key checks them. A write may hold its data back for a number of cycles
// (gap), so that the address is ahead of the data. With STALL set, r_ready and b_ready toggle randomly.
module ha_model
  import hc_pkg::*;
#(
  parameter bit STALL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic ar_valid, input  logic ar_ready, output axi_ax_t ar,
  input  logic r_valid,  output logic r_ready,  input  axi_r_t  r,
  output logic aw_valid, input  logic aw_ready, output axi_ax_t aw,
  output logic w_valid,  input  logic w_ready,  output axi_w_t  w,
  input  logic b_valid,  output logic b_ready,  input  axi_b_t  b
);
  typedef struct {
    axi_ax_t     ax;
    logic [31:0] key;
    logic [1:0]  resp;
    int          gap;     // cycles the write data wait before the first beat
  } op_t;

  op_t ar_todo[$], aw_todo[$], w_todo[$], rexp[$], bexp[$];
  int  checks, failures, r_beats, reads_done, writes_done, rbeat;
  longint cyc, t_ar_hs, t_r_first, t_aw_hs, t_w_first, t_b_hs;

  function automatic logic [31:0] init_word(input int unsigned i);
    return i * 32'h9E37_79B1 + 32'h0001_2345;
  endfunction

  function automatic logic [31:0] word(input logic [31:0] addr, input int beat, input logic [31:0] key);
    return init_word(32'((addr >> 2) + 32'(beat)) % 32'(16384)) ^ key;
  endfunction

  task automatic read(input logic [31:0] addr, input int beats, input logic [ID_W-1:0] id,
                      input logic [31:0] key = 0);
    ar_todo.push_back('{ax: '{id: id, addr: addr, len: 8'(beats - 1), size: 3'd2, burst: BURST_INCR},
                       key: key, resp: RESP_OKAY, gap: 0});
  endtask

  task automatic write(input logic [31:0] addr, input int beats, input logic [ID_W-1:0] id,
                       input logic [31:0] key = 0, input logic [1:0] resp = RESP_OKAY,
                       input int gap = 0);
    op_t o;
    o = '{ax: '{id: id, addr: addr, len: 8'(beats - 1), size: 3'd2, burst: BURST_INCR},
          key: key, resp: resp, gap: gap};
    aw_todo.push_back(o);
    w_todo.push_back(o);
  endtask

  function automatic bit idle();
    return ar_todo.size() == 0 && aw_todo.size() == 0 && w_todo.size() == 0 &&
           rexp.size() == 0 && bexp.size() == 0 && !ar_valid && !aw_valid && !w_valid;
  endfunction

  initial begin
    ar_valid = 0; aw_valid = 0; w_valid = 0; ar = '0; aw = '0; w = '0;
    r_ready = 1; b_ready = 1;
    checks = 0; failures = 0; r_beats = 0; reads_done = 0; writes_done = 0; rbeat = 0;
    cyc = 0; t_ar_hs = -1; t_r_first = -1; t_aw_hs = -1; t_w_first = -1; t_b_hs = -1;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // AR issue
  initial begin
    forever begin
      if (rst_n && ar_todo.size() > 0) begin
        op_t o;
        o = ar_todo.pop_front();
        rexp.push_back(o);
        ar <= o.ax; ar_valid <= 1'b1;
        do @(posedge clk); while (!ar_ready);
        if (t_ar_hs < 0) t_ar_hs = cyc;
      end else begin
        ar_valid <= 1'b0;
        @(posedge clk);
      end
    end
  end

  // AW issue
  initial begin
    forever begin
      if (rst_n && aw_todo.size() > 0) begin
        op_t o;
        o = aw_todo.pop_front();
        bexp.push_back(o);
        aw <= o.ax; aw_valid <= 1'b1;
        do @(posedge clk); while (!aw_ready);
        if (t_aw_hs < 0) t_aw_hs = cyc;
      end else begin
        aw_valid <= 1'b0;
        @(posedge clk);
      end
    end
  end

  // W issue
  initial begin
    forever begin
      if (rst_n && w_todo.size() > 0) begin
        op_t o;
        o = w_todo.pop_front();
        if (o.gap > 0) begin
          w_valid <= 1'b0;
          repeat (o.gap) @(posedge clk);
        end
        for (int k = 0; k <= int'(o.ax.len); k++) begin
          w <= '{data: word(o.ax.addr, k, o.key), strb: '1, last: (k == int'(o.ax.len))};
          w_valid <= 1'b1;
          do @(posedge clk); while (!w_ready);
          if (t_w_first < 0) t_w_first = cyc;
        end
      end else begin
        w_valid <= 1'b0;
        @(posedge clk);
      end
    end
  end

  // R and B checking
  always @(posedge clk) begin
    if (STALL) begin
      r_ready <= ($urandom_range(3) != 0);
      b_ready <= ($urandom_range(3) != 0);
    end
    if (rst_n && r_valid && r_ready) begin
      if (t_r_first < 0) t_r_first = cyc;
      r_beats++;
      checks++;
      if (rexp.size() == 0) begin
        failures++;
        $display("[%0t] %m: unexpected R beat", $time);
      end else begin
        op_t o;
        logic bad;
        o = rexp[0];
        bad = (r.id != o.ax.id) || (r.data != word(o.ax.addr, rbeat, o.key)) ||
              (r.resp != o.resp) || (r.last != (rbeat == int'(o.ax.len)));
        if (bad) begin
          failures++;
          $display("[%0t] %m: R mismatch addr=%h beat=%0d id=%0d/%0d data=%h/%h last=%0d",
                   $time, o.ax.addr, rbeat, r.id, o.ax.id, r.data, word(o.ax.addr, rbeat, o.key), r.last);
        end
        if (rbeat == int'(o.ax.len)) begin
          void'(rexp.pop_front());
          rbeat = 0;
          reads_done++;
        end else rbeat++;
      end
    end
    if (rst_n && b_valid && b_ready) begin
      if (t_b_hs < 0) t_b_hs = cyc;
      checks++;
      if (bexp.size() == 0) begin
        failures++;
        $display("[%0t] %m: unexpected B", $time);
      end else begin
        op_t o;
        o = bexp.pop_front();
        if (b.id != o.ax.id || b.resp != o.resp) begin
          failures++;
          $display("[%0t] %m: B mismatch id=%0d/%0d resp=%0d/%0d", $time, b.id, o.ax.id, b.resp, o.resp);
        end
        writes_done++;
      end
    end
  end

endmodule
