// hc_central_unit -- central control unit: timing and resets shared by all
// ports.
//
// Reservation period: a cycle counter runs while reservation is enabled and
// produces a one-cycle `recharge` pulse every cfg_period cycles; all
// transaction supervisors reload their budgets on the same pulse, so the
// periods of all ports are aligned. A pulse is also given in the cycle after
// reservation is switched on, so that budgets start full. A period of 0 is
// taken as 1.
//
// Resets: the datapath reset `dp_rst_n` is low while the external reset is
// low and for one cycle after a soft-reset request from the control
// interface; the configuration registers are not affected by it.
//
// The synchronous recharge of all ports follows the described design; the
// enable edge pulse, the soft reset and its length are this design's choices.
module hc_central_unit
  import hc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_res_en,
  input  logic [PERIOD_W-1:0] cfg_period,
  input  logic                soft_reset_req,
  output logic                recharge,
  output logic                dp_rst_n
);
  logic [PERIOD_W-1:0] cnt;
  logic                en_q, soft_q;
  logic                wrap;

  assign wrap = (cnt + 1'b1 >= cfg_period);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      en_q     <= 1'b0;
      recharge <= 1'b0;
    end else begin
      en_q <= cfg_res_en;
      if (!cfg_res_en) begin
        cnt      <= '0;
        recharge <= 1'b0;
      end else if (!en_q) begin
        cnt      <= '0;
        recharge <= 1'b1;
      end else if (wrap) begin
        cnt      <= '0;
        recharge <= 1'b1;
      end else begin
        cnt      <= cnt + 1'b1;
        recharge <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) soft_q <= 1'b0;
    else        soft_q <= soft_reset_req;
  end

  assign dp_rst_n = rst_n && !soft_q;

endmodule
