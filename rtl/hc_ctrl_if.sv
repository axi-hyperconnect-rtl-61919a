// hc_ctrl_if -- AXI4-Lite slave control interface with the configuration
// registers of the HyperConnect.
//
// The hypervisor reconfigures the interconnect at run time through this
// memory-mapped interface. Register map (byte offsets, 32-bit registers):
//   0x00 CTRL     bit 0: reservation enable; bit 1: write 1 to pulse the
//                 soft reset of the datapath (reads as 0)
//   0x04 PERIOD   reservation period T, in clock cycles
//   0x08 NOMINAL  nominal burst length, in beats (1..256; 0 means 256)
//   0x0C MAXOUT   outstanding transactions allowed per port and direction
//                 (written values are clamped to 1..MAX_OUT)
//   0x10 DECOUPLE bit i set: port i is decoupled from the memory system
//   0x14 INFO     read only: [7:0] number of ports, [15:8] MAX_OUT
//   0x40+4*i      BUDGET of port i, transactions per reservation period
// The register set follows the run-time settings the design names (budgets,
// period, nominal burst, outstanding limit, per-port decoupling); the
// offsets, reset values and widths are this design's choices.
//
// Protocol: a write is taken when AW and W are both valid and no B is
// pending, and answered with OKAY on B one cycle later; byte strobes are
// ignored (full-word writes). A read is answered one cycle after AR with the
// register value; unmapped offsets read 0 and writes to them are ignored.
module hc_ctrl_if
  import hc_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter int unsigned MAX_OUT = 8,
  parameter int unsigned AW      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic          s_awvalid, output logic s_awready, input logic [AW-1:0] s_awaddr,
  input  logic          s_wvalid,  output logic s_wready,  input logic [31:0]   s_wdata,
  output logic          s_bvalid,  input  logic s_bready,  output logic [1:0]   s_bresp,
  input  logic          s_arvalid, output logic s_arready, input logic [AW-1:0] s_araddr,
  output logic          s_rvalid,  input  logic s_rready,  output logic [31:0]  s_rdata,
  output logic [1:0]    s_rresp,
  // configuration
  output logic                 cfg_res_en,
  output logic                 soft_reset_req,
  output logic [PERIOD_W-1:0]  cfg_period,
  output logic [8:0]           cfg_nom_beats,
  output logic [$clog2(MAX_OUT+1)-1:0] cfg_max_out,
  output logic [N-1:0]         cfg_decouple,
  output logic [BUDGET_W-1:0]  cfg_budget [N]
);
  localparam int unsigned CW = $clog2(MAX_OUT+1);

  localparam logic [AW-1:0] A_CTRL     = AW'('h00);
  localparam logic [AW-1:0] A_PERIOD   = AW'('h04);
  localparam logic [AW-1:0] A_NOMINAL  = AW'('h08);
  localparam logic [AW-1:0] A_MAXOUT   = AW'('h0C);
  localparam logic [AW-1:0] A_DECOUPLE = AW'('h10);
  localparam logic [AW-1:0] A_INFO     = AW'('h14);
  localparam logic [AW-1:0] A_BUDGET   = AW'('h40);

  logic wr_en;
  assign wr_en     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_en;
  assign s_wready  = wr_en;
  assign s_bresp   = RESP_OKAY;
  assign s_rresp   = RESP_OKAY;
  assign s_arready = !s_rvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_res_en     <= 1'b0;
      soft_reset_req <= 1'b0;
      cfg_period     <= PERIOD_W'(1024);
      cfg_nom_beats  <= 9'd16;
      cfg_max_out    <= CW'(MAX_OUT);
      cfg_decouple   <= '0;
      for (int i = 0; i < N; i++) cfg_budget[i] <= '0;
      s_bvalid       <= 1'b0;
    end else begin
      soft_reset_req <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_en) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr)
          A_CTRL: begin
            cfg_res_en     <= s_wdata[0];
            soft_reset_req <= s_wdata[1];
          end
          A_PERIOD:   cfg_period    <= s_wdata[PERIOD_W-1:0];
          A_NOMINAL:  cfg_nom_beats <= s_wdata[8:0];
          A_MAXOUT:   cfg_max_out   <= (s_wdata > 32'(MAX_OUT)) ? CW'(MAX_OUT) :
                                       (s_wdata == 32'd0)         ? CW'(1)       : s_wdata[CW-1:0];
          A_DECOUPLE: cfg_decouple  <= s_wdata[N-1:0];
          default: begin
            for (int i = 0; i < N; i++)
              if (s_awaddr == A_BUDGET + AW'(4 * i)) cfg_budget[i] <= s_wdata[BUDGET_W-1:0];
          end
        endcase
      end
    end
  end

  logic [31:0] rd_val;
  always_comb begin
    rd_val = '0;
    unique case (s_araddr)
      A_CTRL:     rd_val = {31'b0, cfg_res_en};
      A_PERIOD:   rd_val = 32'(cfg_period);
      A_NOMINAL:  rd_val = 32'(cfg_nom_beats);
      A_MAXOUT:   rd_val = 32'(cfg_max_out);
      A_DECOUPLE: rd_val = 32'(cfg_decouple);
      A_INFO:     rd_val = {16'b0, 8'(MAX_OUT), 8'(N)};
      default: begin
        for (int i = 0; i < N; i++)
          if (s_araddr == A_BUDGET + AW'(4 * i)) rd_val = 32'(cfg_budget[i]);
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else if (s_arvalid && s_arready) begin
      s_rvalid <= 1'b1;
      s_rdata  <= rd_val;
    end else if (s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

endmodule
