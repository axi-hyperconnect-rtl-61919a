// hc_pkg -- types and constants shared by every block of the HyperConnect.
//
// The interconnect moves the five AXI channels (AR, AW, W, R, B) from N
// accelerator ports to one master port. Each channel payload is a packed
// struct so that FIFO queues, the transaction supervisors and the crossbar
// can store and route a whole beat as one value; the valid/ready pair of a
// channel travels beside it as plain signals.
//
// Widths: a data word of 32 bits follows from the evaluation, where 16 KB
// are moved as 256 bursts of 16 words (4 bytes per word). The address width
// (32), the ID width (4) and the subset of AXI fields carried (no cache,
// prot, qos, lock, user) are this design's choices. AXI3 and AXI4 masters
// both fit: the 8-bit length field covers AXI4 bursts of up to 256 beats.
package hc_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 4;

  // AXI burst types and responses (AMBA AXI encodings)
  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_EXOKAY = 2'b01;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Address request (AR and AW carry the same fields)
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [7:0]        len;    // beats - 1
    logic [2:0]        size;   // log2(bytes per beat)
    logic [1:0]        burst;
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      resp;
  } axi_b_t;

  // Width of the configuration values written through the control interface
  localparam int unsigned BUDGET_W = 16;
  localparam int unsigned PERIOD_W = 32;

  // Worse of two responses: errors (SLVERR, DECERR) win over OKAY/EXOKAY.
  function automatic logic [1:0] resp_merge(input logic [1:0] a, input logic [1:0] b);
    return (a > b) ? a : b;
  endfunction

endpackage
