// varr_pkg: types and constants shared by the varr kernel.
//
// The kernel reaches card memory through AXI4 memory-mapped master ports
// (one per argument bundle). This package fixes the address and data width of
// those ports and defines one packed struct per AXI channel payload; the
// valid/ready handshake bits travel beside the structs as plain signals.
// A 64-bit byte address and a 32-bit data word (one float or int element per
// beat) are this design's choices: the kernel's arrays hold 32-bit floats and
// ints, and transfers are single beats.
package varr_pkg;

  localparam int unsigned AXI_ADDR_W = 64;
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;

  // Bytes per array element (float and int are both 32 bits).
  localparam int unsigned ELEM_BYTES = 4;

  typedef logic [AXI_ADDR_W-1:0] addr_t;
  typedef logic [AXI_DATA_W-1:0] data_t;
  typedef logic [31:0]           fp32_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // AR / AW channel payload.
  typedef struct packed {
    addr_t       addr;
    logic [7:0]  len;    // beats - 1
    logic [2:0]  size;   // log2(bytes per beat)
    logic [1:0]  burst;  // 01 = INCR
  } axi_ax_t;

  // R channel payload.
  typedef struct packed {
    data_t       data;
    axi_resp_e   resp;
    logic        last;
  } axi_r_t;

  // W channel payload.
  typedef struct packed {
    data_t                 data;
    logic [AXI_STRB_W-1:0] strb;
    logic                  last;
  } axi_w_t;

  // B channel payload.
  typedef struct packed {
    axi_resp_e   resp;
  } axi_b_t;

  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

  // Single-beat, full-width, incrementing request.
  function automatic axi_ax_t single_beat(addr_t a);
    axi_ax_t r;
    r.addr  = a;
    r.len   = 8'd0;
    r.size  = 3'($clog2(AXI_STRB_W));
    r.burst = 2'b01;
    return r;
  endfunction

endpackage
