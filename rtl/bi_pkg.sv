// bi_pkg: types and constants shared by the Bloom filter traffic inspector.
//
// The inspector sits in a NetFPGA-style packet pipeline. Each bus word is 64
// data bits plus 8 control bits. A packet is one module header word
// (ctrl = IOQ_HDR_CTRL) followed by data words (ctrl = 0); the last data word
// carries a non-zero ctrl (a one-hot marker of its last valid byte).
// The 64-bit word and the 8 output ports (4 MAC, 4 CPU/DMA) follow the
// reference pipeline the design is built into; the header field layout and
// the control encoding are conventions of that pipeline, chosen here.
package bi_pkg;

  localparam int unsigned DATA_W = 64;   // pipeline data width
  localparam int unsigned CTRL_W = 8;    // pipeline control width

  localparam logic [CTRL_W-1:0] IOQ_HDR_CTRL = 8'hFF;

  // One word of the packet bus.
  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;
    logic [DATA_W-1:0] data;
  } bus_word_t;

  // Module header layout (bit positions in the 64-bit data field).
  //   [63:48] one-hot destination ports: bit 2i = MAC i, bit 2i+1 = CPU i
  //   [47:32] packet length in words
  //   [31:16] source port number: 2i = MAC i, 2i+1 = CPU i
  //   [15:0]  packet length in bytes
  localparam int unsigned HDR_DST_LSB = 48;
  localparam int unsigned HDR_SRC_LSB = 16;

  // Ethernet/IPv4 field positions, counted in data words after the module
  // header (word 0 = first 8 bytes of the frame), byte 0 in bits [63:56].
  localparam int unsigned ETYPE_WORD  = 1;   // bytes 12..13 -> [31:16]
  localparam int unsigned SRCIP_WORD  = 3;   // bytes 26..29 -> [47:16], bytes 30..31 (destination, high half) -> [15:0]
  localparam int unsigned DSTIP_WORD1 = 4;   // bytes 32..33 -> [63:48]
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;

  // Interception modes.
  typedef enum logic {
    MODE_FWD_TAP  = 1'b0,  // forward every packet, copy matches to the host
    MODE_TAP_DROP = 1'b1   // copy matches to the host, discard the rest
  } li_mode_e;

  // User-space requests handled by the USBI.
  typedef enum logic [1:0] {
    USR_READ   = 2'd0,  // read one word of the bit array
    USR_WRITE  = 2'd1,  // write one word of the bit array
    USR_ADD_IP = 2'd2,  // hash an IP address and set its k bits
    USR_TEST_IP = 2'd3  // hash an IP address and report whether all k bits are set
  } usr_op_e;

  // Fibonacci (multiplicative) hashing constant: floor(2^32 / golden ratio).
  localparam logic [31:0] FIB_MULT = 32'h9E37_79B9;

endpackage
