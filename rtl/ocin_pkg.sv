// ocin_pkg: types and constants shared by the memory-centric on-chip
// interconnection network (OCIN).
//
// A packet is one header flit followed by 1..8 payload flits. Every flit on
// the network is 34 bits: a 2-bit flit type and a 32-bit word. The flit
// type codes (0 header, 1 body, 2 tail), the four node IDs (0 WPU, 1 MAC,
// 2 LT coding, 3 SVC), the 3-bit burst-length code (length = code + 1), the
// 2-bit priority (0 highest) and the 8-bit message information follow the
// interface tables of the network. The bit layout of the header word is this
// design's own choice, since only the header's fields are named.
package ocin_pkg;

  localparam int unsigned NUM_NODES   = 4;
  localparam int unsigned NODE_W      = 2;
  localparam int unsigned DATA_W      = 32;
  localparam int unsigned FLIT_W      = 34;   // {type[1:0], data[31:0]}
  localparam int unsigned BL_W        = 3;    // burst length code, length = code + 1
  localparam int unsigned MAX_BURST   = 8;    // words in one memory block / max payload
  localparam int unsigned PRI_W       = 2;
  localparam int unsigned MSG_W       = 8;
  localparam int unsigned BLOCK_W     = MAX_BURST * DATA_W;  // one 8-word block

  typedef enum logic [1:0] {
    FLIT_HEADER = 2'd0,
    FLIT_BODY   = 2'd1,
    FLIT_TAIL   = 2'd2
  } flit_type_e;

  typedef enum logic [NODE_W-1:0] {
    NODE_WPU = 2'd0,
    NODE_MAC = 2'd1,
    NODE_LT  = 2'd2,
    NODE_SVC = 2'd3
  } node_id_e;

  // Header word, 32 bits. "mes" marks a message-passing packet (always set by
  // the NI), "addr" marks an extended address field (unused, kept 0), "rw"
  // is 0 for data and 1 for a request.
  typedef struct packed {
    logic [NODE_W-1:0] dest;      // [31:30]
    logic [NODE_W-1:0] src;       // [29:28]
    logic              mes;       // [27]
    logic              addr;      // [26]
    logic              rw;        // [25]
    logic [PRI_W-1:0]  pri;       // [24:23]
    logic [BL_W-1:0]   bl;        // [22:20]
    logic [MSG_W-1:0]  msg_info;  // [19:12]
    logic [11:0]       rsvd;      // [11:0]
  } header_t;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

endpackage
