// Telegraphos host interface board (HIB): shared types and constants.
//
// Address map seen on the host I/O bus (byte addresses, 32 bits):
//   bit 31 = 0 : shared-memory space. Bits [28:24] name the node whose
//                memory holds the word, bits [23:2] the 32-bit word inside
//                that node's 16 MByte multiprocessor memory (MPM).
//   bit 31 = 0, bit 30 = 1 : shadow of the shared address in bits [28:0];
//                a store there passes that physical address to a context.
//   bit 31 = 1 : HIB register space, register index in bits [7:2]; with
//                bit 12 set, the registers of context bits [11:8] (field in
//                bits [3:2]: 0 op, 1 data0, 2 data1, 3 launch); with bits
//                13 and 12 set, the key of that context (operating system).
// A shared word is addressed inside a node by a 22-bit word address; a
// page is 8 KByte (2K words), so a page number inside a node has 11 bits
// and a cluster-wide page index {node, page} has 16 bits, which gives the
// 64K page-counter pairs of the HIB.
//
// The 16 MByte memory, the 64K pages with two 16-bit counters each and the
// 16K multicast list entries of 32 bits are the HIB's published sizes. The
// 5-bit node number, the 8 KByte page, the register map and the packet
// layout are this design's own choices.
package tg_pkg;

  localparam int unsigned NODE_W   = 5;    // up to 32 workstations
  localparam int unsigned WADDR_W  = 22;   // 4M words x 32 bits = 16 MByte
  localparam int unsigned OFFS_W   = 11;   // 8 KByte page = 2K words
  localparam int unsigned LPAGE_W  = WADDR_W - OFFS_W;  // 11: page in a node
  localparam int unsigned GPAGE_W  = NODE_W + LPAGE_W;  // 16: page in cluster
  localparam int unsigned MCIDX_W  = 14;   // 16K multicast list entries
  localparam int unsigned PCNT_W   = 16;   // page access counter width
  localparam int unsigned CTX_W    = 4;    // 16 launch contexts

  typedef logic [NODE_W-1:0]  node_t;
  typedef logic [WADDR_W-1:0] waddr_t;
  typedef logic [31:0]        word_t;

  // Host bus address fields.
  localparam int unsigned A_REGSPACE = 31;
  localparam int unsigned A_NODE_LSB = 24;
  localparam int unsigned A_SHADOW   = 30;
  localparam int unsigned A_CTXSPACE = 12;
  localparam int unsigned A_KEYSPACE = 13;

  // Register indices (byte address bits [7:2] when bit 31 is set).
  typedef enum logic [5:0] {
    R_SPECIAL  = 6'd0,   // W: enter special mode, op in data[1:0], or leave it
                        //    (data[2]=1); R: {mode,op}
    R_LAUNCH   = 6'd1,   // R: launch the special operation, returns its result
    R_OUTSTAND = 6'd2,   // R: number of outstanding remote operations
    R_FENCE    = 6'd3,   // R: memory barrier, returns when none is outstanding
    R_PCNT_SEL = 6'd4,   // W: {is_write[16], global page[15:0]}
    R_PCNT_DAT = 6'd5,   // R/W: the selected page access counter
    R_IRQ      = 6'd6,   // R: {valid[31], is_write[16], page[15:0]}; W: clear
    R_MC_SEL   = 6'd7,   // W: multicast list entry index
    R_MC_DAT   = 6'd8,   // R/W: the selected multicast list entry
    R_PMODE    = 6'd9,   // W: {copy[11], local page[10:0]}; R: copy bit of MC_SEL page
    R_NODE     = 6'd10   // R: this node's number
  } reg_e;

  // Special (multi-instruction) operations.
  typedef enum logic [1:0] {
    SOP_FETCH_STORE = 2'd0,
    SOP_FETCH_INC   = 2'd1,
    SOP_CAS         = 2'd2,
    SOP_RCOPY       = 2'd3
  } sop_e;

  // Network packet types.
  typedef enum logic [3:0] {
    PK_RD_REQ   = 4'd0,  // remote read request
    PK_RD_RESP  = 4'd1,  // remote read data
    PK_WR       = 4'd2,  // remote write
    PK_ACK      = 4'd3,  // completion of a write, update or forward
    PK_AT_REQ   = 4'd4,  // remote atomic operation
    PK_AT_RESP  = 4'd5,  // old value returned by an atomic operation
    PK_CP_REQ   = 4'd6,  // remote copy: read addr, return to requester addr2
    PK_CP_RESP  = 4'd7,  // remote copy data, written at addr2
    PK_FWD      = 4'd8,  // write to a copy, forwarded to the page owner
    PK_UPDATE   = 4'd9   // multicast (eager / reflected) update
  } ptype_e;

  typedef struct packed {
    ptype_e  ptype;
    node_t   src;
    node_t   dst;
    node_t   orig;    // node whose store caused an update
    sop_e    sop;     // atomic operation code
    waddr_t  addr;    // word address at the destination
    waddr_t  addr2;   // remote copy: word address at the requester
    word_t   data;
    word_t   data2;
  } packet_t;         // 129 bits

  // A multicast list entry (32 bits).
  typedef struct packed {
    logic                 valid;
    logic                 last;    // no further entry in this list
    logic [MCIDX_W-1:0]   next;    // index of the next entry
    node_t                node;    // destination node
    logic [LPAGE_W-1:0]   page;    // destination page at that node
  } mc_entry_t;

  // A decoded host bus request.
  typedef struct packed {
    logic    we;
    logic    is_reg;
    logic    is_shadow;            // store passes a physical address
    logic    is_ctx;               // context register
    logic    is_key;               // context key (operating system)
    logic [CTX_W-1:0] ctx;
    logic [1:0]       cfield;
    logic    is_local;
    node_t   node;
    waddr_t  waddr;
    reg_e    regidx;
    word_t   wdata;
  } host_req_t;

endpackage
