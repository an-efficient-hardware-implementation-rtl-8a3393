// ant_pkg: types and constants shared by the Stigmergy Engine.
//
// An ant packet is 160 bytes. It is held in memory, and inside the engine,
// as 40 big-endian 32-bit words (the byte at the lowest address sits in bits
// [31:24]). The field layout follows the ant format of the design:
//   word 0       Type (byte 0) and 3 reserved bytes
//   word 1       sNode, address of the node that created the ant
//   word 2       dNode, address of the destination node
//   word 3       pNodeOdr (byte 12), tNodeNum (byte 13), 2 reserved bytes
//   words 4-15   intNode[0..11], addresses of the visited nodes
//   words 16-39  visTime[0..11], 64-bit arrival times, high word first
// The Type encoding, the register map and the result codes are this
// design's own choices.
package ant_pkg;

  localparam int unsigned PKT_WORDS   = 40;   // 160 bytes
  localparam int unsigned MAX_VISIT   = 12;   // nodes an ant can record
  localparam int unsigned W_TYPE      = 0;
  localparam int unsigned W_SNODE     = 1;
  localparam int unsigned W_DNODE     = 2;
  localparam int unsigned W_ORDER     = 3;
  localparam int unsigned W_INTNODE   = 4;
  localparam int unsigned W_VISTIME   = 16;

  typedef enum logic [7:0] {
    ANT_FORWARD  = 8'h00,
    ANT_BACKWARD = 8'h01
  } ant_type_e;

  // Outcome of one engine command, reported in the status register.
  typedef enum logic [3:0] {
    RES_NONE      = 4'd0,
    RES_FORWARD   = 4'd1,  // forward ant, send to next_hop
    RES_TURNED    = 4'd2,  // forward ant became backward, send to next_hop
    RES_BACKWARD  = 4'd3,  // backward ant, table updated, send to next_hop
    RES_ARRIVED   = 4'd4,  // backward ant reached its source, consumed
    RES_CIRCLE    = 4'd5,  // forward ant visited this node before, removed
    RES_BAD       = 4'd6   // malformed ant or unknown address, removed
  } result_e;

  // Commands from the register set to the top controller.
  typedef enum logic [1:0] {
    CMD_NONE    = 2'd0,
    CMD_PROCESS = 2'd1,  // process the ant at ant_addr
    CMD_CREATE  = 2'd2   // create a new forward ant at ant_addr
  } cmd_e;

  // Configuration that the register set hands to the controller.
  typedef struct packed {
    logic [31:0] own_addr;     // this node's address
    logic [31:0] ant_addr;     // byte address of the ant packet buffer
    logic [31:0] rt_base;      // byte address of the routing table
    logic [31:0] tm_base;      // byte address of the local traffic model
    logic [31:0] dest_manual;  // dNode for a manual-mode new ant
    logic        random_mode;  // pick dNode of a new ant at random
    logic [3:0]  max_nodes;    // predefined maximum tNodeNum (1..12)
    logic [31:0] bcost_tth;    // bCost time threshold (time units)
    logic [31:0] cost_sth;     // curCost size threshold (time units)
    logic [4:0]  norm_shift;   // norm(): right shift of curCost-bCost
    logic [2:0]  cres_max;     // C_res for bCost = 0
    logic [4:0]  cres_scale;   // C_res falls by one per 2^cres_scale of bCost
  } se_cfg_t;

  // APB register map (byte offsets).
  localparam logic [7:0] REG_CTRL      = 8'h00;
  localparam logic [7:0] REG_STATUS    = 8'h04;
  localparam logic [7:0] REG_OWN       = 8'h08;
  localparam logic [7:0] REG_ANT       = 8'h0C;
  localparam logic [7:0] REG_RT        = 8'h10;
  localparam logic [7:0] REG_TM        = 8'h14;
  localparam logic [7:0] REG_DMAN      = 8'h18;
  localparam logic [7:0] REG_NEXTHOP   = 8'h1C;
  localparam logic [7:0] REG_BTTH      = 8'h20;
  localparam logic [7:0] REG_CSTH      = 8'h24;
  localparam logic [7:0] REG_RFM       = 8'h28;
  localparam logic [7:0] REG_MAXN      = 8'h2C;
  localparam logic [7:0] REG_NBR0      = 8'h40;  // 0x40..0x4C neighbour table
  localparam logic [7:0] REG_DEST0     = 8'h80;  // 0x80..0xBC destination table

endpackage
