// puma_pkg: types and constants shared by the PUMA tile and mesh.
//
// A PUMA chip is a mesh of tiles. Each tile holds one programmable loop
// accelerator (PLA) that runs a modulo-scheduled loop: a control memory
// holds one very long instruction word per slot of the initiation interval
// (II), and every function unit (FU) writes its results into its own
// rotating register file. FUs reach each other's register files over a set
// of rings (distance 0, 1 and 2 in both directions).
//
// This package fixes the word formats. The function-unit mix, the ring and
// the rotating registers follow the published architecture; every width,
// depth and encoding below is this implementation's own choice, since the
// architecture description gives none of them.
package puma_pkg;

  localparam int DATA_W = 32;          // one operand (single-precision FP or integer)

  // ---------------------------------------------------------------- FU types
  typedef enum logic [1:0] {
    FU_BR  = 2'd0,   // loop control / branch unit (Start, Done)
    FU_INT = 2'd1,   // integer adder/subtractor, left/right rotator
    FU_FP  = 2'd2,   // floating-point multiplier/adder/subtractor
    FU_MEM = 2'd3    // load/store unit to the tile's local memory
  } fu_type_e;

  localparam int NUM_FU_DEFAULT = 8;
  // Ring order of the default PLA: FU types spread as evenly as possible.
  localparam fu_type_e DEFAULT_FU_TYPE [NUM_FU_DEFAULT] =
    '{FU_BR, FU_FP, FU_INT, FU_FP, FU_MEM, FU_FP, FU_INT, FU_FP};

  // ---------------------------------------------------------------- opcodes
  // One opcode space; each FU type decodes the subset it implements.
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_MOV  = 4'd1,   // identity: every FU (ring propagation, moves)
    OP_ADD  = 4'd2,   // INT, MEM
    OP_SUB  = 4'd3,   // INT, MEM
    OP_ROTL = 4'd4,   // INT
    OP_ROTR = 4'd5,   // INT
    OP_FADD = 4'd6,   // FP
    OP_FSUB = 4'd7,   // FP
    OP_FMUL = 4'd8,   // FP
    OP_LD   = 4'd9,   // MEM: rd <- lmem[a + b]
    OP_ST   = 4'd10,  // MEM: lmem[a] <- b
    OP_ITER = 4'd11   // BR : rd <- iteration number of this operation
  } op_e;

  // ---------------------------------------------------------------- operands
  // Operand source as seen from the consuming FU i.
  typedef enum logic [2:0] {
    SRC_SELF = 3'd0,  // RR of FU i
    SRC_P1   = 3'd1,  // RR of FU i+1 (ring set 1)
    SRC_M1   = 3'd2,  // RR of FU i-1 (ring set 1, other direction)
    SRC_P2   = 3'd3,  // RR of FU i+2 (odd/even ring sets)
    SRC_M2   = 3'd4,  // RR of FU i-2
    SRC_CRF  = 3'd5,  // central register file (live-ins)
    SRC_LIT  = 3'd6,  // literal register file (constants)
    SRC_ZERO = 3'd7
  } src_sel_e;

  localparam int RR_DEPTH  = 8;   // rotating registers per FU
  localparam int RR_IDX_W  = $clog2(RR_DEPTH);
  localparam int RF_DEPTH  = 16;  // CRF and literal file entries
  localparam int SRC_IDX_W = 4;   // wide enough for RF_DEPTH and RR_DEPTH
  localparam int STAGE_W   = 3;   // up to 8 pipeline stages per loop
  localparam int CM_DEPTH  = 16;  // largest II the control memory holds
  localparam int SLOT_W    = $clog2(CM_DEPTH);
  localparam int TRIP_W    = 16;  // loop trip count
  localparam int LMEM_DEPTH = 1024;
  localparam int LMEM_AW   = $clog2(LMEM_DEPTH);

  typedef struct packed {
    src_sel_e             sel;
    logic [SRC_IDX_W-1:0] idx;
  } src_t;

  // One FU's part of a control-memory word (25 bits).
  typedef struct packed {
    op_e                 op;
    logic [STAGE_W-1:0]  stage;  // stage of the modulo schedule this op belongs to
    logic [RR_IDX_W-1:0] dst;    // logical rotating register written
    src_t                a;
    src_t                b;
    logic                swap;   // exchange operands after the input muxes
  } fu_ctrl_t;

  localparam int FU_CTRL_W = $bits(fu_ctrl_t);

  // ---------------------------------------------------------------- network
  localparam int COORD_W = 3;
  localparam int ADDR_W  = 16;

  typedef enum logic [3:0] {
    CMD_WR_CM   = 4'd0,  // addr = {slot, fu}, data[FU_CTRL_W-1:0] = fu_ctrl_t
    CMD_WR_CRF  = 4'd1,
    CMD_WR_LIT  = 4'd2,
    CMD_WR_LMEM = 4'd3,
    CMD_RD_LMEM = 4'd4,  // answered with CMD_RSP_DATA to the sender
    CMD_WR_CFG  = 4'd5,  // addr 0: II, 1: trip count, 2: number of stages
    CMD_START   = 4'd6,  // start the loop; CMD_RSP_DONE goes to the sender at the end
    CMD_RSP_DATA = 4'd7,
    CMD_RSP_DONE = 4'd8
  } cmd_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    cmd_e               cmd;
    logic [ADDR_W-1:0]  addr;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Router port numbering.
  typedef enum logic [2:0] {
    PORT_N = 3'd0, PORT_E = 3'd1, PORT_S = 3'd2, PORT_W = 3'd3, PORT_L = 3'd4
  } port_e;
  localparam int NPORTS = 5;

endpackage
