// vr_pkg: types and constants shared by the Vector Runahead blocks.
//
// Vector Runahead lets an out-of-order core that is stalled on a long-latency
// load run ahead speculatively and, once it decodes a confidently striding
// load, reinterpret the scalar instructions that depend on that load as
// 8-lane vector operations. Each such instruction is duplicated P times
// (vector pipelining) so that P x 8 future loop iterations issue their loads
// at once, down the whole chain of dependent loads.
//
// The scalar micro-op format below is this design's own abstraction of a
// decoded x86 instruction (register-register or register-immediate ALU op,
// base + index<<scale + displacement load, store, compare-to-zero branch).
// Sizes follow the evaluated configuration: 16 integer architectural
// registers, 96 physical 512-bit vector registers, 8 lanes of 64 bits,
// 48-bit addresses and PCs.
package vr_pkg;

  localparam int unsigned XLEN       = 64;   // lane / scalar register width
  localparam int unsigned LANES      = 8;    // 512-bit vector / 64-bit lanes
  localparam int unsigned ADDR_W     = 48;   // virtual address width
  localparam int unsigned PC_W       = 48;   // instruction address width
  localparam int unsigned STRIDE_W   = 16;   // stride field of the detector
  localparam int unsigned NUM_AREGS  = 16;   // integer architectural registers
  localparam int unsigned AREG_W     = 4;
  localparam int unsigned NUM_VREGS  = 96;   // physical vector registers
  localparam int unsigned VREG_W     = 7;
  localparam int unsigned NUM_SPREGS = 180;  // physical integer registers
  localparam int unsigned SPREG_W    = 8;
  localparam int unsigned RDQ_IDX_W  = 8;    // index into a queue of up to 256
  localparam int unsigned COPY_W     = 3;    // pipelined copy number, P <= 8
  localparam int unsigned RND_W      = 4;    // round number, U/P <= 16

  // Kind of a decoded scalar instruction as seen by the runahead logic.
  typedef enum logic [2:0] {
    SOP_ALU    = 3'd0,  // integer arithmetic / logic / move
    SOP_LOAD   = 3'd1,  // integer load
    SOP_STORE  = 3'd2,  // store (never executed in runahead)
    SOP_BRANCH = 3'd3,  // conditional branch
    SOP_FP     = 3'd4,  // floating-point operation
    SOP_VEC    = 3'd5,  // instruction already vectorized in the program
    SOP_NOP    = 3'd6
  } sop_e;

  typedef enum logic [3:0] {
    FN_ADD = 4'd0,
    FN_SUB = 4'd1,
    FN_AND = 4'd2,
    FN_OR  = 4'd3,
    FN_XOR = 4'd4,
    FN_SHL = 4'd5,
    FN_SHR = 4'd6,
    FN_SAR = 4'd7,
    FN_MUL = 4'd8,
    FN_MOV = 4'd9   // result = operand a
  } alu_fn_e;

  // Branch condition, tested on operand a.
  typedef enum logic [1:0] {
    BR_EQZ = 2'd0,
    BR_NEZ = 2'd1,
    BR_LTZ = 2'd2,
    BR_GEZ = 2'd3
  } br_cond_e;

  // Decoded scalar instruction handed to the runahead logic.
  // ALU:    rd = fn(rs1, use_imm ? imm : rs2)
  // LOAD:   rd = mem[rs1 + (rs2 << scale) + imm]   (rs2 only if use_rs2)
  // BRANCH: taken = cond(rs1)
  typedef struct packed {
    logic [PC_W-1:0]   pc;
    sop_e              op;
    alu_fn_e           fn;
    br_cond_e          cond;
    logic [AREG_W-1:0] rd;
    logic [AREG_W-1:0] rs1;
    logic [AREG_W-1:0] rs2;
    logic              use_rs1;
    logic              use_rs2;
    logic              use_imm;
    logic              writes_rd;
    logic [1:0]        scale;
    logic [XLEN-1:0]   imm;
  } sop_t;

  typedef enum logic [1:0] {
    VOP_ALU     = 2'd0,  // lane-wise ALU operation
    VOP_STRIDED = 2'd1,  // vectorized striding load: lane i reads base + i*stride
    VOP_GATHER  = 2'd2,  // vectorized dependent load
    VOP_BRANCH  = 2'd3   // branch turned into a lane predicate
  } vop_e;

  // Source operand of a vector micro-op: a physical vector register, or a
  // loop-invariant scalar value broadcast to all lanes.
  typedef struct packed {
    logic              is_vec;
    logic [VREG_W-1:0] preg;
    logic [XLEN-1:0]   value;
  } vsrc_t;

  // Renamed vector micro-op, one per pipelined copy of a scalar instruction.
  typedef struct packed {
    vop_e                 op;
    alu_fn_e              fn;
    br_cond_e             cond;
    logic [COPY_W-1:0]    copy;      // which of the P pipelined copies
    logic [RND_W-1:0]     rnd;       // vector-runahead round it belongs to
    logic                 writes_pd;
    logic [VREG_W-1:0]    pd;
    vsrc_t                a;
    vsrc_t                b;         // immediate folded in for ALU ops
    logic [1:0]           scale;
    logic [XLEN-1:0]      imm;       // displacement of a gather
    logic [ADDR_W-1:0]    base;      // strided load: address of lane 0
    logic [STRIDE_W-1:0]  stride;    // strided load: signed stride in bytes
    logic [RDQ_IDX_W-1:0] rdq_idx;   // RDQ entry to mark executed
    logic [PC_W-1:0]      pc;
  } vuop_t;

  // Operating modes of the core as seen by the runahead controller.
  typedef enum logic [1:0] {
    MODE_NORMAL   = 2'd0,
    MODE_RUNAHEAD = 2'd1,  // scalar runahead, no striding load found yet
    MODE_VECTOR   = 2'd2,  // vector-runahead mode
    MODE_EXIT     = 2'd3   // restoring the checkpoint
  } mode_e;

  // Why a vector-runahead round ended.
  typedef enum logic [2:0] {
    TERM_NONE       = 3'd0,
    TERM_SAME_LOAD  = 3'd1,  // next dynamic instance of the striding load
    TERM_TERMINATOR = 3'd2,  // the recorded last dependent load was issued
    TERM_ALL_INV    = 3'd3,  // every lane of every copy is invalid
    TERM_TIMEOUT    = 3'd4,  // 200 instructions in vector-runahead mode
    TERM_NO_VREGS   = 3'd5   // no vector register can ever be freed
  } term_e;

  // Memory request from the vector load unit (one lane of a gather).
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [7:0]        tag;    // {slot, lane}
  } mem_req_t;

  typedef struct packed {
    logic [7:0]      tag;
    logic [XLEN-1:0] data;
    logic            err;      // invalid access: the lane becomes invalid
  } mem_rsp_t;

endpackage
