// vectorizer: turns the decoded runahead instruction stream into renamed
// vector micro-ops.
//
// One decoded scalar instruction is accepted per handshake (in_valid /
// in_ready) while the core is in runahead. It is classified with the taint
// vector, whose flags are read for its sources:
//   - the striding load that opens a round (a load with detector confidence
//     3 in scalar runahead, or the recorded striding load again in
//     vector-runahead mode while rounds remain): vectorized into P strided
//     vector loads; its destination becomes "vectorized";
//   - floating-point or already-vector instructions, and any instruction
//     with an invalid source: discarded, destination marked invalid;
//   - stores: discarded;
//   - an instruction with a vectorized source, in vector-runahead mode:
//     vectorized into P copies (ALU op, gather, or branch predicate);
//   - anything else: left to the core as a scalar runahead operation
//     (sc_valid: the core executes the instruction it presented) and its
//     destination's flags cleared (loop-invariant).
// A vectorized instruction is then emitted as P micro-ops, one per cycle,
// copy c reading its sources from VRAT entry [reg][c] and getting a fresh
// physical vector register from the free list. Each copy takes an RDQ entry
// holding the register its destination replaces. Loop-invariant sources are
// read from the core's register file (sreg_val1/2: the core's values of
// in_uop.rs1/rs2, same cycle) when the instruction is accepted and
// broadcast to all lanes.
//
// Copy c of round r of the striding load covers loop iterations
// k = (r*P + c)*LANES + lane + 1 after the load's last address A0, so lane
// addresses are A0 + k*stride. While the detector entry's terminator was
// empty at the start of vector mode, every vectorized dependent load writes
// its PC there, leaving the last one. When it was not empty, issuing all
// copies of the terminator load raises ev_term_issued.
//
// Every micro-op carries the number of its round (rnd); the strided loads
// are the first micro-ops of a round, which the backend uses to start the
// round's lane masks in program order.
//
// Emitting one copy per cycle and the operand conventions are this design's
// choices; the document describes the routine as microprogrammed.
//
// Some outputs are copies of input fields by nature: term_value is the PC of
// the dependent load being decoded, and a micro-op keeps its instruction's
// PC, ALU function and immediate.
module vectorizer
  import vr_pkg::*;
#(
  parameter int unsigned P      = 8,
  parameter int unsigned U      = 8,
  parameter int unsigned NREGS  = NUM_AREGS,
  parameter int unsigned PREGS  = NUM_VREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // controller
  input  mode_e                    mode,
  input  logic                     in_round,
  input  logic                     more_rounds,
  input  logic                     draining,
  input  logic                     exit_pulse,
  // decoded instructions
  input  logic                     in_valid,
  input  sop_t                     in_uop,
  output logic                     in_ready,
  // stride detector lookup of in_uop.pc, and terminator update
  input  logic                     lk_striding,
  input  logic [ADDR_W-1:0]        lk_addr,
  input  logic [STRIDE_W-1:0]      lk_stride,
  input  logic [PC_W-1:0]          lk_term,
  output logic                     term_we,
  output logic [PC_W-1:0]          term_pc,
  output logic [PC_W-1:0]          term_value,
  // core scalar register values of in_uop.rs1 / rs2
  input  logic [XLEN-1:0]          sreg_val1,
  input  logic [XLEN-1:0]          sreg_val2,
  // the accepted instruction is a scalar runahead operation for the core
  output logic                     sc_valid,
  // vector micro-ops to the backend
  output logic                     vu_valid,
  output vuop_t                    vu_uop,
  input  logic                     vu_ready,
  // vector register free list
  input  logic                     fl_alloc_valid,
  input  logic [$clog2(PREGS)-1:0] fl_alloc_preg,
  output logic                     fl_alloc,
  // register deallocation queue
  output logic                     rdq_alloc,
  output logic                     rdq_has_free,
  output logic [$clog2(PREGS)-1:0] rdq_preg,
  input  logic [RDQ_IDX_W-1:0]     rdq_idx,
  input  logic                     rdq_full,
  input  logic                     rdq_empty,
  // events
  output logic                     ev_vec_start,
  output logic                     ev_same_load,
  output logic                     ev_term_issued,
  output logic                     ev_inst,
  output logic                     ev_stuck,
  output logic                     idle
);
  localparam int unsigned PW = $clog2(PREGS);
  localparam int unsigned CW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned RW = (U > 1) ? $clog2(U) : 1;

  typedef enum logic [1:0] { K_STRIDED, K_ALU, K_GATHER, K_BRANCH } vkind_e;

  // -------------------------------------------------------- held state
  logic          busy_q;
  logic [CW-1:0] copy_q;
  vkind_e        kind_q;
  sop_t          op_q;
  logic          t1_q, t2_q;            // sources are vectorized
  logic [XLEN-1:0] v1_q, v2_q;          // scalar source values
  logic          is_term_q;
  logic [PC_W-1:0]     spc_q;           // striding load of this interval
  logic [ADDR_W-1:0]   a0_q;
  logic [STRIDE_W-1:0] str_q;
  logic [PC_W-1:0]     term_q;
  logic                term_empty_q;
  logic [RW-1:0]       round_q;         // round of the striding load in op

  // -------------------------------------------------------- taint vector
  logic tv_rs1_vec, tv_rs1_inv, tv_rs2_vec, tv_rs2_inv;
  logic tv_we, tv_vec, tv_inv;

  taint_vector #(.NREGS(NREGS)) u_tv (
    .clk, .rst_n, .clear(exit_pulse),
    .rs1(in_uop.rs1), .rs2(in_uop.rs2),
    .rs1_vec(tv_rs1_vec), .rs1_inv(tv_rs1_inv),
    .rs2_vec(tv_rs2_vec), .rs2_inv(tv_rs2_inv),
    .we(tv_we), .rd(in_uop.rd), .rd_vec(tv_vec), .rd_inv(tv_inv)
  );

  // -------------------------------------------------------- VRAT
  logic [PW-1:0] vr_rs1, vr_rs2, vr_old;
  logic          vr_old_valid, vr_we;

  vrat #(.NREGS(NREGS), .P(P), .PREGS(PREGS)) u_vrat (
    .clk, .rst_n, .clear(exit_pulse),
    .copy(copy_q), .rs1(op_q.rs1), .rs2(op_q.rs2), .rd(op_q.rd),
    .rs1_preg(vr_rs1), .rs2_preg(vr_rs2), .rd_old(vr_old),
    .rd_old_valid(vr_old_valid), .we(vr_we), .rd_new(fl_alloc_preg)
  );

  // -------------------------------------------------------- classification
  logic active, accept, vmode, is_load, same, fresh, start, src_inv, src_vec;
  logic vectorize, discard_inv, scalar_op;

  assign active  = (mode == MODE_RUNAHEAD || mode == MODE_VECTOR) && !draining;
  assign in_ready = active && !busy_q && !exit_pulse;
  assign accept  = in_valid && in_ready;
  assign vmode   = (mode == MODE_VECTOR);
  assign is_load = (in_uop.op == SOP_LOAD);
  assign same    = vmode && is_load && (in_uop.pc == spc_q);
  assign fresh   = (mode == MODE_RUNAHEAD) && is_load && lk_striding;
  assign start   = fresh || (same && (!in_round || more_rounds));
  assign src_inv = (in_uop.use_rs1 && tv_rs1_inv) || (in_uop.use_rs2 && tv_rs2_inv);
  assign src_vec = (in_uop.use_rs1 && tv_rs1_vec) || (in_uop.use_rs2 && tv_rs2_vec);

  assign discard_inv = !start && !same &&
                       (in_uop.op == SOP_FP || in_uop.op == SOP_VEC || src_inv);
  assign vectorize   = start || (!same && !discard_inv && vmode && src_vec &&
                                 (in_uop.op == SOP_ALU || in_uop.op == SOP_LOAD ||
                                  in_uop.op == SOP_BRANCH));
  assign scalar_op   = !start && !same && !discard_inv && !vectorize &&
                       (in_uop.op == SOP_ALU || in_uop.op == SOP_LOAD ||
                        in_uop.op == SOP_BRANCH);

  always_comb begin
    tv_we  = 1'b0;
    tv_vec = 1'b0;
    tv_inv = 1'b0;
    if (accept && in_uop.writes_rd && in_uop.op != SOP_STORE &&
        in_uop.op != SOP_BRANCH && !(same && !start)) begin
      if (vectorize)        begin tv_we = 1'b1; tv_vec = 1'b1; end
      else if (discard_inv) begin tv_we = 1'b1; tv_inv = 1'b1; end
      else if (scalar_op)   begin tv_we = 1'b1; end
    end
  end

  assign sc_valid = accept && scalar_op;

  assign ev_vec_start = accept && fresh;
  assign ev_same_load = accept && same;
  assign ev_inst      = accept && vmode;

  // -------------------------------------------------------- emission
  logic writes, can_go, go, last_copy;

  assign writes    = (kind_q != K_BRANCH) && (kind_q == K_STRIDED || op_q.writes_rd);
  assign can_go    = vu_ready && !rdq_full && (!writes || fl_alloc_valid);
  assign go        = busy_q && can_go && !exit_pulse;
  assign last_copy = (32'(copy_q) == P - 1);
  assign ev_stuck  = busy_q && writes && !fl_alloc_valid && rdq_empty && !exit_pulse;
  assign idle      = !busy_q;

  assign vu_valid  = go;
  assign fl_alloc  = go && writes;
  assign vr_we     = go && writes;
  assign rdq_alloc = go;
  assign rdq_has_free = writes && vr_old_valid;
  assign rdq_preg  = vr_old;

  assign ev_term_issued = go && last_copy && is_term_q;

  assign term_we    = accept && vectorize && !start && is_load && term_empty_q;
  assign term_pc    = spc_q;
  assign term_value = in_uop.pc;

  // lane-0 address of copy c of the striding load
  logic [ADDR_W-1:0] k_first;
  assign k_first = {{(ADDR_W-32){1'b0}}, (32'(round_q) * P + 32'(copy_q)) * LANES + 32'd1};

  always_comb begin
    vu_uop           = '0;
    vu_uop.copy      = COPY_W'(copy_q);
    vu_uop.rnd       = RND_W'(round_q);
    vu_uop.fn        = op_q.fn;
    vu_uop.cond      = op_q.cond;
    vu_uop.pc        = op_q.pc;
    vu_uop.writes_pd = writes;
    vu_uop.pd        = VREG_W'(fl_alloc_preg);
    vu_uop.scale     = op_q.scale;
    vu_uop.rdq_idx   = rdq_idx;
    vu_uop.a.is_vec  = op_q.use_rs1 && t1_q;
    vu_uop.a.preg    = VREG_W'(vr_rs1);
    vu_uop.a.value   = op_q.use_rs1 ? v1_q : '0;
    vu_uop.b.is_vec  = op_q.use_rs2 && !op_q.use_imm && t2_q;
    vu_uop.b.preg    = VREG_W'(vr_rs2);
    vu_uop.b.value   = op_q.use_imm ? op_q.imm : (op_q.use_rs2 ? v2_q : '0);
    unique case (kind_q)
      K_STRIDED: begin
        vu_uop.op     = VOP_STRIDED;
        vu_uop.base   = a0_q + ADDR_W'($signed(k_first) *
                        $signed({{(ADDR_W-STRIDE_W){str_q[STRIDE_W-1]}}, str_q}));
        vu_uop.stride = str_q;
        vu_uop.a      = '0;
        vu_uop.b      = '0;
      end
      K_GATHER: begin
        vu_uop.op      = VOP_GATHER;
        vu_uop.imm     = op_q.imm;
        vu_uop.b.is_vec = op_q.use_rs2 && t2_q;
        vu_uop.b.value  = op_q.use_rs2 ? v2_q : '0;
      end
      K_BRANCH: vu_uop.op = VOP_BRANCH;
      default:  vu_uop.op = VOP_ALU;
    endcase
  end

  // -------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      copy_q       <= '0;
      kind_q       <= K_ALU;
      op_q         <= '0;
      t1_q         <= 1'b0;
      t2_q         <= 1'b0;
      v1_q         <= '0;
      v2_q         <= '0;
      is_term_q    <= 1'b0;
      spc_q        <= '0;
      a0_q         <= '0;
      str_q        <= '0;
      term_q       <= '0;
      term_empty_q <= 1'b0;
      round_q      <= '0;
    end else if (exit_pulse || ev_stuck) begin
      busy_q <= 1'b0;
      copy_q <= '0;
    end else begin
      if (accept && vectorize) begin
        busy_q    <= 1'b1;
        copy_q    <= '0;
        op_q      <= in_uop;
        t1_q      <= tv_rs1_vec;
        t2_q      <= tv_rs2_vec;
        v1_q      <= sreg_val1;
        v2_q      <= sreg_val2;
        is_term_q <= !start && is_load && !term_empty_q && (in_uop.pc == term_q);
        if (start)                       kind_q <= K_STRIDED;
        else if (is_load)                kind_q <= K_GATHER;
        else if (in_uop.op == SOP_BRANCH) kind_q <= K_BRANCH;
        else                             kind_q <= K_ALU;
        if (fresh) begin
          spc_q        <= in_uop.pc;
          a0_q         <= lk_addr;
          str_q        <= lk_stride;
          term_q       <= lk_term;
          term_empty_q <= (lk_term == '0);
          round_q      <= '0;
        end else if (start) begin
          round_q <= round_q + 1'b1;
        end
      end else if (go) begin
        copy_q <= copy_q + 1'b1;
        if (last_copy) begin
          busy_q <= 1'b0;
          copy_q <= '0;
        end
      end
    end
  end

endmodule
