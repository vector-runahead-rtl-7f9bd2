// vector_runahead: the Vector Runahead additions to an out-of-order core.
//
// When a load miss blocks the ROB head and the window fills, the core runs
// ahead speculatively. As soon as a load that the stride detector trusts is
// decoded, the runahead stream is vectorized: that load and every
// instruction depending on it are issued as P pipelined copies of 8-lane
// vector operations, so the dependent loads of P x 8 future loop iterations
// go to memory together, level after level of the indirection chain. The
// mode lasts until the whole chain has been issued (U/P rounds), not merely
// until the blocking load returns; then the core restores its checkpoint.
//
// Blocks: stride_detector (reference prediction table), runahead_ctrl (mode
// FSM and checkpoint), vectorizer (taint vector, VRAT, micro-op generation),
// vreg_freelist and rdq (vector register allocation and release),
// vec_backend (vector queue, register file, ALU, strided/gather loads).
//
// The surrounding core is outside this block. Its interface:
//   head_load_miss, rob_full, iq_count, blocking_load_done - entry / exit;
//   ckpt_pc, rat_in                 - state saved on entry;
//   ld_valid/ld_pc/ld_addr          - executed loads that train the detector;
//   dec_valid/dec_uop/dec_ready     - decoded instructions during runahead;
//   sreg_val1/2                     - core register values of dec_uop.rs1
//                                     and rs2 (same cycle);
//   sc_valid                        - the accepted dec_uop is a scalar
//                                     runahead operation the core executes
//                                     itself (always possible);
//   vbr_valid/vbr_taken             - direction of a vectorized branch;
//   mem_req*/mem_rsp*               - one load lane per request, to the L1-D;
//   restore_valid/pc/rat            - end of runahead: restore and refetch.
// All of it is synchronous to clk; rst_n is an asynchronous active-low reset.
//
// rst_n is also used synchronously, but only to disable simulation
// assertions inside vec_backend, rdq and vreg_freelist; in the circuit it
// is an asynchronous reset only.
module vector_runahead
  import vr_pkg::*;
#(
  parameter int unsigned U           = 8,
  parameter int unsigned P           = 8,
  parameter int unsigned TIMEOUT     = 200,
  parameter int unsigned IQ_SIZE     = 97,
  parameter int unsigned RPT_ENTRIES = 32,
  parameter int unsigned RDQ_ENTRIES = 192,
  parameter int unsigned VREGS       = NUM_VREGS,
  parameter int unsigned VIQ_DEPTH   = 16,
  parameter int unsigned NSLOTS      = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // core status
  input  logic                   head_load_miss,
  input  logic                   rob_full,
  input  logic [7:0]             iq_count,
  input  logic                   blocking_load_done,
  input  logic [PC_W-1:0]        ckpt_pc,
  input  logic [SPREG_W-1:0]     rat_in [NUM_AREGS],
  // detector training
  input  logic                   ld_valid,
  input  logic [PC_W-1:0]        ld_pc,
  input  logic [ADDR_W-1:0]      ld_addr,
  // decoded runahead instructions
  input  logic                   dec_valid,
  input  sop_t                   dec_uop,
  output logic                   dec_ready,
  // scalar register values of dec_uop.rs1 / rs2
  input  logic [XLEN-1:0]        sreg_val1,
  input  logic [XLEN-1:0]        sreg_val2,
  // accepted instruction is a scalar runahead operation
  output logic                   sc_valid,
  // vectorized branch direction
  output logic                   vbr_valid,
  output logic                   vbr_taken,
  // memory
  output logic                   mem_req_valid,
  output mem_req_t               mem_req,
  input  logic                   mem_req_ready,
  input  logic                   mem_rsp_valid,
  input  mem_rsp_t               mem_rsp,
  // restore
  output logic                   restore_valid,
  output logic [PC_W-1:0]        restore_pc,
  output logic [SPREG_W-1:0]     restore_rat [NUM_AREGS],
  // status
  output mode_e                  mode,
  output logic                   round_start,
  output term_e                  last_term
);
  localparam int unsigned PW = $clog2(VREGS);

  // detector
  logic                lk_striding;
  logic [ADDR_W-1:0]   lk_addr;
  logic [STRIDE_W-1:0] lk_stride;
  logic [PC_W-1:0]     lk_term;
  logic                term_we;
  logic [PC_W-1:0]     term_pc, term_value;

  stride_detector #(.ENTRIES(RPT_ENTRIES)) u_rpt (
    .clk, .rst_n,
    .train_valid(ld_valid), .train_pc(ld_pc), .train_addr(ld_addr),
    .lookup_pc(dec_uop.pc), .lookup_striding(lk_striding),
    .lookup_addr(lk_addr), .lookup_stride(lk_stride), .lookup_term(lk_term),
    .term_we, .term_pc, .term_value
  );

  // controller
  logic ev_vec_start, ev_same_load, ev_term_issued, ev_inst, ev_stuck;
  logic all_invalid, be_idle, vz_idle, in_round, more_rounds, draining;
  logic exit_pulse, enter_runahead;

  runahead_ctrl #(.U(U), .P(P), .TIMEOUT(TIMEOUT), .IQ_SIZE(IQ_SIZE)) u_ctrl (
    .clk, .rst_n,
    .head_load_miss, .rob_full, .iq_count, .blocking_load_done,
    .ckpt_pc, .rat_in,
    .ev_vec_start, .ev_pc(dec_uop.pc), .ev_addr(lk_addr), .ev_stride(lk_stride),
    .ev_term(lk_term), .ev_same_load, .ev_term_issued, .ev_inst, .ev_stuck,
    .all_invalid, .backend_idle(be_idle && vz_idle),
    .mode, .in_round, .more_rounds, .draining, .round_idx(),
    // the vectorizer takes the striding load's fields from the detector
    .stride_pc(), .stride_base(), .stride_val(), .term_pc(), .term_was_empty(),
    .round_start, .enter_runahead,
    .exit_pulse, .restore_pc, .restore_rat, .last_term
  );

  // register allocation
  logic          fl_alloc_valid, fl_alloc, fl_free;
  logic [PW-1:0] fl_alloc_preg, fl_free_preg;
  logic          rdq_alloc, rdq_has_free, rdq_full, rdq_empty;
  logic [PW-1:0] rdq_preg;
  logic [RDQ_IDX_W-1:0] rdq_idx, exec_idx;
  logic          exec_valid;

  vreg_freelist #(.PREGS(VREGS)) u_fl (
    .clk, .rst_n,
    .alloc_valid(fl_alloc_valid), .alloc_preg(fl_alloc_preg), .alloc(fl_alloc),
    .free(fl_free), .free_preg(fl_free_preg),
    .checkpoint(enter_runahead), .restore(exit_pulse), .num_free()
  );

  rdq #(.ENTRIES(RDQ_ENTRIES), .PREGS(VREGS)) u_rdq (
    .clk, .rst_n, .clear(exit_pulse),
    .alloc(rdq_alloc), .alloc_has_free(rdq_has_free), .alloc_preg(rdq_preg),
    .alloc_idx(rdq_idx), .full(rdq_full), .empty(rdq_empty),
    .exec_valid, .exec_idx,
    .free_valid(fl_free), .free_preg(fl_free_preg)
  );

  // vectorizer
  logic  vu_valid, vu_ready;
  vuop_t vu_uop;

  vectorizer #(.P(P), .U(U), .PREGS(VREGS)) u_vz (
    .clk, .rst_n,
    .mode, .in_round, .more_rounds, .draining, .exit_pulse,
    .in_valid(dec_valid), .in_uop(dec_uop), .in_ready(dec_ready),
    .lk_striding, .lk_addr, .lk_stride, .lk_term,
    .term_we, .term_pc, .term_value,
    .sreg_val1, .sreg_val2,
    .sc_valid,
    .vu_valid, .vu_uop, .vu_ready,
    .fl_alloc_valid, .fl_alloc_preg, .fl_alloc,
    .rdq_alloc, .rdq_has_free, .rdq_preg, .rdq_idx, .rdq_full, .rdq_empty,
    .ev_vec_start, .ev_same_load, .ev_term_issued, .ev_inst, .ev_stuck,
    .idle(vz_idle)
  );

  // vector execution
  vec_backend #(.IQ_DEPTH(VIQ_DEPTH), .NSLOTS(NSLOTS), .PCOPIES(P), .PREGS(VREGS)) u_be (
    .clk, .rst_n, .flush(exit_pulse),
    .in_valid(vu_valid), .in_uop(vu_uop), .in_ready(vu_ready),
    .exec_valid, .exec_rdq_idx(exec_idx),
    .br_valid(vbr_valid), .br_taken(vbr_taken),
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp,
    .all_invalid, .idle(be_idle)
  );

  assign restore_valid = exit_pulse;

endmodule
