// runahead_ctrl: mode controller of Vector Runahead.
//
// States (mode_e):
//   NORMAL   - ordinary execution. Runahead starts when a load miss blocks
//              the ROB head and either the ROB is full or the issue queue
//              holds at least 80% of its entries. The controller then saves
//              the fetch PC to resume from and the front-end RAT, and tells
//              the vector register free list to save its state.
//   RUNAHEAD - scalar runahead. It ends when the blocking load returns,
//              unless the vectorizer reports a decoded striding load
//              (ev_vec_start); then the controller records that load's PC,
//              its last address, stride and terminator, and enters VECTOR.
//   VECTOR   - vector-runahead mode, made of rounds. A round ends when
//              (1) the same striding load is decoded again, (2) the
//              terminator load has been issued, (3) every lane is invalid,
//              or (4) TIMEOUT instructions were handled in the round. The
//              blocking load's return does not end this mode. With U > P
//              there are U/P rounds: after (1) the same load opens the next
//              round at once; after (2)-(4) the next decode of the striding
//              load does. After the last round the controller waits until
//              the backend has sent every queued load, then exits.
//   EXIT     - one cycle: restore the RAT, redirect fetch to the saved PC,
//              clear the taint vector, VRAT and RDQ, restore the free list
//              and flush the vector backend; then NORMAL.
// ev_stuck (no vector register can be freed) also ends vector mode; this
// guard, the per-round timeout count and the meaning of "instruction" for
// the timeout (a decoded scalar instruction) are this design's choices.
module runahead_ctrl
  import vr_pkg::*;
#(
  parameter int unsigned U        = 8,
  parameter int unsigned P        = 8,
  parameter int unsigned TIMEOUT  = 200,
  parameter int unsigned IQ_SIZE  = 97,
  parameter int unsigned NREGS    = NUM_AREGS,
  parameter int unsigned SPREG_BITS = SPREG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core status
  input  logic                  head_load_miss,
  input  logic                  rob_full,
  input  logic [7:0]            iq_count,
  input  logic                  blocking_load_done,
  // checkpoint sources
  input  logic [PC_W-1:0]       ckpt_pc,
  input  logic [SPREG_BITS-1:0] rat_in [NREGS],
  // events from the vectorizer
  input  logic                  ev_vec_start,
  input  logic [PC_W-1:0]       ev_pc,
  input  logic [ADDR_W-1:0]     ev_addr,
  input  logic [STRIDE_W-1:0]   ev_stride,
  input  logic [PC_W-1:0]       ev_term,
  input  logic                  ev_same_load,
  input  logic                  ev_term_issued,
  input  logic                  ev_inst,
  input  logic                  ev_stuck,
  // backend status
  input  logic                  all_invalid,
  input  logic                  backend_idle,
  // mode and interval state
  output mode_e                 mode,
  output logic                  in_round,
  output logic                  more_rounds,
  output logic                  draining,
  output logic [$clog2(U)-1:0]  round_idx,
  output logic [PC_W-1:0]       stride_pc,
  output logic [ADDR_W-1:0]     stride_base,
  output logic [STRIDE_W-1:0]   stride_val,
  output logic [PC_W-1:0]       term_pc,
  output logic                  term_was_empty,
  output logic                  round_start,
  output logic                  enter_runahead,
  // restore
  output logic                  exit_pulse,
  output logic [PC_W-1:0]       restore_pc,
  output logic [SPREG_BITS-1:0] restore_rat [NREGS],
  // why the last round ended
  output term_e                 last_term
);
  localparam int unsigned ROUNDS = (U + P - 1) / P;
  localparam int unsigned RW     = $clog2(U);
  localparam int unsigned TW     = $clog2(TIMEOUT + 1);

  mode_e   mode_q;
  logic    in_round_q, drain_q;
  logic [RW-1:0] round_q;
  logic [TW-1:0] icnt_q;
  logic [SPREG_BITS-1:0] rat_q [NREGS];
  logic [PC_W-1:0] pc_q;

  logic entry_cond, timeout, round_end, last;
  term_e cause;

  assign entry_cond = head_load_miss &&
                      (rob_full || (32'(iq_count) * 5 >= IQ_SIZE * 4));
  assign timeout    = (icnt_q >= TW'(TIMEOUT));
  assign last       = (32'(round_q) + 1 >= ROUNDS);
  assign more_rounds = !last;

  always_comb begin
    cause = TERM_NONE;
    if (in_round_q && !drain_q) begin
      if (ev_same_load)        cause = TERM_SAME_LOAD;
      else if (ev_term_issued) cause = TERM_TERMINATOR;
      else if (all_invalid)    cause = TERM_ALL_INV;
      else if (timeout)        cause = TERM_TIMEOUT;
    end
    if (ev_stuck) cause = TERM_NO_VREGS;
  end
  assign round_end = (mode_q == MODE_VECTOR) && (cause != TERM_NONE);

  assign round_start = (mode_q == MODE_RUNAHEAD && ev_vec_start) ||
                       (mode_q == MODE_VECTOR && !drain_q && ev_same_load &&
                        (!in_round_q || !last) && cause != TERM_NO_VREGS);
  assign enter_runahead = (mode_q == MODE_NORMAL) && entry_cond;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q         <= MODE_NORMAL;
      in_round_q     <= 1'b0;
      drain_q        <= 1'b0;
      round_q        <= '0;
      icnt_q         <= '0;
      pc_q           <= '0;
      stride_pc      <= '0;
      stride_base    <= '0;
      stride_val     <= '0;
      term_pc        <= '0;
      term_was_empty <= 1'b0;
      last_term      <= TERM_NONE;
      for (int r = 0; r < NREGS; r++) rat_q[r] <= '0;
    end else begin
      unique case (mode_q)
        MODE_NORMAL: begin
          if (entry_cond) begin
            mode_q <= MODE_RUNAHEAD;
            pc_q   <= ckpt_pc;
            for (int r = 0; r < NREGS; r++) rat_q[r] <= rat_in[r];
          end
        end
        MODE_RUNAHEAD: begin
          if (ev_vec_start) begin
            mode_q         <= MODE_VECTOR;
            in_round_q     <= 1'b1;
            drain_q        <= 1'b0;
            round_q        <= '0;
            icnt_q         <= '0;
            stride_pc      <= ev_pc;
            stride_base    <= ev_addr;
            stride_val     <= ev_stride;
            term_pc        <= ev_term;
            term_was_empty <= (ev_term == '0);
          end else if (blocking_load_done) begin
            mode_q <= MODE_EXIT;
          end
        end
        MODE_VECTOR: begin
          if (ev_inst && in_round_q && !timeout) icnt_q <= icnt_q + 1'b1;
          if (round_end) begin
            last_term <= cause;
            if (last || cause == TERM_NO_VREGS) begin
              in_round_q <= 1'b0;
              drain_q    <= 1'b1;
            end else if (cause == TERM_SAME_LOAD) begin
              round_q <= round_q + 1'b1;   // this load opens the next round
              icnt_q  <= '0;
            end else begin
              in_round_q <= 1'b0;          // wait for the striding load
            end
          end else if (!in_round_q && !drain_q && ev_same_load) begin
            in_round_q <= 1'b1;
            round_q    <= round_q + 1'b1;
            icnt_q     <= '0;
          end
          if (drain_q && backend_idle) mode_q <= MODE_EXIT;
        end
        default: begin  // MODE_EXIT
          mode_q     <= MODE_NORMAL;
          in_round_q <= 1'b0;
          drain_q    <= 1'b0;
          round_q    <= '0;
          icnt_q     <= '0;
        end
      endcase
    end
  end

  assign mode        = mode_q;
  assign in_round    = in_round_q;
  assign draining    = drain_q;
  assign round_idx   = round_q;
  assign exit_pulse  = (mode_q == MODE_EXIT);
  assign restore_pc  = pc_q;
  always_comb for (int r = 0; r < NREGS; r++) restore_rat[r] = rat_q[r];

endmodule
