// tb_runahead_ctrl: self-checking test of the runahead mode controller.
//
// Drives the core status and the vectorizer events directly, with U = 16
// and P = 8 (two rounds), and checks: the two entry conditions (full ROB;
// issue queue at 80% of 97 entries, i.e. 78 but not 77), checkpoint and
// restore of PC and RAT, exit of scalar runahead on the blocking load's
// return, entry into vector mode, that the blocking load's return is then
// ignored, the four round-ending conditions (same striding load,
// terminator, all lanes invalid, 200-instruction timeout exactly), the
// second round opened by the striding load, and draining before exit.
module tb_runahead_ctrl;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic head_load_miss = 0, rob_full = 0, blocking_load_done = 0;
  logic [7:0] iq_count = 0;
  logic [PC_W-1:0] ckpt_pc = 0, ev_pc = 0, ev_term = 0;
  logic [SPREG_W-1:0] rat_in [NUM_AREGS];
  logic ev_vec_start = 0, ev_same_load = 0, ev_term_issued = 0, ev_inst = 0, ev_stuck = 0;
  logic [ADDR_W-1:0] ev_addr = 0;
  logic [STRIDE_W-1:0] ev_stride = 0;
  logic all_invalid = 0, backend_idle = 1;
  mode_e mode;
  logic in_round, more_rounds, draining, round_start, enter_runahead, exit_pulse, term_was_empty;
  logic [3:0] round_idx;
  logic [PC_W-1:0] stride_pc, term_pc, restore_pc;
  logic [ADDR_W-1:0] stride_base;
  logic [STRIDE_W-1:0] stride_val;
  logic [SPREG_W-1:0] restore_rat [NUM_AREGS];
  term_e last_term;

  runahead_ctrl #(.U(16), .P(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (mode=%0d)", what, mode); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic pulse(ref logic sig); sig = 1; #0; endtask

  task automatic enter(input int how);
    head_load_miss = 1;
    if (how == 0) rob_full = 1; else iq_count = 78;
    ckpt_pc = PC_W'($urandom);
    for (int r = 0; r < NUM_AREGS; r++) rat_in[r] = SPREG_W'($urandom_range(0, 179));
    #1 check(enter_runahead, "entry condition");
    tick();
    head_load_miss = 0; rob_full = 0; iq_count = 0;
    check(mode == MODE_RUNAHEAD, "in runahead");
  endtask
  task automatic start_vec(input logic [PC_W-1:0] term);
    ev_vec_start = 1; ev_pc = 48'h400100; ev_addr = 48'h9000; ev_stride = 8; ev_term = term;
    #1 check(round_start, "round_start on vector entry");
    tick(); ev_vec_start = 0;
    check(mode == MODE_VECTOR && in_round && round_idx == 0, "vector mode, round 0");
    check(stride_pc == 48'h400100 && stride_base == 48'h9000 && stride_val == 8, "interval state");
    check(term_was_empty == (term == 0), "terminator empty flag");
  endtask
  task automatic finish_exit(input logic [PC_W-1:0] pc, input logic [SPREG_W-1:0] rat [NUM_AREGS]);
    bit ok = 1;
    check(draining && mode == MODE_VECTOR, "draining");
    backend_idle = 0; tick(); tick();
    check(mode == MODE_VECTOR, "waits for backend");
    backend_idle = 1; tick();
    check(mode == MODE_EXIT && exit_pulse, "exit");
    check(restore_pc == pc, "restore pc");
    for (int r = 0; r < NUM_AREGS; r++) if (restore_rat[r] != rat[r]) ok = 0;
    check(ok, "restore rat");
    tick();
    check(mode == MODE_NORMAL, "back to normal");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SPREG_W-1:0] rat [NUM_AREGS];
    logic [PC_W-1:0] pc;
    for (int r = 0; r < NUM_AREGS; r++) rat_in[r] = 0;
    repeat (2) @(posedge clk); rst_n = 1; tick();
    check(mode == MODE_NORMAL, "reset mode");
    // no entry without a blocking load, or with IQ at 77
    rob_full = 1; #1 check(!enter_runahead, "no entry without load miss"); rob_full = 0;
    head_load_miss = 1; iq_count = 77; #1 check(!enter_runahead, "no entry at IQ 77");
    head_load_miss = 0; iq_count = 0; tick();

    // 1: scalar runahead ends on the blocking load
    enter(1); pc = ckpt_pc; rat = rat_in;
    ckpt_pc = 0; tick(); tick();
    blocking_load_done = 1; tick(); blocking_load_done = 0;
    check(mode == MODE_EXIT && restore_pc == pc, "exit on blocking load return");
    tick(); check(mode == MODE_NORMAL, "normal again");

    // 2: two rounds, both ended by the same striding load
    enter(0); pc = ckpt_pc; rat = rat_in;
    start_vec(0);
    blocking_load_done = 1; tick(); blocking_load_done = 0;
    check(mode == MODE_VECTOR, "blocking load return ignored in vector mode");
    ev_same_load = 1; #1 check(round_start && more_rounds, "same load opens round 1");
    tick(); ev_same_load = 0;
    check(in_round && round_idx == 1 && last_term == TERM_SAME_LOAD, "round 1");
    ev_same_load = 1; #1 check(!round_start && !more_rounds, "last round: no new round");
    tick(); ev_same_load = 0;
    finish_exit(pc, rat);

    // 3: terminator ends round 0, striding load reopens round 1, timeout ends it
    enter(0); pc = ckpt_pc; rat = rat_in;
    start_vec(48'h400180);
    ev_term_issued = 1; tick(); ev_term_issued = 0;
    check(!in_round && !draining && last_term == TERM_TERMINATOR, "terminator ends round 0");
    ev_inst = 1; tick(); tick(); ev_inst = 0;   // instructions between rounds
    ev_same_load = 1; #1 check(round_start, "striding load reopens");
    tick(); ev_same_load = 0;
    check(in_round && round_idx == 1, "round 1 after wait");
    ev_inst = 1;
    repeat (199) tick();
    check(!draining, "no timeout after 199");
    tick();
    #1 check(!draining, "timeout seen at 200");
    tick(); ev_inst = 0;
    check(draining && last_term == TERM_TIMEOUT, "timeout ends last round");
    finish_exit(pc, rat);

    // 4: all lanes invalid, then stuck
    enter(0); pc = ckpt_pc; rat = rat_in;
    start_vec(0);
    all_invalid = 1; tick(); all_invalid = 0;
    check(!in_round && last_term == TERM_ALL_INV, "all-invalid ends round 0");
    ev_same_load = 1; tick(); ev_same_load = 0;
    ev_stuck = 1; tick(); ev_stuck = 0;
    check(draining && last_term == TERM_NO_VREGS, "stuck ends vector mode");
    finish_exit(pc, rat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
