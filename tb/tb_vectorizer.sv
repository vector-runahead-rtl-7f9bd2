// tb_vectorizer: self-checking test of the vectorizer.
//
// The free list and RDQ are modelled in the testbench (registers handed
// out in increasing order, RDQ indices counted). A short loop body is fed
// through: a striding load, dependent ALU ops, a dependent gather, a
// loop-invariant scalar op, an FP op and an op using its result, a store, a
// dependent branch, and the striding load again. The test checks the
// classification of each instruction, the P = 8 copies and their renaming
// through the VRAT (sources of copy c are destinations of copy c of the
// producer), the registers handed to the RDQ, the strided base addresses of
// rounds 0 and 1 and their round numbers, the terminator write, ev_term_issued, and that exit
// clears the taint vector.
module tb_vectorizer;
  import vr_pkg::*;
  localparam int P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode = MODE_RUNAHEAD;
  logic in_round = 0, more_rounds = 1, draining = 0, exit_pulse = 0;
  logic in_valid = 0, in_ready;
  sop_t in_uop;
  logic lk_striding = 0;
  logic [ADDR_W-1:0] lk_addr = 48'h1000;
  logic [STRIDE_W-1:0] lk_stride = 16'd8;
  logic [PC_W-1:0] lk_term = 0;
  logic term_we; logic [PC_W-1:0] term_pc, term_value;
  logic [63:0] sreg_val1, sreg_val2;
  logic sc_valid;
  logic vu_valid, vu_ready; vuop_t vu_uop;
  logic fl_alloc_valid, fl_alloc; logic [6:0] fl_alloc_preg;
  logic rdq_alloc, rdq_has_free, rdq_full, rdq_empty; logic [6:0] rdq_preg; logic [7:0] rdq_idx;
  logic ev_vec_start, ev_same_load, ev_term_issued, ev_inst, ev_stuck, idle;

  vectorizer #(.P(P), .U(16)) dut (.*);

  // scalar register file of the core: value = 0x100 * reg
  assign sreg_val1 = 64'h100 * in_uop.rs1;
  assign sreg_val2 = 64'h100 * in_uop.rs2;
  // free list and RDQ models
  logic [6:0] next_preg = 0;
  logic [7:0] next_idx = 0;
  assign fl_alloc_valid = 1;
  assign fl_alloc_preg  = next_preg;
  assign rdq_idx  = next_idx;
  assign rdq_full = 0;
  assign rdq_empty = 0;
  always @(negedge clk) vu_ready <= ($urandom_range(0, 3) != 0);

  vuop_t got[$]; logic got_hf[$]; logic [6:0] got_old[$];
  int n_sc = 0, n_term_we = 0, n_term_issued = 0, n_start = 0, n_same = 0;
  logic [PC_W-1:0] last_term_value;
  always @(posedge clk) begin
    if (vu_valid) begin got.push_back(vu_uop); got_hf.push_back(rdq_has_free); got_old.push_back(rdq_preg); end
    if (fl_alloc) next_preg <= (next_preg == 95) ? 0 : next_preg + 1;
    if (rdq_alloc) next_idx <= next_idx + 1;
    if (sc_valid) n_sc++;
    if (term_we) begin n_term_we++; last_term_value = term_value; end
    if (ev_term_issued) n_term_issued++;
    if (ev_vec_start) n_start++;
    if (ev_same_load) n_same++;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic sop_t mk(input logic [PC_W-1:0] pc, input sop_e op, input alu_fn_e fn,
                              input int rd, input int rs1, input int rs2, input bit u1, input bit u2,
                              input bit ui, input logic [63:0] imm);
    sop_t s; s = '0;
    s.pc = pc; s.op = op; s.fn = fn; s.rd = 4'(rd); s.rs1 = 4'(rs1); s.rs2 = 4'(rs2);
    s.use_rs1 = u1; s.use_rs2 = u2; s.use_imm = ui; s.imm = imm;
    s.writes_rd = (op != SOP_STORE && op != SOP_BRANCH); s.scale = 2'd3; s.cond = BR_NEZ;
    return s;
  endfunction

  task automatic feed(input sop_t s);
    @(negedge clk);
    in_uop = s; in_valid = 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
    // wait until the vectorizer is done with it
    while (!idle) @(posedge clk);
    #1;
  endtask

  // destinations of the last P copies, by copy
  logic [6:0] prev [string][P];
  task automatic expect_copies(input string name, input vop_e op, input int n0,
                               input string src_a, input string src_b, input string dst_old);
    check(got.size() == n0 + P, $sformatf("%s: %0d copies (got %0d)", name, P, got.size() - n0));
    if (got.size() != n0 + P) return;
    for (int c = 0; c < P; c++) begin
      vuop_t u; u = got[n0 + c];
      check(u.op == op && int'(u.copy) == c, $sformatf("%s copy %0d kind/order", name, c));
      if (src_a != "") check(u.a.is_vec && u.a.preg == prev[src_a][c], $sformatf("%s copy %0d src a", name, c));
      if (src_b != "") check(u.b.is_vec && u.b.preg == prev[src_b][c], $sformatf("%s copy %0d src b", name, c));
      if (dst_old != "") check(got_hf[n0 + c] && got_old[n0 + c] == prev[dst_old][c],
                               $sformatf("%s copy %0d frees old dest", name, c));
      else check(!got_hf[n0 + c], $sformatf("%s copy %0d frees nothing", name, c));
      prev[name][c] = u.pd;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    in_uop = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);

    // striding load r1 = [r0]
    lk_striding = 1; n0 = got.size();
    feed(mk(48'h400100, SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));
    lk_striding = 0;
    check(n_start == 1, "vector start event");
    expect_copies("r1", VOP_STRIDED, n0, "", "", "");
    for (int c = 0; c < P; c++)
      check(got[n0 + c].base == 48'h1000 + 48'((c * 8 + 1) * 8) && got[n0 + c].stride == 8 &&
            got[n0 + c].rnd == 0, $sformatf("round 0 copy %0d base and round", c));
    mode = MODE_VECTOR; in_round = 1;

    // r2 = r1 + 5 ; r2 = r2 ^ r5 (r5 loop-invariant)
    n0 = got.size();
    feed(mk(48'h400104, SOP_ALU, FN_ADD, 2, 1, 0, 1, 0, 1, 5));
    expect_copies("r2", VOP_ALU, n0, "r1", "", "");
    check(!got[n0].b.is_vec && got[n0].b.value == 5, "immediate operand");
    n0 = got.size();
    feed(mk(48'h400108, SOP_ALU, FN_XOR, 2, 2, 5, 1, 1, 0, 0));
    prev["r2old"] = prev["r2"];
    expect_copies("r2", VOP_ALU, n0, "r2old", "", "r2old");
    check(!got[n0].b.is_vec && got[n0].b.value == 64'h500, "scalar source broadcast");

    // gather r3 = [r4 + r2 << 3]
    n0 = got.size();
    feed(mk(48'h40010c, SOP_LOAD, FN_ADD, 3, 4, 2, 1, 1, 0, 64'h40));
    expect_copies("r3", VOP_GATHER, n0, "", "r2", "");
    check(!got[n0].a.is_vec && got[n0].a.value == 64'h400 && got[n0].imm == 64'h40, "gather base/disp");
    check(n_term_we == 1 && last_term_value == 48'h40010c, "terminator recorded");

    // scalar op r6 = r7 + 1 (no taint)
    n0 = got.size();
    feed(mk(48'h400110, SOP_ALU, FN_ADD, 6, 7, 0, 1, 0, 1, 1));
    check(n_sc == 1 && got.size() == n0, "loop-invariant op stays scalar");
    // FP op writes r8, then r9 = r8 + r1 is invalid, then r10 = r9 invalid too
    feed(mk(48'h400114, SOP_FP, FN_ADD, 8, 7, 0, 1, 0, 0, 0));
    feed(mk(48'h400118, SOP_ALU, FN_ADD, 9, 8, 1, 1, 1, 0, 0));
    feed(mk(48'h40011c, SOP_ALU, FN_MOV, 10, 9, 0, 1, 0, 0, 0));
    check(n_sc == 1 && got.size() == n0, "invalid ops discarded");
    // store
    feed(mk(48'h400120, SOP_STORE, FN_ADD, 0, 3, 2, 1, 1, 0, 0));
    check(n_sc == 1 && got.size() == n0, "store discarded");
    // dependent branch on r3
    feed(mk(48'h400124, SOP_BRANCH, FN_ADD, 0, 3, 0, 1, 0, 0, 0));
    expect_copies("br", VOP_BRANCH, n0, "r3", "", "");
    check(!got[n0].writes_pd, "branch writes no register");

    // striding load again: round 1
    n0 = got.size();
    feed(mk(48'h400100, SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));
    check(n_same == 1, "same-load event");
    prev["r1old"] = prev["r1"];
    expect_copies("r1", VOP_STRIDED, n0, "", "", "r1old");
    for (int c = 0; c < P; c++)
      check(got[n0 + c].base == 48'h1000 + 48'(((8 + c) * 8 + 1) * 8) && got[n0 + c].rnd == 1,
            $sformatf("round 1 copy %0d base and round", c));
    // last round over: the striding load is dropped
    more_rounds = 0; n0 = got.size();
    feed(mk(48'h400100, SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));
    check(n_same == 2 && got.size() == n0, "load dropped after last round");

    // exit clears the taint vector: r1 use is scalar again
    @(negedge clk); exit_pulse = 1; @(negedge clk); exit_pulse = 0;
    mode = MODE_RUNAHEAD; in_round = 0; more_rounds = 1;
    feed(mk(48'h400104, SOP_ALU, FN_ADD, 2, 1, 0, 1, 0, 1, 5));
    check(n_sc == 2, "taint cleared at exit");

    // known terminator: issuing its last copy raises ev_term_issued
    lk_term = 48'h40010c; lk_striding = 1;
    feed(mk(48'h400100, SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));
    lk_striding = 0; mode = MODE_VECTOR; in_round = 1;
    feed(mk(48'h400104, SOP_ALU, FN_ADD, 2, 1, 0, 1, 0, 1, 5));
    check(n_term_issued == 0, "no terminator yet");
    feed(mk(48'h40010c, SOP_LOAD, FN_ADD, 3, 4, 2, 1, 1, 0, 64'h40));
    check(n_term_issued == 1, "terminator issued");
    check(n_term_we == 1, "known terminator not overwritten");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
