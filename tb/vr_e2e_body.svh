// vr_e2e_body.svh: body shared by the end-to-end testbenches of
// vector_runahead. The including module declares localparams U_TB and P_TB
// and instantiates the DUT as "dut" with matching parameters. It also
// defines end_test(), which prints the result line and ends the simulation.
//
// A small core model surrounds the DUT. It trains the stride detector with
// executed instances of a striding load, stalls the ROB (full ROB or an
// issue queue at 80%) to start runahead, then fetches the loop body of a
// program again and again into dec_*, executes the scalar runahead
// operations the DUT hands back, and restores its registers when the DUT
// signals the end of runahead. A behavioural memory with 24 MSHRs answers
// each lane after MEM_LAT cycles with data memf(addr).
//
// Programs (loop bodies):
//   P1: A[i] striding load, a multiply/shift/mask hash, gather B, xor/mask,
//       gather C (the chain's last load), a store, an FP op and an op using
//       its result, and the loop branch. For iteration k after the trained
//       address A0: a = A0 + 8(k+1), b = BBASE + 8*(((memf(a)*K) >> 16) & 0xfff),
//       c = CBASE + 8*((memf(b) ^ memf(a)) & 0x3ff).
//   P2: loads at untrained PCs only (plain scalar runahead).
//   P3: the striding load followed by 220 dependent adds (timeout).
//   P4: P1 with a branch on (memf(b) & 1) before gather C.
// Episodes: E1 P1 (full ROB; terminator not yet known), E2 P1 (issue queue
// at 80%; terminator known), E3 P2 (ends on the blocking load's return),
// E4 P1 with every A lane invalid, E5 P3, E6 P4. The test checks the
// complete set of addresses sent for E1, E2 and E6 against the formulas
// above, the restored PC each time, and counts every mechanism.

  import vr_pkg::*;
  localparam int ROUNDS = (U_TB + P_TB - 1) / P_TB;
  localparam int NITER  = ROUNDS * P_TB * 8;      // iterations covered
  localparam logic [47:0] PC0   = 48'h400100;
  localparam logic [47:0] ABASE = 48'h0080_0000;
  localparam logic [63:0] BBASE = 64'h0100_0000;
  localparam logic [63:0] CBASE = 64'h0200_0000;
  localparam logic [63:0] HK    = 64'h45d9f3b;
  localparam int MEM_LAT = 40;
  localparam int MSHRS   = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic head_load_miss = 0, rob_full = 0, blocking_load_done = 0;
  logic [7:0] iq_count = 0;
  logic [PC_W-1:0] ckpt_pc = 0;
  logic [SPREG_W-1:0] rat_in [NUM_AREGS];
  logic ld_valid = 0;
  logic [PC_W-1:0] ld_pc = 0;
  logic [ADDR_W-1:0] ld_addr = 0;
  logic dec_valid = 0, dec_ready;
  sop_t dec_uop;
  logic [63:0] sreg_val1, sreg_val2;
  logic sc_valid;
  logic vbr_valid, vbr_taken;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req; mem_rsp_t mem_rsp;
  logic restore_valid;
  logic [PC_W-1:0] restore_pc;
  logic [SPREG_W-1:0] restore_rat [NUM_AREGS];
  mode_e mode; logic round_start; term_e last_term;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic logic [63:0] memf(input logic [47:0] a);
    logic [63:0] x;
    x = 64'(a) * 64'h9E3779B97F4A7C15;
    return x ^ (x >> 29);
  endfunction

  // ---------------- memory with MSHR limit
  typedef struct { logic [47:0] addr; logic [7:0] tag; int due; } pend_t;
  pend_t pend[$];
  logic [47:0] err_lo = 0, err_hi = 0;
  int req_seen [logic [47:0]];
  int n_mshr_full = 0, max_out = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin
      pend.push_back('{mem_req.addr, mem_req.tag, cycle + MEM_LAT});
      if (req_seen.exists(mem_req.addr)) req_seen[mem_req.addr]++;
      else req_seen[mem_req.addr] = 1;
    end
    if (mem_req_valid && !mem_req_ready) n_mshr_full++;
  end
  always @(negedge clk) begin
    mem_rsp_valid <= 1'b0;
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= cycle) begin
        mem_rsp_valid <= 1'b1;
        mem_rsp.tag   <= pend[i].tag;
        mem_rsp.data  <= memf(pend[i].addr);
        mem_rsp.err   <= (pend[i].addr >= err_lo) && (pend[i].addr < err_hi);
        pend.delete(i);
        break;
      end
    if (pend.size() > max_out) max_out = pend.size();
    mem_req_ready <= (pend.size() < MSHRS - 1);
  end

  // ---------------- core registers and scalar execution
  logic [63:0] regs [16];
  logic [63:0] saved [16];
  assign sreg_val1 = regs[dec_uop.rs1];
  assign sreg_val2 = regs[dec_uop.rs2];
  function automatic logic [63:0] alu(input alu_fn_e fn, input logic [63:0] a, input logic [63:0] b);
    case (fn)
      FN_ADD: return a + b;  FN_SUB: return a - b;  FN_AND: return a & b;
      FN_OR:  return a | b;  FN_XOR: return a ^ b;  FN_SHL: return a << b[5:0];
      FN_SHR: return a >> b[5:0];  FN_SAR: return 64'($signed(a) >>> b[5:0]);
      FN_MUL: return a * b;  default: return a;
    endcase
  endfunction
  int n_scalar_ops = 0;
  always @(posedge clk) if (rst_n && sc_valid) begin
    logic [63:0] a, b;
    n_scalar_ops++;
    a = dec_uop.use_rs1 ? regs[dec_uop.rs1] : 0;
    b = dec_uop.use_imm ? dec_uop.imm : (dec_uop.use_rs2 ? regs[dec_uop.rs2] : 0);
    if (dec_uop.op == SOP_ALU && dec_uop.writes_rd) regs[dec_uop.rd] <= alu(dec_uop.fn, a, b);
    if (dec_uop.op == SOP_LOAD && dec_uop.writes_rd)
      regs[dec_uop.rd] <= memf(48'(a + (regs[dec_uop.rs2] << dec_uop.scale) + dec_uop.imm));
  end

  // ---------------- programs
  sop_t prog [$];
  function automatic sop_t I(input sop_e op, input alu_fn_e fn, input int rd, input int rs1,
                             input int rs2, input bit u1, input bit u2, input bit ui,
                             input logic [63:0] imm, input logic [1:0] scale = 0);
    sop_t s; s = '0;
    s.op = op; s.fn = fn; s.rd = 4'(rd); s.rs1 = 4'(rs1); s.rs2 = 4'(rs2);
    s.use_rs1 = u1; s.use_rs2 = u2; s.use_imm = ui; s.imm = imm; s.scale = scale;
    s.writes_rd = (op != SOP_STORE && op != SOP_BRANCH); s.cond = BR_NEZ;
    return s;
  endfunction
  task automatic build(input int which);
    prog.delete();
    if (which == 2) begin
      prog.push_back(I(SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));
      prog.push_back(I(SOP_ALU, FN_ADD, 0, 0, 0, 1, 0, 1, 64));
      prog.push_back(I(SOP_LOAD, FN_ADD, 3, 4, 1, 1, 1, 0, 0, 2'd3));
      prog.push_back(I(SOP_BRANCH, FN_ADD, 0, 0, 0, 1, 0, 0, 0));
      foreach (prog[i]) prog[i].pc = 48'h500008 + 48'(4 * i);  // detector index 2.. (untrained)
      return;
    end
    prog.push_back(I(SOP_LOAD, FN_ADD, 1, 0, 0, 1, 0, 0, 0));             // r1 = A[i]
    if (which == 3) begin
      prog.push_back(I(SOP_ALU, FN_ADD, 2, 1, 0, 1, 0, 1, 1));
      for (int i = 0; i < 219; i++) prog.push_back(I(SOP_ALU, FN_ADD, 2, 2, 0, 1, 0, 1, 1));
    end else begin
      prog.push_back(I(SOP_ALU, FN_ADD, 0, 0, 0, 1, 0, 1, 8));           // i++
      prog.push_back(I(SOP_ALU, FN_MUL, 2, 1, 0, 1, 0, 1, HK));          // hash
      prog.push_back(I(SOP_ALU, FN_SHR, 2, 2, 0, 1, 0, 1, 16));
      prog.push_back(I(SOP_ALU, FN_AND, 2, 2, 0, 1, 0, 1, 64'hfff));
      prog.push_back(I(SOP_LOAD, FN_ADD, 3, 4, 2, 1, 1, 0, 0, 2'd3));    // r3 = B[h]
      prog.push_back(I(SOP_ALU, FN_XOR, 5, 3, 1, 1, 1, 0, 0));
      prog.push_back(I(SOP_ALU, FN_AND, 5, 5, 0, 1, 0, 1, 64'h3ff));
      if (which == 4) begin
        prog.push_back(I(SOP_ALU, FN_AND, 10, 3, 0, 1, 0, 1, 1));
        prog.push_back(I(SOP_BRANCH, FN_ADD, 0, 10, 0, 1, 0, 0, 0));     // divergent
      end
      prog.push_back(I(SOP_LOAD, FN_ADD, 6, 7, 5, 1, 1, 0, 0, 2'd3));    // r6 = C[..]
      prog.push_back(I(SOP_STORE, FN_ADD, 0, 8, 6, 1, 1, 0, 0));
      prog.push_back(I(SOP_FP, FN_ADD, 11, 1, 0, 1, 0, 0, 0));
      prog.push_back(I(SOP_ALU, FN_ADD, 12, 11, 1, 1, 1, 0, 0));
      prog.push_back(I(SOP_ALU, FN_SUB, 13, 0, 9, 1, 1, 0, 0));
      prog.push_back(I(SOP_BRANCH, FN_ADD, 0, 13, 0, 1, 0, 0, 0));      // loop
    end
    foreach (prog[i]) prog[i].pc = PC0 + 48'(4 * i);
  endtask

  // ---------------- fetch
  int fp = 0;
  bit fetching = 0;
  always @(negedge clk) begin
    if (fetching && (mode == MODE_RUNAHEAD || mode == MODE_VECTOR) && prog.size() > 0) begin
      dec_valid <= 1'b1;
      dec_uop   <= prog[fp];
    end else dec_valid <= 1'b0;
  end
  always @(posedge clk) if (dec_valid && dec_ready) fp <= (fp + 1) % prog.size();

  // ---------------- mechanism counters
  int n_entry_rob = 0, n_entry_iq = 0, n_scalar_exit = 0, n_vec_entry = 0, n_rounds = 0;
  int n_same = 0, n_term = 0, n_allinv = 0, n_timeout = 0, n_ignored_return = 0;
  int n_gather = 0, n_strided = 0, n_valu = 0, n_vbranch = 0, n_rdq_free = 0;
  int n_discard = 0, n_restore = 0, n_masked_lanes = 0;
  mode_e prev_mode = MODE_NORMAL;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.round_end) begin
      case (dut.u_ctrl.cause)
        TERM_SAME_LOAD:  n_same++;
        TERM_TERMINATOR: n_term++;
        TERM_ALL_INV:    n_allinv++;
        TERM_TIMEOUT:    n_timeout++;
        default: ;
      endcase
    end
    if (round_start) n_rounds++;
    if (dut.u_vz.ev_vec_start) n_vec_entry++;
    if (dut.u_vz.vu_valid) case (dut.u_vz.vu_uop.op)
      VOP_GATHER: n_gather++;  VOP_STRIDED: n_strided++;
      VOP_ALU: n_valu++;       default: n_vbranch++;
    endcase
    if (dut.u_rdq.free_valid) n_rdq_free++;
    if (dut.u_vz.accept && dut.u_vz.discard_inv) n_discard++;
    if (mode == MODE_VECTOR && blocking_load_done) n_ignored_return++;
    if (mode == MODE_RUNAHEAD && blocking_load_done) n_scalar_exit++;
    if (restore_valid) n_restore++;
    prev_mode <= mode;
  end

  // ---------------- episodes
  logic [47:0] a0;
  task automatic train();
    // six executed instances of the striding load, stride 8
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); ld_valid = 1; ld_pc = PC0; ld_addr = ABASE + 48'(8 * k);
    end
    @(negedge clk); ld_valid = 0;
    a0 = ABASE + 48'(8 * 5);
  endtask

  task automatic init_regs();
    for (int r = 0; r < 16; r++) regs[r] = 0;
    regs[0] = 64'(a0) + 8; regs[4] = BBASE; regs[7] = CBASE; regs[8] = 64'h0300_0000;
    regs[9] = 64'hFFFF_0000;
  endtask

  task automatic episode(input int prog_id, input bit via_iq, input int return_after);
    int t;
    build(prog_id);
    req_seen.delete();
    fp = 0;
    for (int r = 0; r < 16; r++) saved[r] = regs[r];
    @(negedge clk);
    head_load_miss = 1; ckpt_pc = PC0 + 48'h1000 * 48'(prog_id);
    if (via_iq) iq_count = 8'd78; else rob_full = 1;
    @(negedge clk);
    check(mode == MODE_RUNAHEAD, "runahead entered");
    if (via_iq) n_entry_iq++; else n_entry_rob++;
    head_load_miss = 0; rob_full = 0; iq_count = 0;
    fetching = 1;
    t = 0;
    while (!restore_valid && t < 60000) begin
      @(negedge clk); t++;
      blocking_load_done = (t == return_after);
    end
    blocking_load_done = 0;
    check(restore_valid && restore_pc == ckpt_pc, "restore with checkpoint PC");
    fetching = 0;
    @(negedge clk);
    check(mode == MODE_NORMAL, "normal mode after runahead");
    for (int r = 0; r < 16; r++) regs[r] = saved[r];
    // let outstanding prefetches finish
    repeat (MEM_LAT + 30) @(negedge clk);
  endtask

  function automatic logic [47:0] addr_a(input int k); return a0 + 48'(8 * (k + 1)); endfunction
  function automatic logic [47:0] addr_b(input int k);
    return 48'(BBASE + 8 * (((memf(addr_a(k)) * HK) >> 16) & 64'hfff));
  endfunction
  function automatic logic [47:0] addr_c(input int k);
    return 48'(CBASE + 8 * ((memf(addr_b(k)) ^ memf(addr_a(k))) & 64'h3ff));
  endfunction

  task automatic check_chain(input string ep, input bit branchy);
    int exp [logic [47:0]];
    int missing = 0, extra = 0;
    for (int k = 0; k < NITER; k++) begin
      bit keep_c;
      exp[addr_a(k)] = 1; exp[addr_b(k)] = 1;
      keep_c = 1;
      if (branchy) keep_c = (memf(addr_b(k)) & 1) == (memf(addr_b(k - k % 8)) & 1);
      if (keep_c) exp[addr_c(k)] = 1;
      else n_masked_lanes++;
    end
    foreach (exp[a]) if (!req_seen.exists(a)) missing++;
    foreach (req_seen[a]) if (!exp.exists(a)) extra++;
    check(missing == 0, $sformatf("%s: %0d expected prefetch addresses missing", ep, missing));
    check(extra == 0, $sformatf("%s: %0d unexpected addresses", ep, extra));
    check(req_seen.size() > 0, $sformatf("%s: prefetches issued", ep));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    end_test();
  end

  initial begin
    int g0, s0;
    for (int r = 0; r < NUM_AREGS; r++) rat_in[r] = SPREG_W'(r + 1);
    dec_uop = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    train(); init_regs();

    // E1: full ROB, terminator unknown: round ended by the same striding load
    g0 = n_gather; s0 = n_strided;
    episode(1, 0, 20);
    check_chain("E1", 0);
    check(n_strided - s0 == ROUNDS * P_TB, "E1: P strided loads per round");
    check(n_gather - g0 == 2 * ROUNDS * P_TB, "E1: two gathers per copy");
    check(restore_rat[3] == SPREG_W'(4), "RAT checkpoint restored");
    // E2: issue queue at 80%, terminator known
    episode(1, 1, 20);
    check_chain("E2", 0);
    // E3: no striding load: scalar runahead until the blocking load returns
    g0 = n_vec_entry;
    episode(2, 0, 50);
    check(n_vec_entry == g0, "E3: no vector mode");
    check(n_scalar_exit == 1, "E3: exit on blocking-load return");
    // E4: every A lane invalid
    err_lo = addr_a(0); err_hi = addr_a(NITER);
    episode(1, 0, 20);
    err_lo = 0; err_hi = 0;
    // E5: long dependent chain: timeout
    episode(3, 0, 20);
    // E6: divergent branch masks lanes of gather C
    episode(4, 1, 20);
    check_chain("E6", 1);

    // every mechanism must have happened
    check(n_entry_rob > 0, "entry by full ROB");
    check(n_entry_iq > 0, "entry by issue queue at 80%");
    check(n_scalar_exit > 0, "scalar runahead ended by blocking load");
    check(n_vec_entry > 0, "vector-runahead entry");
    check(n_ignored_return > 0, "blocking load return ignored in vector mode");
    check(n_same > 0, "termination: same striding load");
    check(n_term > 0, "termination: terminator issued");
    // With P = 1 a round (8 lanes) ends at the next striding load before
    // the invalid responses of its lanes return, so all-invalid cannot win.
    if (P_TB > 1) check(n_allinv > 0, "termination: all lanes invalid");
    check(n_timeout > 0, "termination: timeout");
    check(n_rounds >= 5 * ROUNDS, "one round_start per round");
    check(n_gather > 0 && n_strided > 0 && n_valu > 0, "vector loads, gathers and ALU ops");
    check(n_vbranch > 0 && n_masked_lanes > 0, "vector branch masking");
    check(n_rdq_free > 0, "RDQ released registers");
    check(n_discard > 0, "invalid instructions discarded");
    check(n_scalar_ops > 0, "scalar runahead operations");
    // 8*P lanes per level: only with P >= 4 can one level fill the MSHRs.
    if (P_TB >= 4) check(n_mshr_full > 0, "MSHR-full stalls");
    check(n_restore == 6, $sformatf("checkpoint restored after each episode (%0d)", n_restore));
    if (P_TB >= 4) check(max_out >= MSHRS - 1, "memory-level parallelism reaches the MSHR count");
    else check(max_out < MSHRS - 1, "without pipelining the MSHRs are never all busy");
    $display("mechanisms: rob=%0d iq=%0d scalar_exit=%0d vec=%0d rounds=%0d same=%0d term=%0d allinv=%0d timeout=%0d",
             n_entry_rob, n_entry_iq, n_scalar_exit, n_vec_entry, n_rounds, n_same, n_term, n_allinv, n_timeout);
    $display("  strided=%0d gather=%0d alu=%0d branch=%0d rdq_free=%0d discard=%0d scalar=%0d mshr_full=%0d max_out=%0d masked=%0d",
             n_strided, n_gather, n_valu, n_vbranch, n_rdq_free, n_discard, n_scalar_ops, n_mshr_full, max_out, n_masked_lanes);
    end_test();
  end
