// tb_vector_runahead_chains: runs the indirect-chain shapes of common
// memory-bound kernels through vector_runahead at its default parameters
// (U = P = 8: 64 loop iterations per interval).
//
// Each kernel is a loop whose striding load A[i] starts a chain of D-1
// dependent loads; level j reads BASE_j + 8*idx, where idx is the previous
// level's value either masked (idx = v & 0xfff, as in a histogram or an
// edge-list walk) or hashed first (idx = ((v*K) >> 16) & 0xfff, as in a
// hash-table probe):
//   K0: D = 2, masked  (integer-sort / sparse-gather style)
//   K1: D = 3, hashed  (two dependent hash probes)
//   K2: D = 4, masked  (graph traversal style)
//   K3: D = 5, hashed  (deep hash-join style chain)
// A small core model trains the stride detector, stalls the ROB to enter
// runahead, fetches the loop body repeatedly, executes the scalar runahead
// operations and restores its registers at the end. The memory answers each
// lane after 40 cycles from a fixed function of the address, with 24 MSHRs.
//
// Each kernel runs twice: first with its terminator unknown (the interval
// ends when the striding load comes around again), then with the learned
// terminator (it ends when the last load of the chain has been issued).
// Both times the complete set of requested addresses must equal the
// closed-form set for iterations 1..64 of every level, the exit cause must
// be the expected one, and the number of gathers must be (D-1) x 8.
// The kernel shapes are this testbench's own; the lengths follow the chain
// depths of typical pointer-chasing workloads.
module tb_vector_runahead_chains;
  import vr_pkg::*;
  localparam int NITER   = 64;
  localparam int MEM_LAT = 40;
  localparam int MSHRS   = 24;
  localparam logic [63:0] HK    = 64'h45d9f3b;
  localparam logic [63:0] MASK  = 64'hfff;

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

  vector_runahead dut (.*);

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
  int req_seen [logic [47:0]];
  always_ff @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    pend.push_back('{mem_req.addr, mem_req.tag, cycle + MEM_LAT});
    if (req_seen.exists(mem_req.addr)) req_seen[mem_req.addr]++;
    else req_seen[mem_req.addr] = 1;
  end
  always @(negedge clk) begin
    mem_rsp_valid <= 1'b0;
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= cycle) begin
        mem_rsp_valid <= 1'b1;
        mem_rsp.tag   <= pend[i].tag;
        mem_rsp.data  <= memf(pend[i].addr);
        mem_rsp.err   <= 1'b0;
        pend.delete(i);
        break;
      end
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
      FN_SHR: return a >> b[5:0];  FN_MUL: return a * b;  default: return a;
    endcase
  endfunction
  always @(posedge clk) if (rst_n && sc_valid) begin
    logic [63:0] a, b;
    a = dec_uop.use_rs1 ? regs[dec_uop.rs1] : 0;
    b = dec_uop.use_imm ? dec_uop.imm : (dec_uop.use_rs2 ? regs[dec_uop.rs2] : 0);
    if (dec_uop.op == SOP_ALU && dec_uop.writes_rd) regs[dec_uop.rd] <= alu(dec_uop.fn, a, b);
    if (dec_uop.op == SOP_LOAD && dec_uop.writes_rd)
      regs[dec_uop.rd] <= memf(48'(a + (regs[dec_uop.rs2] << dec_uop.scale) + dec_uop.imm));
  end

  // ---------------- kernels
  sop_t prog [$];
  logic [47:0] pcb, a0;
  function automatic sop_t I(input sop_e op, input alu_fn_e fn, input int rd, input int rs1,
                             input int rs2, input bit u2, input bit ui,
                             input logic [63:0] imm, input logic [1:0] scale = 0);
    sop_t s; s = '0;
    s.op = op; s.fn = fn; s.rd = 4'(rd); s.rs1 = 4'(rs1); s.rs2 = 4'(rs2);
    s.use_rs1 = 1'b1; s.use_rs2 = u2; s.use_imm = ui; s.imm = imm; s.scale = scale;
    s.writes_rd = (op != SOP_BRANCH); s.cond = BR_NEZ;
    return s;
  endfunction
  function automatic int vreg(input int j); return (j % 2 == 0) ? 1 : 3; endfunction
  function automatic logic [63:0] base(input int j); return 64'h0100_0000 * 64'(j); endfunction

  // r0 = &A[i], r1/r3 = level values, r2 = index, r8.. = level bases
  task automatic build(input int w, input int depth, input bit hashed);
    prog.delete();
    prog.push_back(I(SOP_LOAD, FN_ADD, 1, 0, 0, 0, 0, 0));               // v0 = A[i]
    prog.push_back(I(SOP_ALU, FN_ADD, 0, 0, 0, 0, 1, 8));                // i++
    for (int j = 1; j < depth; j++) begin
      if (hashed) begin
        prog.push_back(I(SOP_ALU, FN_MUL, 2, vreg(j - 1), 0, 0, 1, HK));
        prog.push_back(I(SOP_ALU, FN_SHR, 2, 2, 0, 0, 1, 16));
        prog.push_back(I(SOP_ALU, FN_AND, 2, 2, 0, 0, 1, MASK));
      end else
        prog.push_back(I(SOP_ALU, FN_AND, 2, vreg(j - 1), 0, 0, 1, MASK));
      prog.push_back(I(SOP_LOAD, FN_ADD, vreg(j), 7 + j, 2, 1, 0, 0, 2'd3));
    end
    prog.push_back(I(SOP_ALU, FN_SUB, 13, 0, 14, 1, 0, 0));
    prog.push_back(I(SOP_BRANCH, FN_ADD, 0, 13, 0, 0, 0, 0));
    // one detector entry per kernel: the striding loads sit at PC[4:0] = 8w
    pcb = 48'h600000 + 48'h1000 * 48'(w) + 48'(8 * w);
    foreach (prog[i]) prog[i].pc = pcb + 48'(i);
  endtask

  function automatic logic [47:0] addr_at(input int k, input int lvl, input bit hashed);
    logic [47:0] a;
    logic [63:0] v, idx;
    a = a0 + 48'(8 * (k + 1));
    for (int j = 1; j <= lvl; j++) begin
      v = memf(a);
      idx = hashed ? (((v * HK) >> 16) & MASK) : (v & MASK);
      a = 48'(base(j) + 8 * idx);
    end
    return a;
  endfunction

  // ---------------- fetch
  int fp = 0;
  bit fetching = 0;
  always @(negedge clk) begin
    if (fetching && (mode == MODE_RUNAHEAD || mode == MODE_VECTOR)) begin
      dec_valid <= 1'b1;
      dec_uop   <= prog[fp];
    end else dec_valid <= 1'b0;
  end
  always @(posedge clk) if (dec_valid && dec_ready) fp <= (fp + 1) % prog.size();

  int n_gather = 0;
  always @(posedge clk)
    if (rst_n && dut.u_vz.vu_valid && dut.u_vz.vu_ready && dut.u_vz.vu_uop.op == VOP_GATHER)
      n_gather++;

  task automatic run_kernel(input int w, input int depth, input bit hashed);
    build(w, depth, hashed);
    // train the detector with six executed instances, stride 8
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); ld_valid = 1; ld_pc = pcb; ld_addr = 48'h0080_0000 * 48'(w + 1) + 48'(8 * k);
    end
    @(negedge clk); ld_valid = 0;
    a0 = 48'h0080_0000 * 48'(w + 1) + 48'(8 * 5);
    for (int r = 0; r < 16; r++) regs[r] = 0;
    regs[0] = 64'(a0) + 8; regs[14] = 64'hFFFF_0000;
    for (int j = 1; j < depth; j++) regs[7 + j] = base(j);

    for (int ep = 0; ep < 2; ep++) begin
      int t, g0, missing, extra;
      int exp [logic [47:0]];
      string nm;
      nm = $sformatf("K%0d ep%0d", w, ep);
      req_seen.delete(); g0 = n_gather; fp = 0;
      for (int r = 0; r < 16; r++) saved[r] = regs[r];
      @(negedge clk);
      head_load_miss = 1; rob_full = 1; ckpt_pc = pcb + 48'h800;
      @(negedge clk);
      head_load_miss = 0; rob_full = 0;
      fetching = 1;
      t = 0;
      while (!restore_valid && t < 20000) begin
        @(negedge clk); t++;
        blocking_load_done = (t == 20);
      end
      blocking_load_done = 0;
      check(restore_valid && restore_pc == ckpt_pc, {nm, ": restore with checkpoint PC"});
      check(last_term == (ep == 0 ? TERM_SAME_LOAD : TERM_TERMINATOR),
            $sformatf("%s: exit cause %s", nm, last_term.name()));
      fetching = 0;
      @(negedge clk);
      for (int r = 0; r < 16; r++) regs[r] = saved[r];
      repeat (MEM_LAT + 30) @(negedge clk);
      check(n_gather - g0 == (depth - 1) * 8,
            $sformatf("%s: %0d gathers for %0d levels", nm, n_gather - g0, depth - 1));
      for (int k = 0; k < NITER; k++)
        for (int l = 0; l < depth; l++) exp[addr_at(k, l, hashed)] = 1;
      missing = 0; extra = 0;
      foreach (exp[a]) if (!req_seen.exists(a)) missing++;
      foreach (req_seen[a]) if (!exp.exists(a)) extra++;
      check(missing == 0, $sformatf("%s: %0d of %0d addresses missing", nm, missing, exp.size()));
      check(extra == 0, $sformatf("%s: %0d unexpected addresses", nm, extra));
      $display("%s: depth %0d %s, %0d cycles, %0d addresses", nm, depth,
               hashed ? "hashed" : "masked", t, req_seen.size());
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NUM_AREGS; r++) rat_in[r] = SPREG_W'(r + 1);
    dec_uop = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    run_kernel(0, 2, 0);
    run_kernel(1, 3, 1);
    run_kernel(2, 4, 0);
    run_kernel(3, 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
