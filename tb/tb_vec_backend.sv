// tb_vec_backend: self-checking test of the vector execution backend.
//
// A behavioural memory accepts lane requests (randomly stalling), answers
// each after LAT cycles with data = 3*addr + 1 and flags addresses at or
// above 0xE000_0000 (or one marked address) as invalid. Results inside the
// register file are observed through the addresses of later gathers. The
// test checks: ALU results and scalar broadcast, strided lane addresses,
// gather address arithmetic (base + index << scale + disp), that four
// pipelined strided loads have 32 lanes in flight at once, branch masking
// by the first active lane, masking after an invalid lane, the start of a
// new round's masks by its strided load in program order (older queued
// micro-ops keep their masks, late invalid responses of an older round are
// ignored), that a gather without a destination writes no register,
// all_invalid, one completion report per micro-op, and flush.
module tb_vec_backend;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush = 0, in_valid = 0, in_ready;
  logic [RND_W-1:0] cur_rnd = 0;   // round number stamped on sent micro-ops
  bit no_dest = 0;                 // send loads without a destination
  vuop_t in_uop;
  logic exec_valid, br_valid, br_taken, mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [7:0] exec_rdq_idx;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic all_invalid, idle;

  vec_backend dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ---------------- behavioural memory
  int LAT = 12;
  logic [47:0] bad_addr = 48'hFFFF_FFFF_FFFF;
  typedef struct { logic [47:0] addr; logic [7:0] tag; int due; } pend_t;
  pend_t pend[$];
  logic [47:0] seen_addr[$];
  logic [2:0]  seen_lane[$];
  int outstanding = 0, max_outstanding = 0;
  int exec_seen[256];

  always_ff @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    if (mem_req_valid && mem_req_ready) begin
      pend.push_back('{mem_req.addr, mem_req.tag, cycle + LAT});
      seen_addr.push_back(mem_req.addr);
      seen_lane.push_back(mem_req.tag[2:0]);
    end
    if (exec_valid) exec_seen[exec_rdq_idx]++;
  end
  always @(negedge clk) begin
    mem_req_ready <= ($urandom_range(0, 9) != 0);
    mem_rsp_valid <= 1'b0;
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= cycle) begin
        mem_rsp_valid <= 1'b1;
        mem_rsp.tag   <= pend[i].tag;
        mem_rsp.data  <= 64'(pend[i].addr) * 3 + 1;
        mem_rsp.err   <= (pend[i].addr >= 48'hE000_0000) || (pend[i].addr == bad_addr);
        pend.delete(i);
        break;
      end
    outstanding = pend.size();
    if (outstanding > max_outstanding) max_outstanding = outstanding;
  end

  // ---------------- helpers
  int nsent = 0;
  function automatic vsrc_t vs(input int preg);
    vsrc_t s; s.is_vec = 1; s.preg = VREG_W'(preg); s.value = '0; return s;
  endfunction
  function automatic vsrc_t sc(input logic [63:0] v);
    vsrc_t s; s.is_vec = 0; s.preg = '0; s.value = v; return s;
  endfunction
  task automatic send(input vop_e op, input alu_fn_e fn, input int copy, input int pd,
                      input vsrc_t a, input vsrc_t b, input logic [1:0] scale,
                      input logic [63:0] imm, input logic [47:0] base, input logic [15:0] stride,
                      input br_cond_e cond = BR_NEZ);
    vuop_t u;
    u = '0;
    u.op = op; u.fn = fn; u.copy = 3'(copy); u.cond = cond;
    u.writes_pd = (op != VOP_BRANCH) && !no_dest; u.pd = 7'(pd); u.a = a; u.b = b;
    u.scale = scale; u.imm = imm; u.base = base; u.stride = stride;
    u.rdq_idx = 8'(nsent);
    u.rnd = cur_rnd;
    @(negedge clk);
    in_uop = u; in_valid = 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
    nsent++;
  endtask
  task automatic drain();
    int t = 0;
    do begin @(posedge clk); t++; end while ((!idle || pend.size() != 0) && t < 3000);
    repeat (4) @(posedge clk);
  endtask
  function automatic int count_addr(input logic [47:0] a, input int from);
    int c = 0;
    for (int i = from; i < seen_addr.size(); i++) if (seen_addr[i] == a) c++;
    return c;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mark; logic [63:0] d0;
    for (int i = 0; i < 256; i++) exec_seen[i] = 0;
    in_uop = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    check(idle && !all_invalid, "idle after reset");

    // A: scalar broadcast, ALU, gather through a vector register
    mark = seen_addr.size();
    send(VOP_ALU, FN_MOV, 0, 1, sc(64'h1000), sc(0), 0, 0, 0, 0);
    send(VOP_ALU, FN_ADD, 0, 2, vs(1), sc(8), 0, 0, 0, 0);
    send(VOP_GATHER, FN_ADD, 0, 3, vs(2), sc(0), 0, 64'h20, 0, 0);
    drain();
    check(seen_addr.size() - mark == 8, "gather sends 8 lanes");
    check(count_addr(48'h1028, mark) == 8, "ALU chain result 0x1000+8 (+0x20 disp)");

    // B: strided load then gather on hashed index
    mark = seen_addr.size();
    send(VOP_STRIDED, FN_ADD, 0, 4, sc(0), sc(0), 0, 0, 48'h2000, 16'd16);
    send(VOP_ALU, FN_AND, 0, 5, vs(4), sc(64'hfff8), 0, 0, 0, 0);
    send(VOP_GATHER, FN_ADD, 0, 6, sc(64'h100000), vs(5), 2'd3, 0, 0, 0);
    drain();
    for (int l = 0; l < 8; l++) begin
      logic [47:0] la; logic [63:0] d;
      la = 48'h2000 + 48'(16 * l);
      d  = 64'(la) * 3 + 1;
      check(count_addr(la, mark) == 1, $sformatf("strided lane %0d address", l));
      check(count_addr(48'h100000 + 48'((d & 64'hfff8) << 3), mark) >= 1,
            $sformatf("gather lane %0d address", l));
    end

    // C: MLP of pipelined copies (slow memory)
    LAT = 150;
    max_outstanding = 0;
    for (int c = 0; c < 4; c++)
      send(VOP_STRIDED, FN_ADD, c, 10 + c, sc(0), sc(0), 0, 0, 48'h40000 + 48'(c * 4096), 16'd64);
    drain();
    check(max_outstanding >= 32, $sformatf("32 lanes in flight (saw %0d)", max_outstanding));
    LAT = 12;

    // D: branch on lane parity of copy 1
    mark = seen_addr.size();
    send(VOP_STRIDED, FN_ADD, 1, 20, sc(0), sc(0), 0, 0, 48'h3000, 16'd8);
    send(VOP_ALU, FN_AND, 1, 21, vs(20), sc(1), 0, 0, 0, 0);
    fork
      begin
        bit got = 0;
        while (!got) begin @(posedge clk); if (br_valid) begin got = 1;
          d0 = 64'(48'h3000) * 3 + 1;
          check(br_taken == d0[0], "branch direction from first lane"); end end
      end
      send(VOP_BRANCH, FN_ADD, 1, 0, vs(21), sc(0), 0, 0, 0, 0, BR_NEZ);
    join
    send(VOP_GATHER, FN_ADD, 1, 22, vs(20), sc(0), 0, 64'h8000, 0, 0);
    drain();
    for (int l = 0; l < 8; l++) begin
      logic [63:0] d;
      d = 64'(48'h3000 + 48'(8 * l)) * 3 + 1;
      check(count_addr(48'(d + 64'h8000), mark) == ((d[0] == d0[0]) ? 1 : 0),
            $sformatf("branch mask lane %0d", l));
    end

    // E: invalid lane 3 of copy 2 masks it for later loads of copy 2
    mark = seen_addr.size();
    bad_addr = 48'h5000 + 3 * 8;
    send(VOP_STRIDED, FN_ADD, 2, 30, sc(0), sc(0), 0, 0, 48'h5000, 16'd8);
    drain();
    send(VOP_GATHER, FN_ADD, 2, 31, vs(30), sc(0), 0, 64'h9000, 0, 0);
    drain();
    check(count_addr(48'(64'(48'h5000 + 3 * 8) * 3 + 1 + 64'h9000), mark) == 0,
          "invalid lane masked afterwards");
    check(count_addr(48'(64'(48'h5000 + 2 * 8) * 3 + 1 + 64'h9000), mark) == 1,
          "valid lane still issued");

    // F: a new round starts at its strided load, in program order: a queued
    // micro-op of the old round keeps the old mask, and an invalid response
    // of the old round arriving later does not touch the new round's mask
    mark = seen_addr.size();
    bad_addr = 48'(64'(48'h5000 + 5 * 8) * 3 + 1 + 64'hA000);
    send(VOP_GATHER, FN_ADD, 2, 35, vs(30), sc(0), 0, 64'hA000, 0, 0);
    cur_rnd = 1;
    send(VOP_STRIDED, FN_ADD, 2, 36, sc(0), sc(0), 0, 0, 48'h6000, 16'd8);
    send(VOP_GATHER, FN_ADD, 2, 37, vs(36), sc(0), 0, 64'hB000, 0, 0);
    drain();
    check(count_addr(48'(64'(48'h5000 + 3 * 8) * 3 + 1 + 64'hA000), mark) == 0,
          "old-round micro-op keeps its mask");
    check(count_addr(48'h6000 + 3 * 8, mark) == 1, "new round starts with every lane");
    check(count_addr(48'(64'(48'h6000 + 5 * 8) * 3 + 1 + 64'hB000), mark) == 1,
          "late invalid response of the old round ignored");
    check(seen_addr.size() - mark == 23, "lanes sent across the round change");
    bad_addr = 48'hFFFF_FFFF_FFFF;

    // H: a gather without a destination leaves the register named in pd
    mark = seen_addr.size();
    no_dest = 1;
    send(VOP_GATHER, FN_ADD, 0, 2, sc(64'h990000), sc(0), 0, 0, 0, 0);
    no_dest = 0;
    drain();
    send(VOP_GATHER, FN_ADD, 0, 50, vs(2), sc(0), 0, 64'h20, 0, 0);
    drain();
    check(count_addr(48'h990000, mark) == 8, "gather without destination issued");
    check(count_addr(48'h1028, mark) == 8, "gather without destination writes no register");

    // one completion report per micro-op so far
    begin
      bit ok = 1;
      for (int i = 0; i < nsent; i++) if (exec_seen[i] != 1) ok = 0;
      check(ok, "one exec report per micro-op");
    end

    // G: every lane invalid -> all_invalid; flush clears it
    for (int c = 0; c < 8; c++)
      send(VOP_STRIDED, FN_ADD, c, 40 + c, sc(0), sc(0), 0, 0, 48'hE000_0000 + 48'(c * 64), 16'd8);
    drain();
    check(all_invalid, "all lanes invalid");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    check(!all_invalid && idle, "flush resets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
