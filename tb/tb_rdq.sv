// tb_rdq: self-checking test of the register deallocation queue.
//
// Allocates entries (random "has a register" flag and register), marks
// random allocated entries executed in any order, and checks that registers
// are released strictly in allocation order, only once every older entry
// has executed, at most one per cycle. Also fills the queue to its 192
// entries to check full, and checks that clear empties it.
module tb_rdq;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, alloc = 0, alloc_has_free = 0, exec_valid = 0;
  logic [6:0] alloc_preg = 0, free_preg;
  logic [7:0] alloc_idx, exec_idx = 0;
  logic full, empty, free_valid;
  rdq dut (.*);
  int checks = 0, failures = 0;
  // reference: queue of outstanding entries in program order
  int q_idx[$]; bit q_hf[$]; int q_preg[$]; bit q_exec[$];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int tail = 0;
  task automatic step(input int alloc_pct, input int exec_pct);
    int e; bit pop;
    @(negedge clk);
    check(full == (q_idx.size() == 192), "full flag");
    check(empty == (q_idx.size() == 0), "empty flag");
    pop = (q_idx.size() > 0) && q_exec[0];
    check(free_valid == (pop && q_hf[0]), "free_valid");
    if (pop && q_hf[0]) check(int'(free_preg) == q_preg[0], "released register");
    alloc = (q_idx.size() < 192) && ($urandom_range(0, 99) < alloc_pct);
    alloc_has_free = 1'($urandom);
    alloc_preg = 7'($urandom_range(0, 95));
    if (alloc) check(int'(alloc_idx) == tail, "alloc index");
    exec_valid = 0;
    e = -1;
    if (q_idx.size() > 0 && $urandom_range(0, 99) < exec_pct) begin
      e = $urandom_range(0, q_idx.size() - 1);
      if (!q_exec[e]) begin exec_valid = 1; exec_idx = 8'(q_idx[e]); end
    end
    @(posedge clk); #1;
    if (exec_valid) q_exec[e] = 1;
    if (pop) begin
      void'(q_idx.pop_front()); void'(q_hf.pop_front());
      void'(q_preg.pop_front()); void'(q_exec.pop_front());
    end
    if (alloc) begin
      q_idx.push_back(tail); q_hf.push_back(alloc_has_free);
      q_preg.push_back(int'(alloc_preg)); q_exec.push_back(0);
      tail = (tail + 1) % 192;
    end
    alloc = 0; exec_valid = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    check(empty && !full, "reset empty");
    for (int n = 0; n < 3000; n++) step(60, 50);   // balanced traffic
    for (int n = 0; n < 400 && q_idx.size() < 192; n++) step(100, 0);  // fill up
    step(100, 0);                                   // no allocation when full
    check(full, "queue reached full");
    for (int n = 0; n < 3000; n++) step(10, 90);   // drain
    for (int n = 0; n < 500; n++)  step(60, 50);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    q_idx.delete(); q_hf.delete(); q_preg.delete(); q_exec.delete(); tail = 0;
    check(empty && !free_valid, "clear empties");
    for (int n = 0; n < 500; n++)  step(60, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
