// tb_vreg_freelist: self-checking test of the vector register free list.
//
// Allocates until empty (checking lowest-first order and that no register
// is handed out twice), frees in random order with random allocations in
// between, and checks num_free against a reference bitmap. Then checks that
// restore brings back the bitmap saved by checkpoint.
module tb_vreg_freelist;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, alloc = 0, free = 0, checkpoint = 0, restore = 0;
  logic [6:0] alloc_preg, free_preg = 0;
  logic [7:0] num_free;
  vreg_freelist dut (.*);
  int checks = 0, failures = 0;
  bit m [96];
  bit saved [96];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int lowest();
    for (int i = 0; i < 96; i++) if (m[i]) return i;
    return -1;
  endfunction
  function automatic int count();
    int c = 0;
    for (int i = 0; i < 96; i++) c += int'(m[i]);
    return c;
  endfunction
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 96; i++) m[i] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); checkpoint = 1; @(negedge clk); checkpoint = 0;
    for (int i = 0; i < 96; i++) saved[i] = m[i];
    for (int n = 0; n < 3000; n++) begin
      int lo; bit do_alloc, do_free; int f;
      @(negedge clk);
      lo = lowest();
      check(alloc_valid == (lo >= 0), "alloc_valid");
      if (lo >= 0) check(int'(alloc_preg) == lo, "lowest free first");
      check(int'(num_free) == count(), "num_free");
      do_alloc = (lo >= 0) && ($urandom_range(0, 99) < 55);
      do_free = 0; f = 0;
      for (int t = 0; t < 4; t++) begin
        f = $urandom_range(0, 95);
        if (!m[f] && !(do_alloc && f == lo)) begin do_free = 1; break; end
      end
      alloc = do_alloc; free = do_free; free_preg = 7'(f);
      @(posedge clk); #1;
      if (do_alloc) m[lo] = 0;
      if (do_free) m[f] = 1;
      alloc = 0; free = 0;
    end
    @(negedge clk); restore = 1; @(negedge clk); restore = 0;
    for (int i = 0; i < 96; i++) m[i] = saved[i];
    check(int'(num_free) == 96 && alloc_preg == 0, "restore to checkpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
