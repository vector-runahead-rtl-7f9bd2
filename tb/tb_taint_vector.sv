// tb_taint_vector: self-checking test of the taint vector.
//
// Random writes of (vectorize, invalid) flags to random registers, random
// reads on both ports, and random clears, compared with a reference array
// in the testbench. Also checks that clear wins over a write in the same
// cycle and that reads see a write on the cycle after it.
module tb_taint_vector;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, we = 0, rd_vec = 0, rd_inv = 0;
  logic [3:0] rs1 = 0, rs2 = 0, rd = 0;
  logic rs1_vec, rs1_inv, rs2_vec, rs2_inv;
  taint_vector dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] mv = '0, mi = '0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      rs1 = 4'($urandom); rs2 = 4'($urandom); #1;
      check(rs1_vec == mv[rs1] && rs1_inv == mi[rs1], "port 1");
      check(rs2_vec == mv[rs2] && rs2_inv == mi[rs2], "port 2");
      we = ($urandom_range(0, 1) == 1); rd = 4'($urandom);
      rd_vec = 1'($urandom); rd_inv = 1'($urandom);
      clear = ($urandom_range(0, 60) == 0);
      @(posedge clk); #1;
      if (clear) begin mv = '0; mi = '0; end
      else if (we) begin mv[rd] = rd_vec; mi[rd] = rd_inv; end
      we = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
