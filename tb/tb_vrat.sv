// tb_vrat: self-checking test of the vector register allocation table.
//
// Writes random physical vector registers into random (register, copy)
// entries and reads them back through all three ports, against a reference
// array; checks that copies of one register are independent, that a new
// mapping is returned as rd_old once written, and that clear invalidates
// every entry.
module tb_vrat;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, we = 0;
  logic [2:0] copy = 0;
  logic [3:0] rs1 = 0, rs2 = 0, rd = 0;
  logic [6:0] rs1_preg, rs2_preg, rd_old, rd_new = 0;
  logic rd_old_valid;
  vrat dut (.*);
  int checks = 0, failures = 0;
  logic [6:0] m [16][8];
  bit         mvld [16][8];
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
    for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) begin m[r][c] = 0; mvld[r][c] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      copy = 3'($urandom); rs1 = 4'($urandom); rs2 = 4'($urandom); rd = 4'($urandom); #1;
      if (mvld[rs1][copy]) check(rs1_preg == m[rs1][copy], "rs1 mapping");
      if (mvld[rs2][copy]) check(rs2_preg == m[rs2][copy], "rs2 mapping");
      check(rd_old_valid == mvld[rd][copy], "rd valid");
      if (mvld[rd][copy]) check(rd_old == m[rd][copy], "rd old mapping");
      we = 1'($urandom); rd_new = 7'($urandom_range(0, 95));
      clear = ($urandom_range(0, 200) == 0);
      @(posedge clk); #1;
      if (clear) begin
        for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) mvld[r][c] = 0;
      end else if (we) begin
        m[rd][copy] = rd_new; mvld[rd][copy] = 1;
      end
      we = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
