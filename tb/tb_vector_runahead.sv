// tb_vector_runahead: end-to-end test of vector_runahead at its default
// parameters (U = P = 8: one round of 64 loop iterations per episode).
// The core model, memory model, programs and checks are described in
// vr_e2e_body.svh.
module tb_vector_runahead;
  localparam int U_TB = 8;
  localparam int P_TB = 8;
`include "vr_e2e_body.svh"
  task automatic end_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  vector_runahead dut (.*);
endmodule
