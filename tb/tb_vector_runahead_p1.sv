// tb_vector_runahead_p1: the end-to-end episodes of vr_e2e_body.svh with an
// unroll length of 8 and no vector pipelining (P = 1). Each vector interval
// runs eight rounds of 8 loop iterations, one vector register per
// architectural register, and only 8 lanes in flight per level, so up to
// eight rounds of micro-ops can sit in the backend queue together. This is
// the low-parallelism point of the unroll/pipeline trade-off.
module tb_vector_runahead_p1;
  localparam int U_TB = 8;
  localparam int P_TB = 1;
`include "vr_e2e_body.svh"
  task automatic end_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  vector_runahead #(.U(U_TB), .P(P_TB)) dut (.*);
endmodule
