// tb_vector_runahead_rounds: the end-to-end episodes of vr_e2e_body.svh
// with an unroll length of 8 and a pipeline depth of 4 (32 lanes in flight
// per level of the chain), so every vector interval runs two rounds of 32
// loop iterations and the second round is opened by the next decode of the
// striding load. Micro-ops of both rounds share the backend queue, which
// checks that lane masks follow program order across the round change.
module tb_vector_runahead_rounds;
  localparam int U_TB = 8;
  localparam int P_TB = 4;
`include "vr_e2e_body.svh"
  task automatic end_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  vector_runahead #(.U(U_TB), .P(P_TB)) dut (.*);
endmodule
