// tb_vec_alu: self-checking test of the 8-lane vector ALU.
//
// Random operands for every function code, lane by lane, compared with
// results computed in the testbench with longint arithmetic.
module tb_vec_alu;
  import vr_pkg::*;
  alu_fn_e fn;
  logic [63:0] a [8];
  logic [63:0] b [8];
  logic [63:0] y [8];
  vec_alu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      fn = alu_fn_e'($urandom_range(0, 9));
      for (int l = 0; l < 8; l++) begin
        a[l] = {$urandom, $urandom};
        b[l] = ($urandom_range(0, 1) == 1) ? 64'($urandom_range(0, 70)) : {$urandom, $urandom};
      end
      #1;
      for (int l = 0; l < 8; l++) begin
        logic [63:0] e;
        case (fn)
          FN_ADD: e = a[l] + b[l];
          FN_SUB: e = a[l] - b[l];
          FN_AND: e = a[l] & b[l];
          FN_OR:  e = a[l] | b[l];
          FN_XOR: e = a[l] ^ b[l];
          FN_SHL: e = a[l] << (b[l] % 64);
          FN_SHR: e = a[l] >> (b[l] % 64);
          FN_SAR: e = 64'(longint'(a[l]) >>> (b[l] % 64));
          FN_MUL: e = 64'(longint'(a[l]) * longint'(b[l]));
          default: e = a[l];
        endcase
        checks++;
        if (y[l] !== e) begin
          failures++;
          $display("FAIL fn=%0d lane %0d a=%h b=%h y=%h exp=%h", fn, l, a[l], b[l], y[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
