// vec_alu: lane-wise integer ALU of the vector unit.
//
// Vectorized address arithmetic runs on the core's existing vector units;
// this block models the integer part of one such unit: LANES independent
// 64-bit lanes, each computing y = fn(a, b). Shifts use the low 6 bits of b;
// FN_MUL keeps the low 64 bits of the product; FN_MOV passes a. The block is
// purely combinational: the caller registers the result (one-cycle latency
// in the vector backend). The operation set is the one the hot loops of the
// evaluated workloads need for address computation (add, logic, shifts,
// multiply in hash functions).
module vec_alu
  import vr_pkg::*;
#(
  parameter int unsigned NLANES = LANES
) (
  input  alu_fn_e         fn,
  input  logic [XLEN-1:0] a [NLANES],
  input  logic [XLEN-1:0] b [NLANES],
  output logic [XLEN-1:0] y [NLANES]
);
  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      unique case (fn)
        FN_ADD:  y[l] = a[l] + b[l];
        FN_SUB:  y[l] = a[l] - b[l];
        FN_AND:  y[l] = a[l] & b[l];
        FN_OR:   y[l] = a[l] | b[l];
        FN_XOR:  y[l] = a[l] ^ b[l];
        FN_SHL:  y[l] = a[l] << b[l][5:0];
        FN_SHR:  y[l] = a[l] >> b[l][5:0];
        FN_SAR:  y[l] = XLEN'($signed(a[l]) >>> b[l][5:0]);
        FN_MUL:  y[l] = a[l] * b[l];
        default: y[l] = a[l];
      endcase
    end
  end
endmodule
