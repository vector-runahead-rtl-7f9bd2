// taint_vector: two flags per architectural integer register.
//
//   vec - the last writer of the register was vectorized
//   inv - the last writer of the register was invalid (discarded)
//
// The vectorizer reads the flags of an instruction's two sources
// (combinational read ports) and writes the flags of its destination on the
// next clock edge (one write port). Propagation follows the rule "if any
// source is tagged the destination is tagged, otherwise it is cleared"; the
// caller computes the new flags, this block only stores them. clear empties
// the table at the end of runahead; it has priority over a write in the same
// cycle. 16 registers x 2 bits = 4 bytes, as in the evaluated configuration.
module taint_vector
  import vr_pkg::*;
#(
  parameter int unsigned NREGS = NUM_AREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  // read ports
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  output logic                     rs1_vec,
  output logic                     rs1_inv,
  output logic                     rs2_vec,
  output logic                     rs2_inv,
  // write port
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rd,
  input  logic                     rd_vec,
  input  logic                     rd_inv
);
  logic [NREGS-1:0] vec_q, inv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_q <= '0;
      inv_q <= '0;
    end else if (clear) begin
      vec_q <= '0;
      inv_q <= '0;
    end else if (we) begin
      vec_q[rd] <= rd_vec;
      inv_q[rd] <= rd_inv;
    end
  end

  assign rs1_vec = vec_q[rs1];
  assign rs1_inv = inv_q[rs1];
  assign rs2_vec = vec_q[rs2];
  assign rs2_inv = inv_q[rs2];

endmodule
