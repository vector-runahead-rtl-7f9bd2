// vrat: vector register allocation table.
//
// For every architectural integer register it keeps P physical vector
// register names, one per pipelined copy: copy p of a vectorized instruction
// reads its sources from entry [reg][p] and writes its destination to entry
// [reg][p]. The read ports are combinational and are indexed by the copy
// number; the write port takes effect on the next clock edge. Reading the
// destination's current name (rd_old) gives the register that dies once the
// new instruction has executed: it goes into the register deallocation
// queue. With 16 registers x 8 copies x 7 bits the table is 112 bytes, as in
// the evaluated configuration. clear invalidates all mappings at the end of
// runahead (the valid bits are this design's addition, so that a stale name
// is never returned).
module vrat
  import vr_pkg::*;
#(
  parameter int unsigned NREGS = NUM_AREGS,
  parameter int unsigned P     = 8,
  parameter int unsigned PREGS = NUM_VREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic [$clog2(P)-1:0]     copy,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  input  logic [$clog2(NREGS)-1:0] rd,
  output logic [$clog2(PREGS)-1:0] rs1_preg,
  output logic [$clog2(PREGS)-1:0] rs2_preg,
  output logic [$clog2(PREGS)-1:0] rd_old,
  output logic                     rd_old_valid,
  input  logic                     we,
  input  logic [$clog2(PREGS)-1:0] rd_new
);
  localparam int unsigned PW = $clog2(PREGS);

  logic [PW-1:0] map_q   [NREGS][P];
  logic          valid_q [NREGS][P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++)
        for (int c = 0; c < P; c++) begin
          map_q[r][c]   <= '0;
          valid_q[r][c] <= 1'b0;
        end
    end else if (clear) begin
      for (int r = 0; r < NREGS; r++)
        for (int c = 0; c < P; c++) valid_q[r][c] <= 1'b0;
    end else if (we) begin
      map_q[rd][copy]   <= rd_new;
      valid_q[rd][copy] <= 1'b1;
    end
  end

  assign rs1_preg     = map_q[rs1][copy];
  assign rs2_preg     = map_q[rs2][copy];
  assign rd_old       = map_q[rd][copy];
  assign rd_old_valid = valid_q[rd][copy];

endmodule
