// vreg_freelist: free list of the core's physical vector registers.
//
// Vector-runahead mode borrows the core's physical vector registers. This
// block keeps one "free" bit per register. alloc_valid/alloc_preg always
// offer the lowest-numbered free register; alloc takes it on the clock edge.
// free returns a register (from the register deallocation queue). checkpoint
// saves the free bits when runahead starts and restore puts them back when
// it ends, which releases every register runahead still held. At reset all
// registers are free. The bitmap and lowest-first choice are this design's
// own; the document only states that the existing registers are reused.
//
// Lint may report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable of the simulation assertion at the
// end of the file; the circuit uses rst_n as an asynchronous reset only.
module vreg_freelist
  import vr_pkg::*;
#(
  parameter int unsigned PREGS = NUM_VREGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     alloc_valid,
  output logic [$clog2(PREGS)-1:0] alloc_preg,
  input  logic                     alloc,
  input  logic                     free,
  input  logic [$clog2(PREGS)-1:0] free_preg,
  input  logic                     checkpoint,
  input  logic                     restore,
  output logic [$clog2(PREGS):0]   num_free
);
  localparam int unsigned PW = $clog2(PREGS);

  logic [PREGS-1:0] free_q, saved_q;

  always_comb begin
    alloc_valid = 1'b0;
    alloc_preg  = '0;
    for (int i = PREGS - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        alloc_valid = 1'b1;
        alloc_preg  = PW'(i);
      end
    end
  end

  always_comb begin
    num_free = '0;
    for (int i = 0; i < PREGS; i++) num_free = num_free + (PW+1)'(free_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q  <= '1;
      saved_q <= '1;
    end else if (restore) begin
      free_q <= saved_q;
    end else begin
      if (checkpoint) saved_q <= free_q;
      if (alloc && alloc_valid) free_q[alloc_preg] <= 1'b0;
      if (free) free_q[free_preg] <= 1'b1;
    end
  end

  // A register must not be freed twice.
  assert property (@(posedge clk) disable iff (!rst_n)
                   free && !restore |-> !free_q[free_preg])
    else $error("vreg_freelist: double free of register %0d", free_preg);

endmodule
