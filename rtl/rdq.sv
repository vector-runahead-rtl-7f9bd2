// rdq: register deallocation queue.
//
// Runahead instructions never commit, so their registers cannot be freed by
// the usual "next writer commits" rule. Instead every vectorized micro-op
// gets an entry, in program order, holding the physical register that dies
// once it has executed (the previous mapping of its destination) and an
// executed bit. The head pointer waits on the oldest unexecuted entry; when
// the head entry has executed, its register (if any) is freed and the head
// moves on, one entry per cycle.
//
// Interface: alloc (with alloc_has_free / alloc_preg) appends at the tail
// and returns the entry's index in alloc_idx the same cycle; exec_valid /
// exec_idx set an entry's executed bit; free_valid / free_preg pulse for the
// register released this cycle. clear empties the queue at the end of
// runahead. The document's entry is 4 bytes (192 entries, 768 bytes); here
// an entry holds only what the mechanism reads: a valid-register flag, a
// 7-bit vector register and the executed bit.
//
// Lint may report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable of the simulation assertion at the
// end of the file; the circuit uses rst_n as an asynchronous reset only.
module rdq
  import vr_pkg::*;
#(
  parameter int unsigned ENTRIES = 192,
  parameter int unsigned PREGS   = NUM_VREGS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  // allocation at the tail
  input  logic                       alloc,
  input  logic                       alloc_has_free,
  input  logic [$clog2(PREGS)-1:0]   alloc_preg,
  output logic [RDQ_IDX_W-1:0]       alloc_idx,
  output logic                       full,
  output logic                       empty,
  // execution reports
  input  logic                       exec_valid,
  input  logic [RDQ_IDX_W-1:0]       exec_idx,
  // register release
  output logic                       free_valid,
  output logic [$clog2(PREGS)-1:0]   free_preg
);
  localparam int unsigned PW = $clog2(PREGS);
  localparam int unsigned CW = $clog2(ENTRIES + 1);

  typedef struct packed {
    logic          has_free;
    logic [PW-1:0] preg;
    logic          executed;
  } rdq_entry_t;

  rdq_entry_t           q [ENTRIES];
  logic [RDQ_IDX_W-1:0] head_q, tail_q;
  logic [CW-1:0]        count_q;
  logic                 pop, push;

  function automatic logic [RDQ_IDX_W-1:0] inc(input logic [RDQ_IDX_W-1:0] i);
    return (i == RDQ_IDX_W'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  assign full      = (count_q == CW'(ENTRIES));
  assign empty     = (count_q == '0);
  assign alloc_idx = tail_q;
  assign push      = alloc && !full;
  assign pop       = !empty && q[head_q].executed;

  assign free_valid = pop && q[head_q].has_free;
  assign free_preg  = q[head_q].preg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < ENTRIES; i++) q[i] <= '0;
    end else if (clear) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (exec_valid) q[exec_idx].executed <= 1'b1;
      if (push) begin
        q[tail_q].has_free <= alloc_has_free;
        q[tail_q].preg     <= alloc_preg;
        q[tail_q].executed <= 1'b0;
        tail_q             <= inc(tail_q);
      end
      if (pop) head_q <= inc(head_q);
      count_q <= count_q + CW'(push) - CW'(pop);
    end
  end

  // Allocation into a full queue is a protocol error of the caller.
  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full)
    else $error("rdq: allocation while full");

endmodule
