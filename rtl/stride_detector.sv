// stride_detector: reference prediction table that finds striding loads.
//
// A direct-mapped table indexed by the low bits of the load PC (no tag, as
// in the storage budget of 32 x (48 + 16 + 2 + 48) bits). Each entry holds
// the last address the load touched, its last stride, a 2-bit saturating
// confidence counter and the terminator: the PC of the last dependent load of
// the chain that starts at this striding load (0 means "not yet known").
//
// Training (train_valid, one clock edge): after a load executes, its new
// stride is addr - last_addr. If it equals the stored stride the confidence
// counts up, otherwise it counts down, and the stored stride is replaced once
// the confidence is 0 or 1. The last address is always updated. The update
// rule beyond "saturating counter" is this design's choice.
//
// Lookup (combinational): a decoded load whose entry has confidence 3 is a
// striding load; the entry's last address and stride seed the vector
// addresses. The terminator is written through term_we by the vectorizer and
// read through lookup_term.
//
// The table has no tags, so only PC[4:0] of the PCs is used for indexing;
// the other PC bits are stored only as the terminator value.
module stride_detector
  import vr_pkg::*;
#(
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned ADDR_BITS = ADDR_W,
  parameter int unsigned STR_BITS  = STRIDE_W,
  parameter int unsigned PC_BITS   = PC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // training by executed loads
  input  logic                 train_valid,
  input  logic [PC_BITS-1:0]   train_pc,
  input  logic [ADDR_BITS-1:0] train_addr,
  // lookup at decode
  input  logic [PC_BITS-1:0]   lookup_pc,
  output logic                 lookup_striding,
  output logic [ADDR_BITS-1:0] lookup_addr,
  output logic [STR_BITS-1:0]  lookup_stride,
  output logic [PC_BITS-1:0]   lookup_term,
  // terminator update
  input  logic                 term_we,
  input  logic [PC_BITS-1:0]   term_pc,
  input  logic [PC_BITS-1:0]   term_value
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic [ADDR_BITS-1:0] last_addr;
    logic [STR_BITS-1:0]  stride;
    logic [1:0]           conf;
    logic [PC_BITS-1:0]   term;
  } rpt_entry_t;

  rpt_entry_t table_q [ENTRIES];

  logic [IDX_W-1:0]     tidx, lidx, widx;
  rpt_entry_t           cur;
  logic [ADDR_BITS-1:0] delta;
  logic [STR_BITS-1:0]  new_stride;
  logic                 same;

  assign tidx = train_pc[IDX_W-1:0];
  assign lidx = lookup_pc[IDX_W-1:0];
  assign widx = term_pc[IDX_W-1:0];

  assign cur        = table_q[tidx];
  assign delta      = train_addr - cur.last_addr;
  assign new_stride = delta[STR_BITS-1:0];
  // The stride must fit in the signed 16-bit field to count as a match.
  assign same = (new_stride == cur.stride) &&
                (delta == {{(ADDR_BITS-STR_BITS){new_stride[STR_BITS-1]}}, new_stride});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else begin
      if (train_valid) begin
        table_q[tidx].last_addr <= train_addr;
        if (same) begin
          if (cur.conf != 2'd3) table_q[tidx].conf <= cur.conf + 2'd1;
        end else begin
          if (cur.conf != 2'd0) table_q[tidx].conf <= cur.conf - 2'd1;
          if (cur.conf <= 2'd1) table_q[tidx].stride <= new_stride;
        end
      end
      if (term_we) table_q[widx].term <= term_value;
    end
  end

  assign lookup_striding = (table_q[lidx].conf == 2'd3);
  assign lookup_addr     = table_q[lidx].last_addr;
  assign lookup_stride   = table_q[lidx].stride;
  assign lookup_term     = table_q[lidx].term;

endmodule
