// vec_backend: executes the vector micro-ops made in vector-runahead mode.
//
// Micro-ops arrive renamed, in program order, into a FIFO of IQ_DEPTH
// entries (in_valid / in_ready). The head issues when its vector sources are
// ready (one ready bit per physical vector register, cleared when a micro-op
// that writes it is accepted). Issue is in order, but loads do not block:
// a strided load or gather takes one of NSLOTS load slots and the head moves
// on, so the P pipelined copies of a load all have their lanes in flight
// together, and a dependent micro-op waits at the head only for its own copy.
//
//   VOP_ALU      one cycle in vec_alu, result written to the register file.
//   VOP_STRIDED  lane i reads base + i*stride (the vectorized striding load).
//   VOP_GATHER   lane i reads a[i] + (b[i] << scale) + imm.
//   VOP_BRANCH   lanes evaluate the branch condition on a; the first active
//                lane decides the direction (br_valid / br_taken out) and
//                lanes that disagree are masked off in their copy's mask.
//
// Each pipelined copy has an 8-bit lane mask. A masked lane sends no memory
// request. A lane whose access is reported invalid (mem_rsp.err) is masked
// off in its copy from then on. Masking lasts for one round of vector
// runahead. A round starts with the strided loads of its striding load, so
// when a strided load of copy c issues, mask c is set to all lanes and
// takes that micro-op's round number. Since issue is in order, micro-ops of
// older rounds still queued keep their masks, however many rounds are in
// flight. An invalid-lane response only clears a lane if its load belongs
// to the round the mask is in. all_invalid is high when every mask is empty
// and no strided load (a new round) is waiting in the queue.
//
// Load lanes go out one per cycle on mem_req (valid /
// ready); responses come back in any order, matched by tag {generation,
// slot, lane}. A slot whose lanes have all returned writes its register;
// a write-back takes the register-file write port for the cycle, so the head
// does not issue an ALU op or branch that cycle. Every completed micro-op
// reports its RDQ index on exec_valid / exec_rdq_idx. flush empties the FIFO
// and the slots and bumps the generation so that late responses are dropped.
// idle is high when nothing is queued and no lane request is left to send;
// runahead may end then even though responses are still outstanding (the
// data only needed to reach the caches).
//
// The document reuses the core's issue queue, vector registers and vector
// units; the dedicated FIFO, the slot count, lowest-slot-first request order
// and first-active-lane branch rule are this design's choices.
//
// Lint may report rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable of the simulation assertion at the
// end of the file; the circuit uses rst_n as an asynchronous reset only.
// The micro-op's pc field is not used here; it is carried for tracing.
module vec_backend
  import vr_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = 16,
  parameter int unsigned NSLOTS   = 8,
  parameter int unsigned PCOPIES  = 8,
  parameter int unsigned PREGS    = NUM_VREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // micro-ops in
  input  logic                 in_valid,
  input  vuop_t                in_uop,
  output logic                 in_ready,
  // completion to the RDQ
  output logic                 exec_valid,
  output logic [RDQ_IDX_W-1:0] exec_rdq_idx,
  // branch outcome of the first active lane
  output logic                 br_valid,
  output logic                 br_taken,
  // memory system (one lane per request)
  output logic                 mem_req_valid,
  output mem_req_t             mem_req,
  input  logic                 mem_req_ready,
  input  logic                 mem_rsp_valid,
  input  mem_rsp_t             mem_rsp,
  // status
  output logic                 all_invalid,
  output logic                 idle
);
  localparam int unsigned QW = $clog2(IQ_DEPTH);
  localparam int unsigned SW = $clog2(NSLOTS);
  localparam int unsigned PW = $clog2(PREGS);

  // ---------------------------------------------------------------- state
  logic [LANES*XLEN-1:0] vrf [PREGS];     // lane l in bits [l*XLEN +: XLEN]
  logic [PREGS-1:0]  rdy_q;
  logic [LANES-1:0]  mask_q   [PCOPIES];
  logic [RND_W-1:0]  mask_rnd [PCOPIES];   // round each mask belongs to
  logic [QW:0]       opn_q;                 // strided loads queued

  vuop_t             fifo  [IQ_DEPTH];
  logic [QW-1:0]     rd_ptr, wr_ptr;
  logic [QW:0]       cnt_q;

  typedef struct packed {
    logic                 busy;
    logic [COPY_W-1:0]    copy;
    logic [RND_W-1:0]     rnd;
    logic                 writes_pd;
    logic [PW-1:0]        pd;
    logic [RDQ_IDX_W-1:0] rdq_idx;
    logic [LANES-1:0]     to_send;   // lanes still to request
    logic [LANES-1:0]     waiting;   // lanes requested, not yet returned
  } slot_t;

  slot_t             slot_q [NSLOTS];
  logic [ADDR_W-1:0] saddr  [NSLOTS][LANES];
  logic [XLEN-1:0]   sdata  [NSLOTS][LANES];
  logic [1:0]        gen_q;

  // ---------------------------------------------------------------- head
  vuop_t           head;
  logic            head_valid, srcs_ready;
  logic [XLEN-1:0] opa [LANES];
  logic [XLEN-1:0] opb [LANES];
  logic [XLEN-1:0] alu_y [LANES];
  logic [LANES-1:0] head_mask;

  assign head       = fifo[rd_ptr];
  assign head_valid = (cnt_q != '0);
  assign srcs_ready = (!head.a.is_vec || rdy_q[head.a.preg[PW-1:0]]) &&
                      (!head.b.is_vec || rdy_q[head.b.preg[PW-1:0]]);
  assign head_mask  = (head.op == VOP_STRIDED) ? '1 : mask_q[head.copy];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      opa[l] = head.a.is_vec ? vrf[head.a.preg[PW-1:0]][l*XLEN +: XLEN] : head.a.value;
      opb[l] = head.b.is_vec ? vrf[head.b.preg[PW-1:0]][l*XLEN +: XLEN] : head.b.value;
    end
  end

  vec_alu #(.NLANES(LANES)) u_alu (.fn(head.fn), .a(opa), .b(opb), .y(alu_y));

  // free load slot
  logic          slot_free;
  logic [SW-1:0] free_slot;
  always_comb begin
    slot_free = 1'b0;
    free_slot = '0;
    for (int s = NSLOTS - 1; s >= 0; s--)
      if (!slot_q[s].busy) begin
        slot_free = 1'b1;
        free_slot = SW'(s);
      end
  end

  // slot ready to write back
  logic          wb_any;
  logic [SW-1:0] wb_slot;
  always_comb begin
    wb_any  = 1'b0;
    wb_slot = '0;
    for (int s = NSLOTS - 1; s >= 0; s--)
      if (slot_q[s].busy && slot_q[s].to_send == '0 && slot_q[s].waiting == '0) begin
        wb_any  = 1'b1;
        wb_slot = SW'(s);
      end
  end

  // lane request to send: lowest slot, then lowest lane
  logic                  req_any;
  logic [SW-1:0]         req_slot;
  logic [$clog2(LANES)-1:0] req_lane;
  always_comb begin
    req_any  = 1'b0;
    req_slot = '0;
    req_lane = '0;
    for (int s = NSLOTS - 1; s >= 0; s--)
      if (slot_q[s].busy && slot_q[s].to_send != '0) begin
        req_any  = 1'b1;
        req_slot = SW'(s);
        for (int l = LANES - 1; l >= 0; l--)
          if (slot_q[s].to_send[l]) req_lane = ($clog2(LANES))'(l);
      end
  end

  assign mem_req_valid = req_any && !flush;
  assign mem_req.addr  = saddr[req_slot][req_lane];
  assign mem_req.tag   = {gen_q, 3'(req_slot), 3'(req_lane)};

  // response decode
  logic [SW-1:0]            rsp_slot;
  logic [$clog2(LANES)-1:0] rsp_lane;
  logic                     rsp_ok;
  assign rsp_slot = mem_rsp.tag[3 +: SW];
  assign rsp_lane = mem_rsp.tag[0 +: $clog2(LANES)];
  assign rsp_ok   = mem_rsp_valid && (mem_rsp.tag[7:6] == gen_q) &&
                    slot_q[rsp_slot].busy && slot_q[rsp_slot].waiting[rsp_lane];

  // head issue decision
  logic is_load, issue;
  assign is_load = (head.op == VOP_STRIDED) || (head.op == VOP_GATHER);
  assign issue   = head_valid && srcs_ready && !flush &&
                   (is_load ? slot_free : !wb_any);

  // branch evaluation
  logic [LANES-1:0] lane_taken;
  logic             first_taken, first_found;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      unique case (head.cond)
        BR_EQZ:  lane_taken[l] = (opa[l] == '0);
        BR_NEZ:  lane_taken[l] = (opa[l] != '0);
        BR_LTZ:  lane_taken[l] = opa[l][XLEN-1];
        default: lane_taken[l] = !opa[l][XLEN-1];
      endcase
    end
    first_taken = lane_taken[0];
    first_found = 1'b0;
    for (int l = 0; l < LANES; l++)
      if (head_mask[l] && !first_found) begin
        first_taken = lane_taken[l];
        first_found = 1'b1;
      end
  end

  assign br_valid = issue && head.op == VOP_BRANCH;
  assign br_taken = first_taken;

  // lane addresses of the head load
  logic [ADDR_W-1:0] lane_addr [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      if (head.op == VOP_STRIDED)
        lane_addr[l] = head.base +
          ADDR_W'($signed(head.stride) * $signed({1'b0, 4'(l)}));
      else
        lane_addr[l] = ADDR_W'(opa[l] + (opb[l] << head.scale) + head.imm);
    end
  end

  assign in_ready = (cnt_q != (QW+1)'(IQ_DEPTH)) && !flush;

  // completion report: write-back of a load slot, else an issued ALU/branch
  always_comb begin
    exec_valid   = 1'b0;
    exec_rdq_idx = '0;
    if (!flush) begin
      if (wb_any) begin
        exec_valid   = 1'b1;
        exec_rdq_idx = slot_q[wb_slot].rdq_idx;
      end else if (issue && !is_load) begin
        exec_valid   = 1'b1;
        exec_rdq_idx = head.rdq_idx;
      end
    end
  end

  logic any_mask;
  always_comb begin
    any_mask = 1'b0;
    for (int c = 0; c < PCOPIES; c++) any_mask |= (mask_q[c] != '0);
  end
  assign all_invalid = !any_mask && (opn_q == '0);
  assign idle        = (cnt_q == '0) && !req_any;

  logic push;
  assign push = in_valid && in_ready;

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt_q  <= '0;
      rdy_q  <= '1;
      gen_q  <= '0;
      opn_q  <= '0;
      for (int c = 0; c < PCOPIES; c++) begin mask_q[c] <= '1; mask_rnd[c] <= '0; end
      for (int s = 0; s < NSLOTS; s++) begin
        slot_q[s] <= '0;
        for (int l = 0; l < LANES; l++) begin
          saddr[s][l] <= '0;
          sdata[s][l] <= '0;
        end
      end
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt_q  <= '0;
      rdy_q  <= '1;
      gen_q  <= gen_q + 2'd1;
      opn_q  <= '0;
      for (int c = 0; c < PCOPIES; c++) begin mask_q[c] <= '1; mask_rnd[c] <= '0; end
      for (int s = 0; s < NSLOTS; s++) slot_q[s].busy <= 1'b0;
    end else begin
      // accept
      if (push) begin
        wr_ptr       <= (wr_ptr == QW'(IQ_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (in_uop.writes_pd) rdy_q[in_uop.pd[PW-1:0]] <= 1'b0;
      end
      cnt_q <= cnt_q + (QW+1)'(push) - (QW+1)'(issue);
      opn_q <= opn_q + (QW+1)'(push && in_uop.op == VOP_STRIDED)
                     - (QW+1)'(issue && head.op == VOP_STRIDED);

      // issue
      if (issue) begin
        rd_ptr <= (rd_ptr == QW'(IQ_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        unique case (head.op)
          VOP_ALU: begin
            if (head.writes_pd) rdy_q[head.pd[PW-1:0]] <= 1'b1;
          end
          VOP_BRANCH: begin
            mask_q[head.copy] <= head_mask & ~(lane_taken ^ {LANES{first_taken}});
          end
          default: begin
            if (head.op == VOP_STRIDED) begin   // first micro-op of a round
              mask_q[head.copy]   <= '1;
              mask_rnd[head.copy] <= head.rnd;
            end
            slot_q[free_slot].busy    <= 1'b1;
            slot_q[free_slot].copy    <= head.copy;
            slot_q[free_slot].rnd     <= head.rnd;
            slot_q[free_slot].writes_pd <= head.writes_pd;
            slot_q[free_slot].pd      <= head.pd[PW-1:0];
            slot_q[free_slot].rdq_idx <= head.rdq_idx;
            slot_q[free_slot].to_send <= head_mask;
            slot_q[free_slot].waiting <= '0;
            for (int l = 0; l < LANES; l++) begin
              saddr[free_slot][l] <= lane_addr[l];
              sdata[free_slot][l] <= '0;
            end
          end
        endcase
      end

      // lane request sent
      if (mem_req_valid && mem_req_ready) begin
        slot_q[req_slot].to_send[req_lane] <= 1'b0;
        slot_q[req_slot].waiting[req_lane] <= 1'b1;
      end

      // lane response
      if (rsp_ok) begin
        slot_q[rsp_slot].waiting[rsp_lane] <= 1'b0;
        sdata[rsp_slot][rsp_lane]          <= mem_rsp.data;
        if (mem_rsp.err && slot_q[rsp_slot].rnd == mask_rnd[slot_q[rsp_slot].copy] &&
            !(issue && head.op == VOP_STRIDED && head.copy == slot_q[rsp_slot].copy))
          mask_q[slot_q[rsp_slot].copy][rsp_lane] <= 1'b0;
      end

      // slot write-back (never the slot being filled by this cycle's issue,
      // which is not busy yet)
      if (wb_any) begin
        if (slot_q[wb_slot].writes_pd) rdy_q[slot_q[wb_slot].pd] <= 1'b1;
        slot_q[wb_slot].busy      <= 1'b0;
      end
    end
  end

  // ------------------------------------------------- storage without reset
  // Register file: one write port, lane-masked. A load write-back and an ALU
  // result never share a cycle (the head does not issue an ALU op while a
  // slot writes back). Registers are always written before they are read,
  // since a source is only ready after its producer has written it.
  logic                  vrf_we;
  logic [PW-1:0]         vrf_waddr;
  logic [LANES-1:0]      vrf_wmask;
  logic [LANES*XLEN-1:0] vrf_wdata;
  always_comb begin
    vrf_we    = 1'b0;
    vrf_waddr = head.pd[PW-1:0];
    vrf_wmask = head_mask;
    vrf_wdata = '0;
    for (int l = 0; l < LANES; l++) vrf_wdata[l*XLEN +: XLEN] = alu_y[l];
    if (!flush) begin
      if (wb_any) begin
        vrf_we    = slot_q[wb_slot].writes_pd;
        vrf_waddr = slot_q[wb_slot].pd;
        vrf_wmask = '1;
        for (int l = 0; l < LANES; l++) vrf_wdata[l*XLEN +: XLEN] = sdata[wb_slot][l];
      end else if (issue && head.op == VOP_ALU) begin
        vrf_we    = head.writes_pd;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (vrf_we)
      for (int l = 0; l < LANES; l++)
        if (vrf_wmask[l]) vrf[vrf_waddr][l*XLEN +: XLEN] <= vrf_wdata[l*XLEN +: XLEN];
    if (push && !flush) fifo[wr_ptr] <= in_uop;
  end

  // Lane requests must hold steady while the memory system stalls them.
  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid)
    else $error("vec_backend: request withdrawn before it was accepted");

endmodule
