// camp_stage: one memory stage of the CAMP circular pipeline.
//
// Each stage holds the trie nodes mapped to it in its own memory. Every cycle one slot of the
// ring arrives from the previous stage (ring_in). If that slot is empty (a bubble) and the
// stage's request queue is not empty, the queue head takes the slot and is popped: this is how a
// lookup enters the pipeline at the stage holding its sub-trie root. The chosen lookup is
// registered; if it names a node of this stage, the node is read from the stage memory in the
// same clock edge. In the next cycle the stage evaluates it:
//   - the node's prefix marker, if any, replaces the best match carried by the lookup;
//   - the next address bit selects a child pointer; a valid child sends the lookup on, with the
//     child's stage and address, to the next stage on ring_out;
//   - without a child (or after all 32 bits) the lookup retires here: res_valid pulses with its
//     tag and the best match (RES_MATCH) or RES_NO_MATCH, and its ring slot becomes a bubble.
// A lookup whose next node is in another stage passes through unchanged: a no-op, which lets the
// mapping skip stages.
// Adaptive splitting: a child pointer may be marked as the root of a separately mapped child
// sub-trie (xfer). A lookup following it is offered on redisp_offer; when the top grants it, the
// lookup leaves the ring and is queued again at the child root's stage. A lookup that is not
// granted stays on the ring and is offered again by each following stage; if it reaches the
// child root's stage on the ring first, it simply continues there. The mapping software must keep every path monotonic around the ring and
// shorter than one circle, so that each lookup uses each stage at most once.
//
// Timing: one cycle per stage. ring_out and the result are combinational from the stage's
// registers, so the ring has exactly one register per stage. Node writes (wr_*) come from the
// control plane through a separate write port; a read and write of one address in the same cycle
// return the old node. The ring, the bubble rule for entry, the no-op pass-through and the exit at
// the last node follow the design; the one-cycle synchronous memory, the record formats and the
// separate write port are this implementation's choices, as is keeping an ungranted re-entry on
// the ring. The memory is not cleared by reset.
module camp_stage
  import camp_pkg::*;
#(
  parameter int unsigned STAGE_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // ring
  input  lookup_req_t        ring_in,
  output lookup_req_t        ring_out,
  // request queue of this stage
  input  logic               q_valid,
  input  lookup_req_t        q_head,
  output logic               q_pop,
  // retired lookups
  output logic               res_valid,
  output lookup_res_t        res,
  // activity, for throughput counters
  output logic               access,   // a node of this stage was evaluated this cycle
  output logic               noop,     // a lookup passed through without an access
  // re-entry at a child sub-trie root (adaptive splitting)
  output logic               redisp_offer,  // a lookup bound for a child root is leaving
  output lookup_req_t        redisp_req,    // that lookup
  input  logic               redisp_grant,  // it was taken into that root's queue: drop it here
  // node writes from the control plane
  input  logic               wr_en,
  input  logic [NODE_AW-1:0] wr_addr,
  input  trie_node_t         wr_data
);

  trie_node_t  mem_q [2**NODE_AW];
  trie_node_t  node_q;
  lookup_req_t req_q;
  logic        hit_q;

  lookup_req_t sel;
  logic        sel_hit;

  // Entry on a bubble only.
  assign q_pop   = !ring_in.valid && q_valid;
  assign sel     = ring_in.valid ? ring_in : (q_valid ? q_head : '0);
  assign sel_hit = sel.valid && (sel.stage == STAGE_W'(STAGE_ID));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q <= '0;
      hit_q <= 1'b0;
    end else begin
      req_q <= sel;
      hit_q <= sel_hit;
    end
  end

  always_ff @(posedge clk) begin
    if (sel_hit) node_q <= mem_q[sel.addr];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wr_addr] <= wr_data;
  end

  // Node evaluation.
  logic            bit_val;
  node_ptr_t       nxt;
  logic            best_valid;
  logic [NH_W-1:0] best_nh;
  logic            last_bit;
  lookup_req_t     fwd;

  always_comb begin
    last_bit   = (req_q.depth >= DEPTH_W'(ADDR_W));
    bit_val    = last_bit ? 1'b0 : req_q.daddr[ADDR_W - 1 - int'(req_q.depth)];
    nxt        = last_bit ? '0 : node_q.child[bit_val];
    best_valid = node_q.pfx_valid ? 1'b1 : req_q.best_valid;
    best_nh    = node_q.pfx_valid ? node_q.pfx_nh : req_q.best_nh;

    fwd       = req_q;
    res_valid = 1'b0;
    res       = '0;
    access    = req_q.valid && hit_q;
    noop      = req_q.valid && !hit_q;
    if (access) begin
      if (nxt.valid) begin
        fwd.depth      = req_q.depth + 1'b1;
        fwd.stage      = nxt.stage;
        fwd.addr       = nxt.addr;
        fwd.best_valid = best_valid;
        fwd.best_nh    = best_nh;
        fwd.xfer       = nxt.xfer;
      end else begin
        fwd        = '0;
        res_valid  = 1'b1;
        res.tag    = req_q.tag;
        res.status = best_valid ? RES_MATCH : RES_NO_MATCH;
        res.nh     = best_valid ? best_nh : '0;
      end
    end
    redisp_offer = fwd.valid && fwd.xfer;
    redisp_req   = fwd;
    ring_out     = (redisp_offer && redisp_grant) ? lookup_req_t'('0) : fwd;
  end

  // Within a sub-trie the mapping must never send a lookup back into the stage it is leaving.
  a_monotonic: assert property (@(posedge clk) disable iff (!rst_n)
                                (access && nxt.valid && !nxt.xfer) |-> (nxt.stage != STAGE_W'(STAGE_ID)));

endmodule
