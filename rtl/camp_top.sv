// camp_top: CAMP IPv4 longest-prefix-match engine (circular, adaptive and monotonic pipeline).
//
// The routing trie is split into a root part, resolved by a direct lookup table on the first
// INIT_STRIDE address bits, and up to 2**INIT_STRIDE uni-bit sub-tries whose nodes are spread over
// NUM_STAGES memory stages connected in a ring. A lookup flows through four parts:
//   1. dispatcher: accepts up to LANES destination addresses per cycle (one per lane; each lane
//      has its own copy of the direct table, all copies written together), takes a reorder tag
//      per address and reads the direct table. If the entry has no sub-trie the answer is known and is written to the
//      reorder buffer at once. Otherwise the lookup is queued at the stage holding the sub-trie
//      root, or discarded (RES_DROPPED) when that queue has no room. Lanes bound for the same
//      queue in one cycle are written into it together, lowest lane first.
//   2. request queues (req_queue), one per stage: a lookup waits there until an empty slot
//      passes its stage, so a blocked lookup never holds up lookups bound for other stages.
//   3. the ring of camp_stage instances: each stage reads at most one node per cycle, forwards the
//      lookup towards its next node (passing untouched through stages that do not hold it) and
//      retires it at its last node, which frees the slot for new entries downstream.
//   4. reorder_buffer: results come back in arrival order, up to LANES per cycle.
// Adaptive splitting: a trie that cannot be cut evenly by the initial stride alone may be split
// further into a parent sub-trie and child sub-tries, each mapped on the ring on its own. A lookup
// reaching a child root pointer leaves the ring and re-enters through the request queue of the
// child root's stage (one re-entry per cycle, round-robin; redispatch flags one).
// Because lookups leave the ring as soon as they finish, more than one lookup per cycle can enter
// the ring when paths are shorter than the ring; LANES > 1 lets the input keep up with that.
//
// Interface: in_valid[k]/in_daddr[k] per lane and one in_ready (lane k is accepted when
// in_valid[k] && in_ready; lower lanes are older), out_valid[k]/out_res[k] and one out_ready
// (out_valid is a run of ones from lane 0; all valid lanes are taken when out_ready). Tables are written by the control plane through dt_wr_* (direct table) and
// node_wr_* (node of one stage). dispatch_cnt counts lookups entering the ring this cycle,
// retire_cnt those leaving it, access_cnt the stages reading a node, noop_cnt the stages passing
// a lookup through untouched, drop[k] flags a discarded lookup of lane k. The busy fraction of the ring
// (access_cnt + noop_cnt) / NUM_STAGES is its utilization; dispatches per cycle is its rate.
// Latency: 2 cycles from acceptance to the queue, one cycle per stage on the ring, at least one
// cycle in the reorder buffer. The 25 stages and 8-bit initial stride (uni-bit sub-tries) and the
// 32-entry queues follow the design's evaluated configuration; the record widths, the 256-lookup
// reorder window, the discard on a full queue, the lane structure of a wider input (default one
// lane) and the separate write ports are this implementation's choices.
module camp_top
  import camp_pkg::*;
#(
  parameter int unsigned NUM_STAGES  = 25,
  parameter int unsigned INIT_STRIDE = 8,
  parameter int unsigned QUEUE_DEPTH = 32,
  parameter int unsigned ROB_DEPTH   = 256,
  parameter int unsigned LANES       = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // lookups
  input  logic [LANES-1:0]              in_valid,
  input  logic [LANES-1:0][ADDR_W-1:0]  in_daddr,
  output logic                          in_ready,
  output logic [LANES-1:0]              out_valid,
  output lookup_res_t [LANES-1:0]       out_res,
  input  logic                          out_ready,
  // control plane
  input  logic                          dt_wr_en,
  input  logic [INIT_STRIDE-1:0]        dt_wr_idx,
  input  dt_entry_t                     dt_wr_data,
  input  logic                          node_wr_en,
  input  logic [STAGE_W-1:0]            node_wr_stage,
  input  logic [NODE_AW-1:0]            node_wr_addr,
  input  trie_node_t                    node_wr_data,
  // activity
  output logic [$clog2(NUM_STAGES+2)-1:0] dispatch_cnt,
  output logic [$clog2(NUM_STAGES+2)-1:0] retire_cnt,
  output logic [$clog2(NUM_STAGES+2)-1:0] access_cnt,
  output logic [$clog2(NUM_STAGES+2)-1:0] noop_cnt,
  output logic [LANES-1:0]              drop,
  output logic                          redispatch
);

  localparam int unsigned NS = NUM_STAGES;
  localparam int unsigned CW = $clog2(NUM_STAGES + 2);

  // ---------------------------------------------------------------- dispatcher
  localparam int unsigned QW = $clog2(QUEUE_DEPTH + 1);

  logic [LANES-1:0]             accept;
  logic [LANES-1:0][TAG_W-1:0]  alloc_tag;
  logic [LANES-1:0]             d1_valid_q;
  logic [TAG_W-1:0]             d1_tag_q   [LANES];
  logic [ADDR_W-1:0]            d1_daddr_q [LANES];
  dt_entry_t                    dt_rd      [LANES];

  assign accept = in_valid & {LANES{in_ready}};

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    direct_table #(.INIT_STRIDE(INIT_STRIDE)) u_dt (
      .clk     (clk),
      .rd_en   (accept[k]),
      .rd_idx  (in_daddr[k][ADDR_W-1 -: INIT_STRIDE]),
      .rd_data (dt_rd[k]),
      .wr_en   (dt_wr_en),
      .wr_idx  (dt_wr_idx),
      .wr_data (dt_wr_data)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d1_valid_q[k] <= 1'b0;
        d1_tag_q[k]   <= '0;
        d1_daddr_q[k] <= '0;
      end else begin
        d1_valid_q[k] <= accept[k];
        if (accept[k]) begin
          d1_tag_q[k]   <= alloc_tag[k];
          d1_daddr_q[k] <= in_daddr[k];
        end
      end
    end
  end

  logic [NS-1:0]    q_full;
  logic [QW-1:0]    q_level   [NS];
  logic [LANES-1:0] disp_push [NS];     // disp_push[s][k]: lane k is written into queue s
  lookup_req_t      lane_req  [LANES];
  logic [LANES-1:0] disp_res_valid;
  lookup_res_t      disp_res  [LANES];

  always_comb begin
    for (int s = 0; s < NS; s++) disp_push[s] = '0;
    drop = '0;
    for (int k = 0; k < LANES; k++) begin
      int unsigned rank;
      lane_req[k]            = '0;
      lane_req[k].valid      = 1'b1;
      lane_req[k].tag        = d1_tag_q[k];
      lane_req[k].daddr      = d1_daddr_q[k];
      lane_req[k].depth      = DEPTH_W'(INIT_STRIDE);
      lane_req[k].stage      = dt_rd[k].root.stage;
      lane_req[k].addr       = dt_rd[k].root.addr;
      lane_req[k].best_valid = dt_rd[k].pfx_valid;
      lane_req[k].best_nh    = dt_rd[k].pfx_nh;

      disp_res_valid[k] = 1'b0;
      disp_res[k]       = '0;
      disp_res[k].tag   = d1_tag_q[k];

      // Lower lanes bound for the same queue this cycle are written first.
      rank = 0;
      for (int j = 0; j < k; j++) begin
        if (d1_valid_q[j] && dt_rd[j].root.valid && dt_rd[j].root.stage == dt_rd[k].root.stage)
          rank = rank + 1;
      end

      if (d1_valid_q[k]) begin
        if (!dt_rd[k].root.valid) begin
          // Resolved by the direct table alone.
          disp_res_valid[k]  = 1'b1;
          disp_res[k].status = dt_rd[k].pfx_valid ? RES_MATCH : RES_NO_MATCH;
          disp_res[k].nh     = dt_rd[k].pfx_valid ? dt_rd[k].pfx_nh : '0;
        end else if (int'(q_level[dt_rd[k].root.stage]) + rank >= QUEUE_DEPTH) begin
          disp_res_valid[k]  = 1'b1;
          disp_res[k].status = RES_DROPPED;
          drop[k]            = 1'b1;
        end else begin
          disp_push[dt_rd[k].root.stage][k] = 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- re-entry arbiter
  // Lookups leaving a parent sub-trie for a child sub-trie root are offered by the stage they
  // leave. One per cycle is queued at the child root's stage, chosen round-robin among offers
  // whose queue is not full and is not being written by the dispatcher in the same cycle.
  lookup_req_t   ring [NS];     // ring[i]: output of stage i, input of stage i+1
  logic [NS-1:0] rd_offer, rd_grant, rd_push;
  lookup_req_t   rd_data;
  lookup_req_t   rd_req [NS];
  logic          rd_found;
  logic [STAGE_W-1:0] rr_q;     // stage with the highest priority

  always_comb begin
    rd_grant = '0;
    rd_push  = '0;
    rd_data  = '0;
    rd_found = 1'b0;
    for (int k = 0; k < NS; k++) begin
      logic [STAGE_W-1:0] s;
      int unsigned t;
      s = STAGE_W'((int'(rr_q) + k) % NS);
      t = int'(rd_req[s].stage);
      if (rd_offer[s] && !rd_found && t < NS && !q_full[t] && disp_push[t] == '0) begin
        rd_found     = 1'b1;
        rd_grant[s]  = 1'b1;
        rd_push[t]   = 1'b1;
        rd_data      = rd_req[s];
        rd_data.xfer = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (rd_grant != '0) rr_q <= (int'(rr_q) == NS - 1) ? '0 : rr_q + 1'b1;
  end

  // ---------------------------------------------------------------- queues and ring
  logic [NS-1:0] q_valid, q_pop, st_res_valid, st_access, st_noop;
  lookup_req_t   q_head [NS];
  lookup_res_t   rob_wr_res [NS+LANES];
  logic [NS+LANES-1:0] rob_wr_valid;
  logic [LANES-1:0]    q_push      [NS];
  lookup_req_t [LANES-1:0] q_push_data [NS];

  // A queue takes either the dispatch lanes bound for it or, when none is, one re-entering lookup.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (disp_push[s] != '0) begin
        q_push[s] = disp_push[s];
        for (int k = 0; k < LANES; k++) q_push_data[s][k] = lane_req[k];
      end else begin
        q_push[s]         = LANES'(rd_push[s]);
        q_push_data[s]    = '0;
        q_push_data[s][0] = rd_data;
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    req_queue #(.DEPTH(QUEUE_DEPTH), .NUM_PUSH(LANES)) u_q (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (q_push[s]),
      .push_data  (q_push_data[s]),
      .full       (q_full[s]),
      .pop        (q_pop[s]),
      .head_valid (q_valid[s]),
      .head       (q_head[s]),
      .level      (q_level[s])
    );

    camp_stage #(.STAGE_ID(s)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .ring_in   (ring[(s + NS - 1) % NS]),
      .ring_out  (ring[s]),
      .q_valid   (q_valid[s]),
      .q_head    (q_head[s]),
      .q_pop     (q_pop[s]),
      .res_valid (st_res_valid[s]),
      .res       (rob_wr_res[s]),
      .access    (st_access[s]),
      .noop      (st_noop[s]),
      .redisp_offer (rd_offer[s]),
      .redisp_req   (rd_req[s]),
      .redisp_grant (rd_grant[s]),
      .wr_en     (node_wr_en && (node_wr_stage == STAGE_W'(s))),
      .wr_addr   (node_wr_addr),
      .wr_data   (node_wr_data)
    );
  end

  assign rob_wr_valid = {disp_res_valid, st_res_valid};
  assign redispatch   = (rd_grant != '0);
  for (genvar k = 0; k < LANES; k++) begin : g_disp_res
    assign rob_wr_res[NS + k] = disp_res[k];
  end

  always_comb begin
    dispatch_cnt = '0;
    retire_cnt   = '0;
    access_cnt   = '0;
    noop_cnt     = '0;
    for (int s = 0; s < NS; s++) begin
      dispatch_cnt = dispatch_cnt + CW'(q_pop[s]);
      retire_cnt   = retire_cnt + CW'(st_res_valid[s]);
      access_cnt   = access_cnt + CW'(st_access[s]);
      noop_cnt     = noop_cnt + CW'(st_noop[s]);
    end
  end

  // ---------------------------------------------------------------- reorder buffer
  reorder_buffer #(.DEPTH(ROB_DEPTH), .NUM_WR(NS + LANES), .LANES(LANES)) u_rob (
    .clk         (clk),
    .rst_n       (rst_n),
    .alloc_ready (in_ready),
    .alloc       (in_valid),
    .alloc_tag   (alloc_tag),
    .wr_valid    (rob_wr_valid),
    .wr_res      (rob_wr_res),
    .out_valid   (out_valid),
    .out_res     (out_res),
    .out_ready   (out_ready),
    .in_flight   ()
  );

  initial begin
    assert (NUM_STAGES >= 2 && NUM_STAGES <= 2**STAGE_W)
      else $error("camp_top: NUM_STAGES out of range");
    assert (INIT_STRIDE >= 1 && INIT_STRIDE < ADDR_W)
      else $error("camp_top: INIT_STRIDE out of range");
    assert (ROB_DEPTH <= 2**TAG_W)
      else $error("camp_top: ROB_DEPTH exceeds the tag range");
    assert (LANES >= 1 && LANES <= NUM_STAGES)
      else $error("camp_top: LANES out of range");
  end

  for (genvar k = 0; k < LANES; k++) begin : g_chk
    a_root_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                      (d1_valid_q[k] && dt_rd[k].root.valid) |-> (int'(dt_rd[k].root.stage) < NS));
  end

endmodule
