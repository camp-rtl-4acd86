// tb_camp_top: end-to-end self-checking test of the CAMP lookup engine.
//
// A random routing table (short prefixes resolved by the direct table, sub-tries of /9../24
// prefixes and a few /25../32) is built by camp_model, mapped onto the 25-stage ring with random
// root stages and random stage skips, and written through the control-plane ports. Lookups are
// then checked against a longest-prefix match computed from the prefix list, in arrival order, with their tags.
// Phases: isolated lookups (latency = 4 + stage offset of the last node, 2 when the direct table
// answers), saturated random traffic (throughput and utilization reported), a directed burst in
// which a train of /32 lookups entering one stage blocks the stage behind it long enough to fill
// its queue, and a phase with the output held back so the reorder window fills.
// The request queues are reduced to 4 entries so that the discard path is reached; every other
// parameter is at its default. Each mechanism (bubble wait, no-op pass, wraparound, discard,
// direct-table answer, out-of-order completion, several entries in one cycle, back-pressure,
// re-entry at a child sub-trie, table writes under traffic) is
// counted and must occur. One sub-trie begins with a long skinny section (all routes under one
// /16) and is split into child sub-tries at depth 18, so its lookups re-enter the ring through a
// second request queue; their latency is not fixed and is not checked. A last phase adds a route
// while lookups are running (nodes first, then the table entry pointing at them) and checks both
// the undisturbed lookups and the new route.
module tb_camp_top;
  import camp_pkg::*;
  import camp_model_pkg::*;

  localparam int unsigned NS = 25;
  localparam int unsigned IS = 8;
  localparam int unsigned QD = 4;
  localparam int unsigned CW = $clog2(NS + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic [31:0] in_daddr = '0;
  lookup_res_t out_res;
  logic dt_wr_en = 1'b0, node_wr_en = 1'b0;
  logic [IS-1:0] dt_wr_idx = '0;
  dt_entry_t dt_wr_data = '0;
  logic [STAGE_W-1:0] node_wr_stage = '0;
  logic [NODE_AW-1:0] node_wr_addr = '0;
  trie_node_t node_wr_data = '0;
  logic [CW-1:0] dispatch_cnt, retire_cnt, access_cnt, noop_cnt;
  logic drop, redispatch;

  camp_top #(.QUEUE_DEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

  camp_model m;
  int checks = 0, failures = 0;
  lookup_res_t exp_q [$];
  logic [31:0] addr_q [$];
  int accepted = 0, released = 0, cycle = 0;
  // mechanism counters
  int n_wait = 0, n_noop = 0, n_wrap = 0, n_drop = 0, n_dtonly = 0, n_ooo = 0, n_multi = 0,
      n_bp = 0, n_match = 0, n_nomatch = 0, n_redisp = 0, n_live = 0;
  longint disp_total = 0, busy_total = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        lookup_res_t e;
        e = m.ref_lookup(in_daddr);
        e.tag = TAG_W'(accepted);
        exp_q.push_back(e);
        addr_q.push_back(in_daddr);
        accepted++;
      end
      if (in_valid && !in_ready) n_bp++;
      if (out_valid && out_ready) begin
        lookup_res_t e;
        logic [31:0] a;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL result with nothing outstanding: %p", out_res);
        end else begin
          e = exp_q.pop_front();
          a = addr_q.pop_front();
          if (out_res.status == RES_DROPPED && out_res.tag == e.tag) n_drop++;
          else if (out_res !== e) begin
            failures++;
            $display("FAIL lookup %h: got %p expected %p", a, out_res, e);
          end else if (e.status == RES_MATCH) n_match++;
          else n_nomatch++;
        end
        released++;
      end
      for (int s = 0; s < NS; s++) begin
        if (dut.q_valid[s] && !dut.q_pop[s]) n_wait++;
        if (dut.st_res_valid[s] && dut.rob_wr_res[s].tag != TAG_W'(dut.u_rob.head_q)) n_ooo++;
      end
      if (dut.ring[NS-1].valid) n_wrap++;
      if (dut.disp_res_valid && !drop) n_dtonly++;
      if (noop_cnt != 0) n_noop++;
      if (redispatch) n_redisp++;
      if (dispatch_cnt > 1) n_multi++;
      disp_total += longint'(dispatch_cnt);
      busy_total += longint'(access_cnt) + longint'(noop_cnt);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_tables();
    for (int t = 0; t < 2**IS; t++) begin
      @(negedge clk);
      dt_wr_en = 1'b1; dt_wr_idx = IS'(t); dt_wr_data = m.dt_word(t);
    end
    @(negedge clk);
    dt_wr_en = 1'b0;
    for (int n = 0; n < m.nodes.size(); n++) begin
      @(negedge clk);
      node_wr_en = 1'b1;
      node_wr_stage = STAGE_W'(m.nodes[n].stage);
      node_wr_addr = NODE_AW'(m.nodes[n].addr);
      node_wr_data = m.node_word(n);
    end
    @(negedge clk);
    node_wr_en = 1'b0;
  endtask

  function automatic logic [31:0] rand_addr();
    if ($urandom_range(9) < 8) return m.addr_under($urandom_range(m.plen.size() - 1));
    return $urandom;
  endfunction

  task automatic drain();
    int guard;
    @(negedge clk);
    in_valid = 1'b0;
    guard = 0;
    while (exp_q.size() != 0 && guard < 5000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  task automatic send(input logic [31:0] a);
    @(negedge clk);
    in_valid = 1'b1; in_daddr = a;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    int long_a[$], idx_b[$];
    m = new(NS, IS);
    // Direct-table prefixes.
    for (int i = 0; i < 12; i++) m.add_prefix($urandom, $urandom_range(IS, 2), $urandom_range(255));
    // Two neighbouring sub-tries: 0x0A rooted at stage 5 holding /32 routes, 0x0B at stage 4.
    m.root_stage[8'h0A] = 5;
    m.root_stage[8'h0B] = 4;
    for (int i = 0; i < 12; i++) m.add_under(8'h0A, 32);
    for (int i = 0; i < 10; i++) m.add_under(8'h0A, $urandom_range(24, 9));
    for (int i = 0; i < 20; i++) m.add_under(8'h0B, $urandom_range(20, 9));
    // A trie that begins with a long skinny section: everything under 0x0C5A/16. It is split
    // into child sub-tries at depth 18, each mapped on its own.
    m.split_depth[8'h0C] = 18;
    for (int i = 0; i < 24; i++)
      m.add_prefix(32'h0C5A_0000 | ({$urandom} & 32'h0000_FFFF), $urandom_range(28, 17), $urandom_range(255));
    // Other sub-tries.
    for (int t = 0; t < 16; t++) begin
      int top;
      top = $urandom_range(2**IS - 1);
      for (int i = 0; i < 12; i++) m.add_under(top, $urandom_range(24, 9));
      m.add_under(top, $urandom_range(32, 25));
    end
    m.build();
    foreach (m.plen[i]) begin
      if (m.plen[i] == 32) long_a.push_back(i);
      if (m.pval[i][31:24] == 8'h0B && m.plen[i] > IS) idx_b.push_back(i);
    end
    $display("prefixes=%0d trie nodes=%0d largest stage=%0d skipped stages=%0d child sub-tries=%0d",
             m.plen.size(), m.nodes.size(), m.max_stage_fill(), m.skips, m.n_child_roots);

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load_tables();

    // Phase 1: isolated lookups, latency check.
    for (int k = 0; k < 200; k++) begin
      logic [31:0] a;
      int lo, t0, lat, want;
      a = rand_addr();
      lo = m.last_offset(a);
      want = (lo == -1) ? 2 : 4 + lo;
      send(a);
      t0 = cycle;
      while (!out_valid) @(posedge clk);
      lat = cycle - t0 + 1;
      if (lo == -2) begin
        drain();
        continue;
      end
      checks++;
      if (lat != want) begin
        failures++;
        $display("FAIL latency of %h: %0d cycles, expected %0d", a, lat, want);
      end
      drain();
    end

    // Phase 2: saturated random traffic.
    begin
      longint d0, b0;
      int c0;
      d0 = disp_total; b0 = busy_total; c0 = cycle;
      for (int k = 0; k < 4000; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_daddr = rand_addr();
        @(posedge clk);
      end
      $display("saturated: %0d cycles, lookups into ring per cycle=%0.3f, ring utilization=%0.3f",
               cycle - c0, real'(disp_total - d0) / real'(cycle - c0),
               real'(busy_total - b0) / real'(NS * (cycle - c0)));
      drain();
    end

    // Phase 3: a train of /32 lookups entering stage 5 passes stage 4 about 24 cycles later,
    // while lookups for the sub-trie rooted at stage 4 arrive: their queue fills.
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_daddr = m.addr_under(long_a[$urandom_range(long_a.size() - 1)]);
        @(posedge clk);
      end
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_daddr = m.addr_under(idx_b[$urandom_range(idx_b.size() - 1)]);
        @(posedge clk);
      end
      drain();
    end

    // Phase 4: output held back; the reorder window fills and the input is held off.
    @(negedge clk);
    out_ready = 1'b0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_daddr = rand_addr();
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    out_ready = 1'b1;
    drain();

    // Phase 5: random traffic with random gaps and output stalls.
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) < 8); in_daddr = rand_addr();
      out_ready = ($urandom_range(9) < 9);
      @(posedge clk);
    end
    @(negedge clk);
    out_ready = 1'b1;
    drain();

    // Phase 6: live update. A new /32 route in an unused sub-trie is written while random
    // lookups keep flowing: its 25 nodes first, deepest first, then the direct-table entry that
    // points at them. Afterwards lookups of the new route must return its next hop.
    begin
      int top, rs;
      int na [25];
      logic [31:0] route;
      dt_entry_t e;
      top = 1;
      while (m.root_of.exists(top) || top == 8'h0A || top == 8'h0B || top == 8'h0C) top++;
      route = (32'(top) << 24) | ({$urandom} & 32'h00FF_FFFF);
      rs = $urandom_range(NS - 1);
      for (int k = 0; k < 25; k++) begin
        na[k] = m.next_addr[(rs + k) % NS];
        m.next_addr[(rs + k) % NS]++;
      end
      fork
        begin
          for (int k = 0; k < 600; k++) begin
            @(negedge clk);
            in_valid = 1'b1; in_daddr = rand_addr();
            @(posedge clk);
          end
        end
        begin
          repeat (100) @(negedge clk);
          for (int k = 24; k >= 0; k--) begin
            trie_node_t n;
            int d;
            d = IS + k;
            n = '0;
            if (d == 32) begin
              n.pfx_valid = 1'b1;
              n.pfx_nh = 8'd77;
            end else begin
              n.child[route[31 - d]].valid = 1'b1;
              n.child[route[31 - d]].stage = STAGE_W'((rs + k + 1) % NS);
              n.child[route[31 - d]].addr  = NODE_AW'(na[k + 1]);
            end
            @(negedge clk);
            node_wr_en = 1'b1;
            node_wr_stage = STAGE_W'((rs + k) % NS);
            node_wr_addr = NODE_AW'(na[k]);
            node_wr_data = n;
            if (exp_q.size() != 0) n_live++;
            repeat (3) @(negedge clk);
            node_wr_en = 1'b0;
          end
          e = m.dt_word(top);
          e.root.valid = 1'b1;
          e.root.stage = STAGE_W'(rs);
          e.root.addr  = NODE_AW'(na[0]);
          @(negedge clk);
          dt_wr_en = 1'b1; dt_wr_idx = IS'(top); dt_wr_data = e;
          if (exp_q.size() != 0) n_live++;
          @(negedge clk);
          dt_wr_en = 1'b0;
        end
      join
      drain();
      m.add_prefix(route, 32, 77);
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_daddr = (k % 2 == 0) ? route : rand_addr();
        @(posedge clk);
      end
      drain();
    end

    checks++;
    if (exp_q.size() != 0 || released != accepted) begin
      failures++;
      $display("FAIL %0d lookups never answered", accepted - released);
    end
    $display("lookups=%0d match=%0d no_match=%0d dropped=%0d", accepted, n_match, n_nomatch, n_drop);
    $display("mechanisms: queue_wait=%0d noop=%0d wraparound=%0d drop=%0d table_only=%0d out_of_order=%0d multi_entry=%0d backpressure=%0d reentry=%0d live_update_writes=%0d",
             n_wait, n_noop, n_wrap, n_drop, n_dtonly, n_ooo, n_multi, n_bp, n_redisp, n_live);
    checks++;
    if (n_wait == 0 || n_noop == 0 || n_wrap == 0 || n_drop == 0 || n_dtonly == 0 || n_ooo == 0
        || n_multi == 0 || n_bp == 0 || n_match == 0 || n_nomatch == 0 || n_redisp == 0
        || n_live == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
