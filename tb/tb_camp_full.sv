// tb_camp_full: the CAMP lookup engine at its default size (25 stages, 8-bit initial stride,
// 32-entry request queues, 256-lookup reorder window), with a routing table of about 100,000
// prefixes shaped like a backbone table (clustered in allocated /16 blocks, most prefixes
// /16../24, under 1% longer than /24), sub-trie roots on random stages and random stage skips.
// The table is loaded through the control-plane ports, then 20000 lookups arrive at 0.8 per
// cycle on average, followed by 5000 back to back. Every answer is checked, in order, against a
// longest-prefix match computed from the prefix list. Reported: discards (none are expected with 32-entry queues),
// the mean time from acceptance to answer, lookups entering the ring per cycle and ring
// utilization.
module tb_camp_full;
  import camp_pkg::*;
  import camp_model_pkg::*;

  localparam int unsigned NS = 25;
  localparam int unsigned IS = 8;
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

  camp_top dut (.*);

  always #5 clk = ~clk;

  camp_model m;
  int checks = 0, failures = 0;
  lookup_res_t exp_q [$];
  int t_q [$];
  int accepted = 0, released = 0, cycle = 0, n_drop = 0, n_match = 0, n_nomatch = 0;
  longint delay_sum = 0, disp_total = 0, busy_total = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        lookup_res_t e;
        e = m.ref_lookup(in_daddr);
        e.tag = TAG_W'(accepted);
        exp_q.push_back(e);
        t_q.push_back(cycle);
        accepted++;
      end
      if (out_valid && out_ready) begin
        lookup_res_t e;
        checks++;
        e = exp_q.pop_front();
        delay_sum += longint'(cycle - t_q.pop_front());
        if (out_res.status == RES_DROPPED && out_res.tag == e.tag) n_drop++;
        else if (out_res !== e) begin
          failures++;
          $display("FAIL got %p expected %p", out_res, e);
        end else if (e.status == RES_MATCH) n_match++;
        else n_nomatch++;
        released++;
      end
      disp_total += longint'(dispatch_cnt);
      busy_total += longint'(access_cnt) + longint'(noop_cnt);
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rand_len();
    int r;
    r = $urandom_range(999);
    if (r < 8)   return $urandom_range(32, 25);   // under 1% longer than /24
    if (r < 520) return 24;
    if (r < 600) return $urandom_range(15, 9);
    return $urandom_range(23, 16);
  endfunction

  function automatic logic [31:0] rand_addr();
    if ($urandom_range(9) < 9) return m.addr_under($urandom_range(m.plen.size() - 1));
    return $urandom;
  endfunction

  initial begin
    int c0;
    longint d0, b0;
    m = new(NS, IS);
    for (int i = 0; i < 40; i++) m.add_prefix($urandom, $urandom_range(IS, 4), $urandom_range(255));
    // Address blocks: 200 sub-tries, each with 25 allocated /16 blocks of 20 routes.
    for (int t = 0; t < 200; t++) begin
      int top;
      top = $urandom_range(2**IS - 1);
      for (int b = 0; b < 25; b++) begin
        logic [31:0] blk;
        blk = (32'(top) << 24) | (32'($urandom_range(255)) << 16);
        for (int i = 0; i < 20; i++) begin
          int len;
          len = rand_len();
          if (len < 16) m.add_under(top, len);
          else m.add_prefix(blk | ({$urandom} & 32'h0000_FFFF), len, $urandom_range(255));
        end
      end
    end
    m.build();
    $display("prefixes=%0d trie nodes=%0d largest stage=%0d of %0d nodes, skipped stages=%0d",
             m.plen.size(), m.nodes.size(), m.max_stage_fill(), 2**NODE_AW, m.skips);
    checks++;
    if (m.max_stage_fill() > 2**NODE_AW) begin
      failures++;
      $display("FAIL table does not fit");
    end

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
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

    // 0.8 lookups per cycle.
    c0 = cycle; d0 = disp_total; b0 = busy_total;
    for (int k = 0; k < 25000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) < 8); in_daddr = rand_addr();
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    $display("rate 0.8: lookups=%0d dropped=%0d mean delay=%0.1f cycles, into ring per cycle=%0.3f, ring utilization=%0.3f",
             accepted, n_drop, real'(delay_sum) / real'(released),
             real'(disp_total - d0) / real'(cycle - c0),
             real'(busy_total - b0) / real'(NS * (cycle - c0)));
    checks++;
    if (n_drop != 0) begin
      failures++;
      $display("FAIL %0d lookups discarded at 0.8 per cycle", n_drop);
    end

    // Back to back.
    c0 = cycle; d0 = disp_total;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_daddr = rand_addr();
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    $display("back to back: into ring per cycle=%0.3f, total lookups=%0d dropped=%0d match=%0d no_match=%0d",
             real'(disp_total - d0) / real'(cycle - c0), accepted, n_drop, n_match, n_nomatch);
    checks++;
    if (released != accepted || n_match == 0 || n_nomatch == 0) begin
      failures++;
      $display("FAIL answers=%0d lookups=%0d", released, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
