// tb_camp_lanes: the CAMP lookup engine with a four-lane input on a 32-stage ring, the case in
// which more than one lookup per cycle enters the ring. Sub-trie paths are short against the ring
// (routes /12 to /20 under an 8-bit direct table: at most 13 nodes on 32 stages), so the ring has
// room for about 2.5 to 3 lookups per cycle, and four lanes offer more than that.
// Every answer is compared, in arrival order, with a longest-prefix match computed from the
// prefix list. The bench checks that out_valid is always a run of ones from lane 0, that answers
// leave several per cycle, that lanes bound for the same queue in one cycle are all handled, and
// that the sustained rate into the ring is above 1.5 lookups per cycle.
module tb_camp_lanes;
  import camp_pkg::*;
  import camp_model_pkg::*;

  localparam int unsigned NS = 32;
  localparam int unsigned IS = 8;
  localparam int unsigned L  = 4;
  localparam int unsigned CW = $clog2(NS + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [L-1:0] in_valid = '0, out_valid, drop;
  logic [L-1:0][31:0] in_daddr = '0;
  logic in_ready, out_ready = 1'b1;
  lookup_res_t [L-1:0] out_res;
  logic dt_wr_en = 1'b0, node_wr_en = 1'b0;
  logic [IS-1:0] dt_wr_idx = '0;
  dt_entry_t dt_wr_data = '0;
  logic [STAGE_W-1:0] node_wr_stage = '0;
  logic [NODE_AW-1:0] node_wr_addr = '0;
  trie_node_t node_wr_data = '0;
  logic [CW-1:0] dispatch_cnt, retire_cnt, access_cnt, noop_cnt;
  logic redispatch;

  camp_top #(.NUM_STAGES(NS), .INIT_STRIDE(IS), .LANES(L)) dut (.*);

  always #5 clk = ~clk;

  camp_model m;
  int checks = 0, failures = 0;
  lookup_res_t exp_q [$];
  int accepted = 0, released = 0, cycle = 0;
  int n_drop = 0, n_match = 0, n_nomatch = 0, n_multi_in = 0, n_multi_out = 0, n_same_q = 0;
  int n_multi_disp = 0, n_bp = 0;
  longint disp_total = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      automatic int n_in = $countones(in_valid & {L{in_ready}});
      automatic int n_out = 0;
      automatic int st [$] = {};
      for (int k = 0; k < L; k++) begin
        if (in_valid[k] && in_ready) begin
          lookup_res_t e;
          dt_entry_t d;
          e = m.ref_lookup(in_daddr[k]);
          e.tag = TAG_W'(accepted);
          exp_q.push_back(e);
          accepted++;
          d = m.dt_word(int'(in_daddr[k][31 -: IS]));
          if (d.root.valid) begin
            foreach (st[i]) if (st[i] == int'(d.root.stage)) n_same_q++;
            st.push_back(int'(d.root.stage));
          end
        end
      end
      if (n_in > 1) n_multi_in++;
      if (in_valid != '0 && !in_ready) n_bp++;
      for (int k = 0; k < L; k++) begin
        if (k > 0 && out_valid[k] && !out_valid[k-1]) begin
          failures++;
          $display("FAIL out_valid=%b is not a run of ones from lane 0", out_valid);
        end
        if (out_valid[k] && out_ready) begin
          lookup_res_t e;
          checks++;
          e = exp_q.pop_front();
          if (out_res[k].status == RES_DROPPED && out_res[k].tag == e.tag) n_drop++;
          else if (out_res[k] !== e) begin
            failures++;
            $display("FAIL lane %0d got %p expected %p", k, out_res[k], e);
          end else if (e.status == RES_MATCH) n_match++;
          else n_nomatch++;
          released++;
          n_out++;
        end
      end
      if (n_out > 1) n_multi_out++;
      if (dispatch_cnt > 1) n_multi_disp++;
      disp_total += longint'(dispatch_cnt);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_addr();
    if ($urandom_range(9) < 9) return m.addr_under($urandom_range(m.plen.size() - 1));
    return $urandom;
  endfunction

  task automatic drive(int cycles, int pct, bit stall_out);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int k = 0; k < L; k++) begin
        // A lane keeps its address until it is taken.
        if (!(in_valid[k] && !in_ready)) begin
          in_valid[k] = ($urandom_range(99) < pct);
          in_daddr[k] = rand_addr();
        end
      end
      out_ready = !(stall_out && (c % 50) < 10);
    end
    @(negedge clk);
    in_valid  = '0;
    out_ready = 1'b1;
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    int c0;
    longint d0;
    real lpc;
    m = new(NS, IS);
    for (int i = 0; i < 20; i++) m.add_prefix($urandom, $urandom_range(IS, 4), $urandom_range(255));
    for (int t = 0; t < 2**IS; t++) begin
      if ($urandom_range(9) == 0) continue;     // some entries are answered by the table alone
      for (int i = 0; i < 30; i++) begin
        int len;
        len = $urandom_range(20, 12);
        m.add_prefix((32'(t) << 24) | ({$urandom} & 32'h00FF_FFFF), len, $urandom_range(255));
      end
    end
    m.build();
    $display("prefixes=%0d trie nodes=%0d largest stage=%0d", m.plen.size(), m.nodes.size(),
             m.max_stage_fill());

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

    // Saturated input: every lane offers a lookup every cycle.
    c0 = cycle; d0 = disp_total;
    drive(6000, 100, 1'b0);
    lpc = real'(disp_total - d0) / real'(cycle - c0);
    $display("saturated: into ring per cycle=%0.3f (lookups=%0d, dropped=%0d)", lpc, accepted, n_drop);
    checks++;
    if (lpc < 1.5) begin
      failures++;
      $display("FAIL rate into the ring %0.3f is below 1.5 per cycle", lpc);
    end

    // Partly loaded lanes and a stalling output.
    drive(4000, 40, 1'b1);

    $display("mechanisms: multi_accept=%0d same_queue_lanes=%0d multi_dispatch=%0d multi_release=%0d backpressure=%0d drop=%0d match=%0d no_match=%0d",
             n_multi_in, n_same_q, n_multi_disp, n_multi_out, n_bp, n_drop, n_match, n_nomatch);
    checks++;
    if (n_multi_in == 0 || n_same_q == 0 || n_multi_disp == 0 || n_multi_out == 0 || n_bp == 0 ||
        n_match == 0 || n_nomatch == 0 || released != accepted) begin
      failures++;
      $display("FAIL a mechanism never happened or answers are missing (%0d of %0d)", released, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
