// tb_camp_lpc: lookups per cycle of the CAMP ring against request-queue size.
//
// Set-up: 24 stages and a 9-bit initial stride, so that a /32 route is a chain of 24 trie nodes
// and its lookup makes one complete circle of the ring. Every value of the first 9 bits holds
// one /32 route whose chain starts at stage (index mod 24), so the choice of address chooses the
// entry stage. Four engines with request queues of 1, 8, 16 and 32 entries receive the same
// stream of one lookup per cycle. Entry-stage patterns: uniformly random; bursts of 2, 8, 24,
// 40, 64 and 96 lookups at one random stage; and weighted random (a third of the stages get
// most of the traffic). A lookup that finds its queue full is discarded, so the rate at which
// lookups enter the ring (LPC) is what the ring sustains under a continuous backlog.
// When the 256-lookup reorder window is full an engine holds its input until it has room.
// Checked: every answer that is not a discard is the right next hop, in order; LPC does not fall (by more than the 0.05 sampling noise) as the queues grow; and with 32-entry queues LPC is at
// least 0.75 for every pattern. The table of LPC values is printed.
module tb_camp_lpc;
  import camp_pkg::*;

  localparam int unsigned NS = 24;
  localparam int unsigned IS = 9;
  localparam int unsigned NQ = 4;
  localparam int unsigned QSIZE [NQ] = '{1, 8, 16, 32};
  localparam int unsigned NPAT = 8;
  localparam int unsigned CW = $clog2(NS + 2);
  localparam int unsigned CYCLES = 10000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic out_ready = 1'b1;
  logic [NQ-1:0] in_valid = '0;
  logic [31:0] in_daddr [NQ];
  logic dt_wr_en = 1'b0, node_wr_en = 1'b0;
  logic [IS-1:0] dt_wr_idx = '0;
  dt_entry_t dt_wr_data = '0;
  logic [STAGE_W-1:0] node_wr_stage = '0;
  logic [NODE_AW-1:0] node_wr_addr = '0;
  trie_node_t node_wr_data = '0;

  logic [NQ-1:0] in_ready, out_valid, drop;
  lookup_res_t   out_res [NQ];
  logic [CW-1:0] dispatch_cnt [NQ];

  for (genvar q = 0; q < NQ; q++) begin : g_eng
    camp_top #(.NUM_STAGES(NS), .INIT_STRIDE(IS), .QUEUE_DEPTH(QSIZE[q])) dut (
      .clk, .rst_n, .in_valid(in_valid[q]), .in_daddr(in_daddr[q]), .in_ready(in_ready[q]),
      .out_valid(out_valid[q]), .out_res(out_res[q]), .out_ready,
      .dt_wr_en, .dt_wr_idx, .dt_wr_data, .node_wr_en, .node_wr_stage, .node_wr_addr, .node_wr_data,
      .dispatch_cnt(dispatch_cnt[q]), .retire_cnt(), .access_cnt(), .noop_cnt(), .drop(drop[q]),
      .redispatch());
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NH_W-1:0] exp_nh [NQ][$];
  longint disp [NQ];
  int n_ok [NQ], n_drop [NQ], n_hold [NQ];
  real lpc [NPAT][NQ];
  string pname [NPAT] = '{"uniform", "burst 2", "burst 8", "burst 24", "burst 40", "burst 64",
                          "burst 96", "weighted"};

  // Next hop of the single /32 route under 9-bit index t, and its address.
  function automatic logic [NH_W-1:0] nh_of(int t);
    return NH_W'(t * 37 + 11);
  endfunction
  function automatic logic [31:0] route_of(int t);
    return {9'(t), 23'((t * 2654435761) & 32'h7F_FFFF)};
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        if (in_valid[q] && in_ready[q]) exp_nh[q].push_back(nh_of(int'(in_daddr[q][31:23])));
        if (in_valid[q] && !in_ready[q]) n_hold[q]++;
        if (out_valid[q]) begin
          logic [NH_W-1:0] e;
          e = exp_nh[q].pop_front();
          checks++;
          if (out_res[q].status == RES_DROPPED) n_drop[q]++;
          else if (out_res[q].status != RES_MATCH || out_res[q].nh != e) begin
            failures++;
            $display("FAIL engine %0d: got %p expected next hop %0d", q, out_res[q], e);
          end else n_ok[q]++;
        end
        disp[q] += longint'(dispatch_cnt[q]);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Address of a route whose chain starts at stage s.
  function automatic logic [31:0] addr_at(int s);
    int t;
    t = s + NS * $urandom_range((2**IS - 1 - s) / NS);
    return route_of(t);
  endfunction

  task automatic load();
    for (int t = 0; t < 2**IS; t++) begin
      dt_entry_t e;
      logic [31:0] r;
      int s0;
      r = route_of(t);
      s0 = t % NS;
      e = '0;
      e.root.valid = 1'b1;
      e.root.stage = STAGE_W'(s0);
      e.root.addr  = NODE_AW'(t);
      @(negedge clk);
      dt_wr_en = 1'b1; dt_wr_idx = IS'(t); dt_wr_data = e;
      @(negedge clk);
      dt_wr_en = 1'b0;
      // Chain of 24 nodes: depths 9..32, node k at stage s0+k, address t in every stage.
      for (int k = 0; k < NS; k++) begin
        trie_node_t n;
        int d;
        d = IS + k;
        n = '0;
        if (d == 32) begin
          n.pfx_valid = 1'b1;
          n.pfx_nh = nh_of(t);
        end else begin
          n.child[r[31 - d]].valid = 1'b1;
          n.child[r[31 - d]].stage = STAGE_W'((s0 + k + 1) % NS);
          n.child[r[31 - d]].addr  = NODE_AW'(t);
        end
        node_wr_en = 1'b1;
        node_wr_stage = STAGE_W'((s0 + k) % NS);
        node_wr_addr = NODE_AW'(t);
        node_wr_data = n;
        @(negedge clk);
      end
      node_wr_en = 1'b0;
    end
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid = '0;
    for (int k = 0; k < 2000; k++) @(negedge clk);
  endtask

  initial begin
    for (int q = 0; q < NQ; q++) in_daddr[q] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load();
    for (int p = 0; p < NPAT; p++) begin
      longint d0 [NQ];
      int burst, left [NQ], cur [NQ];
      burst = (p == 1) ? 2 : (p == 2) ? 8 : (p == 3) ? 24 : (p == 4) ? 40 : (p == 5) ? 64 : 96;
      for (int q = 0; q < NQ; q++) begin
        left[q] = 0; cur[q] = 0;
      end
      // Warm up, then measure over CYCLES cycles. Each engine has its own stream; an offered
      // lookup is held until accepted (the reorder window may be full).
      for (int k = 0; k < CYCLES + 200; k++) begin
        if (k == 200) for (int q = 0; q < NQ; q++) d0[q] = disp[q];
        @(negedge clk);
        for (int q = 0; q < NQ; q++) begin
          int s;
          if (in_valid[q] && !in_ready[q]) continue;
          if (p == 0) s = $urandom_range(NS - 1);
          else if (p == NPAT - 1) s = ($urandom_range(3) != 0) ? $urandom_range(NS / 3 - 1) : $urandom_range(NS - 1);
          else begin
            if (left[q] == 0) begin
              cur[q] = $urandom_range(NS - 1);
              left[q] = burst;
            end
            left[q]--;
            s = cur[q];
          end
          in_valid[q] = 1'b1;
          in_daddr[q] = addr_at(s);
        end
      end
      @(negedge clk);
      for (int q = 0; q < NQ; q++) lpc[p][q] = real'(disp[q] - d0[q]) / real'(CYCLES);
      drain();
    end
    $display("LPC (lookups entering the ring per cycle), 24 stages, every lookup circles the ring");
    $display("pattern      queue=1  queue=8  queue=16 queue=32");
    for (int p = 0; p < NPAT; p++)
      $display("%-10s   %0.3f    %0.3f    %0.3f    %0.3f", pname[p], lpc[p][0], lpc[p][1], lpc[p][2], lpc[p][3]);
    for (int p = 0; p < NPAT; p++) begin
      for (int q = 1; q < NQ; q++) begin
        checks++;
        if (lpc[p][q] + 0.05 < lpc[p][q-1]) begin
          failures++;
          $display("FAIL %s: LPC falls from %0.3f to %0.3f as the queue grows", pname[p], lpc[p][q-1], lpc[p][q]);
        end
      end
      checks++;
      if (lpc[p][NQ-1] < 0.75) begin
        failures++;
        $display("FAIL %s: LPC %0.3f with 32-entry queues", pname[p], lpc[p][NQ-1]);
      end
    end
    for (int q = 0; q < NQ; q++) begin
      checks++;
      if (exp_nh[q].size() != 0 || n_ok[q] == 0) begin
        failures++;
        $display("FAIL engine %0d: %0d answers missing", q, exp_nh[q].size());
      end
      $display("queue=%0d: answered=%0d discarded=%0d input held (reorder window full)=%0d cycles",
               QSIZE[q], n_ok[q], n_drop[q], n_hold[q]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
