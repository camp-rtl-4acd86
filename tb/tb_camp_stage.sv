// tb_camp_stage: self-checking test of one CAMP pipeline stage (stage number 3 of the ring).
// Loads random trie nodes, then drives random traffic: ring slots that are empty, that carry a
// lookup for another stage, or that carry a lookup for this stage, together with a random queue
// head. Checks that the queue is popped exactly on a bubble, and, one cycle later, that the
// stage forwards, passes through (no-op) or retires the chosen lookup with the fields a
// reference evaluation of the node gives (best match, next bit, child pointer, bit count).
// Lookups bound for a child sub-trie root must be offered for re-entry; a random grant must
// remove them from the ring.
module tb_camp_stage;
  import camp_pkg::*;

  localparam int unsigned SID   = 3;
  localparam int unsigned NODES = 64;

  logic        clk = 1'b0, rst_n = 1'b0;
  lookup_req_t ring_in = '0, ring_out, q_head = '0;
  logic        q_valid = 1'b0, q_pop, res_valid, access, noop;
  logic        redisp_offer, redisp_grant = 1'b0;
  lookup_req_t redisp_req;
  lookup_res_t res;
  logic        wr_en = 1'b0;
  logic [NODE_AW-1:0] wr_addr = '0;
  trie_node_t  wr_data = '0;

  trie_node_t  nodes [NODES];
  int checks = 0, failures = 0;
  int n_fwd = 0, n_ret = 0, n_noop = 0, n_entry = 0, n_xfer = 0;

  camp_stage #(.STAGE_ID(SID)) dut (.*);

  always #5 clk = ~clk;

  function automatic lookup_req_t rand_req(input bit here);
    lookup_req_t r;
    r = lookup_req_t'({$urandom, $urandom, $urandom});
    r.valid = 1'b1;
    r.depth = DEPTH_W'($urandom_range(32, 8));
    r.addr  = NODE_AW'($urandom_range(NODES - 1));
    if (here) r.stage = STAGE_W'(SID);
    else      r.stage = STAGE_W'((SID + 1 + $urandom_range(20)) % 25);
    return r;
  endfunction

  task automatic expect_eq(input logic [$bits(lookup_req_t)-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lookup_req_t sel, exp_out, exp_fwd;
    logic grant;
    logic exp_res_valid;
    lookup_res_t exp_res;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Load the nodes.
    for (int i = 0; i < NODES; i++) begin
      trie_node_t n;
      n = trie_node_t'({$urandom, $urandom});
      for (int b = 0; b < 2; b++) begin
        n.child[b].valid = ($urandom_range(3) != 0);
        n.child[b].xfer  = ($urandom_range(3) == 0);
        n.child[b].stage = STAGE_W'((SID + 1 + $urandom_range(20)) % 25);
      end
      nodes[i] = n;
      @(negedge clk);
      wr_en = 1'b1; wr_addr = NODE_AW'(i); wr_data = n;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      int kind;
      @(negedge clk);
      kind = $urandom_range(2);
      ring_in = (kind == 0) ? lookup_req_t'('0) : rand_req(kind == 2);
      q_valid = ($urandom_range(1) == 1);
      q_head  = rand_req(1'b1);
      #1;
      checks++;
      if (q_pop !== (!ring_in.valid && q_valid)) begin
        failures++;
        $display("FAIL q_pop=%0b ring_valid=%0b q_valid=%0b", q_pop, ring_in.valid, q_valid);
      end
      sel = ring_in.valid ? ring_in : (q_valid ? q_head : lookup_req_t'('0));
      if (q_pop) n_entry++;
      // Reference evaluation of the selected lookup.
      exp_out = sel;
      exp_res_valid = 1'b0;
      exp_res = '0;
      if (sel.valid && sel.stage == STAGE_W'(SID)) begin
        trie_node_t n;
        logic bv;
        logic [NH_W-1:0] bnh;
        node_ptr_t c;
        n = nodes[sel.addr];
        bv  = n.pfx_valid | sel.best_valid;
        bnh = n.pfx_valid ? n.pfx_nh : sel.best_nh;
        c   = (sel.depth == 6'd32) ? node_ptr_t'('0) : n.child[sel.daddr[31 - sel.depth]];
        if (c.valid) begin
          exp_out.depth = sel.depth + 1'b1;
          exp_out.stage = c.stage;
          exp_out.addr  = c.addr;
          exp_out.best_valid = bv;
          exp_out.best_nh = bnh;
          exp_out.xfer = c.xfer;
          n_fwd++;
        end else begin
          exp_out = '0;
          exp_res_valid = 1'b1;
          exp_res.tag = sel.tag;
          exp_res.status = bv ? RES_MATCH : RES_NO_MATCH;
          exp_res.nh = bv ? bnh : '0;
          n_ret++;
        end
      end else if (sel.valid) n_noop++;
      exp_fwd = exp_out;
      @(posedge clk);
      #1;
      // Re-entry offer: a forwarded or passing lookup bound for a child root; grant at random.
      grant = ($urandom_range(1) == 1);
      redisp_grant = grant;
      #1;
      expect_eq($bits(lookup_req_t)'(redisp_offer), $bits(lookup_req_t)'(exp_fwd.valid && exp_fwd.xfer), "redisp_offer");
      if (exp_fwd.valid && exp_fwd.xfer) begin
        expect_eq(redisp_req, exp_fwd, "redisp_req");
        if (grant) begin
          exp_out = '0;
          n_xfer++;
        end
      end
      expect_eq(ring_out, exp_out, "ring_out");
      expect_eq($bits(lookup_req_t)'(res_valid), $bits(lookup_req_t)'(exp_res_valid), "res_valid");
      if (exp_res_valid) expect_eq($bits(lookup_req_t)'(res), $bits(lookup_req_t)'(exp_res), "res");
      expect_eq($bits(lookup_req_t)'(noop), $bits(lookup_req_t)'(sel.valid && sel.stage != STAGE_W'(SID)), "noop");
    end
    checks++;
    if (n_fwd == 0 || n_ret == 0 || n_noop == 0 || n_entry == 0 || n_xfer == 0) begin
      failures++;
      $display("FAIL coverage fwd=%0d ret=%0d noop=%0d entry=%0d", n_fwd, n_ret, n_noop, n_entry);
    end
    $display("forward=%0d retire=%0d noop=%0d entry=%0d reentry=%0d", n_fwd, n_ret, n_noop, n_entry, n_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
