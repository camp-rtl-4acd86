// tb_reorder_buffer: self-checking test of the reorder buffer, built with two lanes.
// Allocates tags in order (zero, one or two per cycle on random lanes), completes the lookups in
// a random order through random write ports, several in the same cycle, and checks that results
// leave strictly in allocation order with the contents that were written, that out_valid[k] is
// set exactly when the k+1 oldest lookups have finished, that alloc_ready falls exactly when
// fewer than two slots are free, and that out_ready holds results.
module tb_reorder_buffer;
  import camp_pkg::*;

  localparam int unsigned DEPTH  = 16;
  localparam int unsigned NUM_WR = 4;
  localparam int unsigned L      = 2;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               alloc_ready;
  logic [L-1:0]       alloc = '0;
  logic [L-1:0][TAG_W-1:0] alloc_tag;
  logic [NUM_WR-1:0]  wr_valid = '0;
  lookup_res_t        wr_res [NUM_WR];
  logic [L-1:0]       out_valid;
  logic               out_ready = 1'b0;
  lookup_res_t [L-1:0] out_res;
  logic [$clog2(DEPTH+1)-1:0] in_flight;

  int checks = 0, failures = 0;
  int next_alloc = 0, next_out = 0;     // sequence numbers
  int pending [$];                       // allocated, not yet completed (sequence numbers)
  bit done_seq [int];
  lookup_res_t written [int];
  int ooo = 0, full_seen = 0, multi_wr = 0, multi_alloc = 0, multi_out = 0;

  reorder_buffer #(.DEPTH(DEPTH), .NUM_WR(NUM_WR), .LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NUM_WR; w++) wr_res[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nw, n_alloc, n_out;
      bit do_out, all_done;
      @(negedge clk);
      // Allocation.
      checks++;
      if (alloc_ready !== ((next_alloc - next_out) + L <= DEPTH)) begin
        failures++;
        $display("FAIL alloc_ready=%0b in flight=%0d", alloc_ready, next_alloc - next_out);
      end
      if (!alloc_ready) full_seen++;
      n_alloc = 0;
      for (int k = 0; k < L; k++) alloc[k] = alloc_ready && ($urandom_range(99) < 35);
      #1;   // alloc_tag of a lane depends on the lanes below it
      for (int k = 0; k < L; k++) begin
        if (alloc[k]) begin
          checks++;
          if (alloc_tag[k] !== TAG_W'((next_alloc + n_alloc) % DEPTH)) begin
            failures++;
            $display("FAIL lane %0d alloc_tag=%0d expected %0d", k, alloc_tag[k],
                     (next_alloc + n_alloc) % DEPTH);
          end
          n_alloc++;
        end
      end
      if (n_alloc > 1) multi_alloc++;
      // Random completions, up to NUM_WR per cycle.
      wr_valid = '0;
      nw = (cyc % 200 < 40) ? 0 : $urandom_range(NUM_WR);  // periodic stalls fill the buffer
      if (nw > 1) multi_wr++;
      for (int w = 0; w < nw && pending.size() > 0; w++) begin
        int pick, seq;
        lookup_res_t r;
        pick = $urandom_range(pending.size() - 1);
        seq = pending[pick];
        if (pick != 0) ooo++;
        pending.delete(pick);
        r.tag = TAG_W'(seq % DEPTH);
        r.status = res_status_t'($urandom_range(2));
        r.nh = NH_W'($urandom);
        written[seq] = r;
        wr_valid[w] = 1'b1;
        wr_res[w] = r;
      end
      // Output.
      all_done = 1'b1;
      n_out    = 0;
      for (int k = 0; k < L; k++) begin
        all_done = all_done && done_seq.exists(next_out + k);
        checks++;
        if (out_valid[k] !== all_done) begin
          failures++;
          $display("FAIL out_valid[%0d]=%0b for sequence %0d (allocated up to %0d)", k, out_valid[k], next_out + k, next_alloc);
        end
        if (out_valid[k]) begin
          n_out++;
          checks++;
          if (out_res[k] !== written[next_out + k]) begin
            failures++;
            $display("FAIL out_res[%0d]=%h expected %h", k, out_res[k], written[next_out + k]);
          end
        end
      end
      do_out = out_valid[0] && ($urandom_range(99) < 80);
      out_ready = do_out;
      if (do_out && n_out > 1) multi_out++;
      @(posedge clk);
      for (int k = 0; k < n_alloc; k++) begin
        pending.push_back(next_alloc);
        next_alloc++;
      end
      for (int w = 0; w < NUM_WR; w++)
        if (wr_valid[w]) done_seq[int'(seq_of(wr_res[w].tag))] = 1'b1;
      if (do_out) begin
        for (int k = 0; k < n_out; k++) begin
          done_seq.delete(next_out);
          written.delete(next_out);
          next_out++;
        end
      end
    end
    checks++;
    if (ooo == 0 || full_seen == 0 || multi_wr == 0 || multi_alloc == 0 || multi_out == 0 ||
        next_out < 1000) begin
      failures++;
      $display("FAIL coverage ooo=%0d full=%0d multi_wr=%0d multi_alloc=%0d multi_out=%0d out=%0d",
               ooo, full_seen, multi_wr, multi_alloc, multi_out, next_out);
    end
    $display("released=%0d out_of_order_completions=%0d full_cycles=%0d two_allocs=%0d two_releases=%0d",
             next_out, ooo, full_seen, multi_alloc, multi_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Map a tag back to the sequence number in flight that carries it.
  function automatic int seq_of(input logic [TAG_W-1:0] tag);
    for (int s = next_out; s < next_alloc; s++)
      if (TAG_W'(s % DEPTH) == tag) return s;
    return -1;
  endfunction
endmodule
