// reorder_buffer: puts CAMP lookup results back into arrival order.
//
// Lookups enter the ring from different stage queues and take paths of different lengths, so
// they finish out of order, and several may finish in the same cycle. Each arriving lookup is
// given a tag, the index of the next free slot of a circular buffer. Up to LANES lookups arrive
// per cycle: every set bit of alloc takes the next slot, lowest lane first, and alloc_tag[k] is
// the tag lane k gets (allowed while alloc_ready, i.e. while at least LANES slots are free).
// A finished lookup writes its result into the slot named by its tag through any of NUM_WR
// write ports. The buffer releases results from its oldest slots, in tag order, up to LANES per
// cycle: out_valid[k] is set when the k+1 oldest slots are all filled, and every valid result
// is taken when out_ready is high.
//
// Timing: a result written in cycle t can leave in cycle t+1 at the earliest. Allocation and
// release may happen in one cycle. Restoring order at the output follows the design, which calls
// this buffer optional; the tag scheme, the depth and the lane-wide output are this
// implementation's choices.
module reorder_buffer
  import camp_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned NUM_WR = 26,
  parameter int unsigned LANES  = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation, in arrival order
  output logic                alloc_ready,
  input  logic [LANES-1:0]    alloc,
  output logic [LANES-1:0][TAG_W-1:0] alloc_tag,
  // results, in any order
  input  logic [NUM_WR-1:0]   wr_valid,
  input  lookup_res_t         wr_res [NUM_WR],
  // results, in arrival order
  output logic [LANES-1:0]    out_valid,
  output lookup_res_t [LANES-1:0] out_res,
  input  logic                out_ready,
  output logic [$clog2(DEPTH+1)-1:0] in_flight
);

  localparam int unsigned PW    = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic        done_q [DEPTH];
  lookup_res_t res_q  [DEPTH];
  logic [PW-1:0] head_q, tail_q;
  logic [$clog2(DEPTH+1)-1:0] count_q;

  logic [CNT_W-1:0] n_alloc, n_release;

  assign alloc_ready = (int'(count_q) + LANES <= DEPTH);
  assign in_flight   = count_q;

  always_comb begin
    logic all_done;
    n_alloc   = '0;
    n_release = '0;
    all_done  = 1'b1;
    for (int k = 0; k < LANES; k++) begin
      alloc_tag[k] = TAG_W'(PW'(tail_q + PW'(n_alloc)));
      if (alloc[k] && alloc_ready) n_alloc = n_alloc + 1'b1;
      all_done     = all_done && done_q[PW'(head_q + PW'(k))];
      out_valid[k] = all_done;
      out_res[k]   = res_q[PW'(head_q + PW'(k))];
      if (all_done && out_ready) n_release = n_release + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < DEPTH; i++) done_q[i] <= 1'b0;
    end else begin
      tail_q  <= tail_q + PW'(n_alloc);
      head_q  <= head_q + PW'(n_release);
      count_q <= count_q + n_alloc - n_release;
      for (int k = 0; k < LANES; k++) begin
        if (k < int'(n_release)) done_q[PW'(head_q + PW'(k))] <= 1'b0;
      end
      for (int w = 0; w < NUM_WR; w++) begin
        if (wr_valid[w]) done_q[PW'(wr_res[w].tag)] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < NUM_WR; w++) begin
      if (wr_valid[w]) res_q[PW'(wr_res[w].tag)] <= wr_res[w];
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0 && DEPTH <= 2**TAG_W)
      else $error("reorder_buffer: DEPTH must be a power of two no larger than 2**TAG_W");
    assert (LANES >= 1 && LANES <= DEPTH)
      else $error("reorder_buffer: LANES out of range");
  end

endmodule
