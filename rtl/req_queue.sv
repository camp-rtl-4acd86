// req_queue: ingress request queue in front of one CAMP pipeline stage.
//
// Lookups whose sub-trie root lives in this stage wait here until the stage sees a bubble (an
// empty slot arriving on the ring); the stage then pops the head into the pipeline. Because every
// stage has its own queue, a lookup waiting for its stage does not block lookups bound for other
// stages, which is what keeps the pipeline busy when entry points collide.
//
// Implementation: a first-in first-out circular buffer of DEPTH lookup records with first-word
// fall-through: head_valid/head show the oldest entry, pop removes it. Up to NUM_PUSH lookups can
// be written in one cycle (one per dispatch lane): every set bit of push writes its push_data
// entry, lowest index first, as long as there is room; pop and push may happen in the same cycle,
// also when full. full and level (the number of entries held) tell the dispatcher when it must
// discard instead of pushing.
// The depth of 32 follows the design's evaluated configuration; the fall-through interface and the
// reset behaviour (empty) are this implementation's choices.
module req_queue
  import camp_pkg::*;
#(
  parameter int unsigned DEPTH    = 32,
  parameter int unsigned NUM_PUSH = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_PUSH-1:0]      push,
  input  lookup_req_t [NUM_PUSH-1:0] push_data,
  output logic                     full,
  input  logic                     pop,
  output logic                     head_valid,
  output lookup_req_t              head,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  lookup_req_t             buf_q [DEPTH];
  logic [PW-1:0]           rd_ptr_q, wr_ptr_q;
  logic [$clog2(DEPTH+1)-1:0] count_q;

  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic             do_pop;
  logic [CNT_W-1:0] n_push;       // entries written this cycle
  logic [PW-1:0]    wr_slot [NUM_PUSH];
  logic [NUM_PUSH-1:0] wr_en;

  assign head_valid = (count_q != '0);
  assign full       = (count_q == CNT_W'(DEPTH));
  assign level      = count_q;
  assign head       = buf_q[rd_ptr_q];

  assign do_pop  = pop && head_valid;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Pushes take consecutive slots after the write pointer, in lane order, while room remains.
  logic [CNT_W-1:0] room;
  assign room = CNT_W'(DEPTH) - count_q + CNT_W'(do_pop);

  always_comb begin
    n_push = '0;
    wr_en  = '0;
    for (int k = 0; k < NUM_PUSH; k++) begin
      wr_slot[k] = PW'((int'(wr_ptr_q) + int'(n_push)) % DEPTH);
      if (push[k] && n_push < room) begin
        wr_en[k] = 1'b1;
        n_push   = n_push + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (do_pop) rd_ptr_q <= next_ptr(rd_ptr_q);
      wr_ptr_q <= PW'((int'(wr_ptr_q) + int'(n_push)) % DEPTH);
      count_q  <= count_q + n_push - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_PUSH; k++) begin
      if (wr_en[k]) buf_q[wr_slot[k]] <= push_data[k];
    end
  end

  // A queue without room must be bypassed by the dispatcher (discard), never overrun.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) wr_en == push);
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
