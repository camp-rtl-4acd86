// tb_req_queue: self-checking test of the ingress request queue, built with three push lanes.
// Random pushes (0 to 3 per cycle, on random lanes) and pops, with pushes held back to the room
// left (which includes the slot a same-cycle pop frees), are compared with a reference queue
// filled in lane order: head contents, head_valid, full and level are checked every cycle.
// A phase fills the queue completely and drains it again.
module tb_req_queue;
  import camp_pkg::*;

  localparam int unsigned DEPTH    = 32;
  localparam int unsigned NUM_PUSH = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [NUM_PUSH-1:0] push = '0;
  logic        pop = 1'b0;
  lookup_req_t [NUM_PUSH-1:0] push_data = '0;
  logic        full, head_valid;
  lookup_req_t head;
  logic [$clog2(DEPTH+1)-1:0] level;

  lookup_req_t model [$];
  int checks = 0, failures = 0;
  int saw_full = 0, saw_multi = 0;

  req_queue #(.DEPTH(DEPTH), .NUM_PUSH(NUM_PUSH)) dut (.*);

  always #5 clk = ~clk;

  function automatic lookup_req_t rand_req();
    lookup_req_t r;
    r = lookup_req_t'({$urandom, $urandom, $urandom});
    r.valid = 1'b1;
    return r;
  endfunction

  task automatic check_state();
    checks++;
    if (level != ($bits(level))'(model.size()) || full != (model.size() == DEPTH)
        || head_valid != (model.size() != 0)) begin
      failures++;
      $display("FAIL state: level=%0d full=%0b hv=%0b model=%0d", level, full, head_valid, model.size());
    end
    if (model.size() != 0) begin
      checks++;
      if (head !== model[0]) begin
        failures++;
        $display("FAIL head: %h expected %h", head, model[0]);
      end
    end
  endtask

  // One cycle with given push/pop intent; obeys the rules of the interface.
  task automatic cycle(input int want_push, input bit want_pop);
    bit do_pop;
    int room, n;
    logic [NUM_PUSH-1:0] mask;
    lookup_req_t [NUM_PUSH-1:0] d;
    do_pop = want_pop && (model.size() != 0);
    room   = DEPTH - model.size() + (do_pop ? 1 : 0);
    n      = (want_push < room) ? want_push : room;
    // n pushes on randomly chosen lanes
    mask = '0;
    while ($countones(mask) < n) mask[$urandom_range(NUM_PUSH - 1)] = 1'b1;
    for (int k = 0; k < NUM_PUSH; k++) d[k] = rand_req();
    push <= mask; pop <= do_pop; push_data <= d;
    @(posedge clk);
    push <= '0; pop <= 1'b0;
    if (do_pop) void'(model.pop_front());
    for (int k = 0; k < NUM_PUSH; k++) if (mask[k]) model.push_back(d[k]);
    if (n > 1) saw_multi++;
    #1 check_state();
    if (full) saw_full++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check_state();
    for (int k = 0; k < 3000; k++) cycle(($urandom_range(99) < 45) ? $urandom_range(NUM_PUSH, 1) : 0,
                                         $urandom_range(99) < 75);
    for (int k = 0; k < DEPTH + 4; k++) cycle(1, 1'b0);         // fill
    for (int k = 0; k < 20; k++) cycle(1, 1'b1);                // push and pop while full
    for (int k = 0; k < DEPTH + 4; k++) cycle(0, 1'b1);         // drain
    for (int k = 0; k < 20; k++) cycle(NUM_PUSH, 1'b0);         // fill in lane-wide steps
    for (int k = 0; k < 20; k++) cycle(NUM_PUSH, 1'b1);         // more pushes than room
    for (int k = 0; k < 3000; k++) cycle(($urandom_range(99) < 35) ? $urandom_range(NUM_PUSH, 1) : 0,
                                         $urandom_range(99) < 85);
    checks++;
    if (saw_full == 0 || saw_multi == 0) begin
      failures++;
      $display("FAIL queue never became full (%0d) or never took several pushes at once (%0d)",
               saw_full, saw_multi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
