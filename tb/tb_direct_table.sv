// tb_direct_table: self-checking test of the direct lookup table.
// Fills every entry with random contents kept in a shadow array, then reads random indexes and
// checks that each entry appears exactly one cycle after its read, that rd_data holds while
// rd_en is low, and that a write in the same cycle as a read of that entry returns the old
// contents. Finally rewrites part of the table and reads it back.
module tb_direct_table;
  import camp_pkg::*;

  localparam int unsigned IS = 8;
  localparam int unsigned N  = 2**IS;

  logic            clk = 1'b0;
  logic            rd_en = 1'b0, wr_en = 1'b0;
  logic [IS-1:0]   rd_idx = '0, wr_idx = '0;
  dt_entry_t       rd_data, wr_data;
  dt_entry_t       shadow [N];
  int              checks = 0, failures = 0;

  direct_table #(.INIT_STRIDE(IS)) dut (.*);

  always #5 clk = ~clk;

  function automatic dt_entry_t rand_entry();
    dt_entry_t e;
    e = dt_entry_t'({$urandom, $urandom});
    return e;
  endfunction

  task automatic write_entry(input int idx, input dt_entry_t e);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = IS'(idx); wr_data = e;
    @(posedge clk);
    #1 wr_en = 1'b0;
    shadow[idx] = e;
  endtask

  task automatic check(input dt_entry_t exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = '0;
    @(posedge clk);
    for (int i = 0; i < N; i++) write_entry(i, rand_entry());
    // Random reads: data one cycle after the read edge.
    for (int k = 0; k < 1000; k++) begin
      int idx;
      idx = $urandom_range(N - 1);
      rd_en <= 1'b1; rd_idx <= IS'(idx);
      @(posedge clk);
      rd_en <= 1'b0;
      #1 check(shadow[idx], "read");
      // Output holds while no read is made.
      @(posedge clk);
      #1 check(shadow[idx], "hold");
    end
    // Read and write of the same entry in one cycle: old contents come back.
    for (int k = 0; k < 50; k++) begin
      int idx;
      dt_entry_t old_e, new_e;
      idx = $urandom_range(N - 1);
      old_e = shadow[idx];
      new_e = rand_entry();
      rd_en <= 1'b1; rd_idx <= IS'(idx);
      wr_en <= 1'b1; wr_idx <= IS'(idx); wr_data <= new_e;
      @(posedge clk);
      rd_en <= 1'b0; wr_en <= 1'b0;
      shadow[idx] = new_e;
      #1 check(old_e, "read-during-write");
      rd_en <= 1'b1; rd_idx <= IS'(idx);
      @(posedge clk);
      rd_en <= 1'b0;
      #1 check(new_e, "read-after-write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
