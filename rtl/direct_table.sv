// direct_table: direct lookup table for the initial prefix bits of a CAMP lookup engine.
//
// The first INIT_STRIDE bits of the destination address index a table of 2**INIT_STRIDE entries.
// Each entry names the stage and address of the root node of the sub-trie that handles the rest
// of the address, and carries the longest prefix of at most INIT_STRIDE bits that covers the
// index (prefixes shorter than the stride are expanded into every entry they cover by the
// software that fills the table). An entry whose root pointer is invalid has no sub-trie: its
// prefix field is already the final answer.
//
// Interface: one read port (rd_en, rd_idx) whose entry appears on rd_data in the next cycle, as
// from a synchronous SRAM, and one write port (wr_en, wr_idx, wr_data) for the control plane.
// A read and a write of the same entry in one cycle return the old entry.
// Indexing by the leading address bits and the table's contents follow the design; the one-cycle
// synchronous read and the separate write port are this implementation's choices. The table is
// not cleared by reset: the control plane loads every entry before lookups start.
module direct_table
  import camp_pkg::*;
#(
  parameter int unsigned INIT_STRIDE = 8
) (
  input  logic                   clk,
  input  logic                   rd_en,
  input  logic [INIT_STRIDE-1:0] rd_idx,
  output dt_entry_t              rd_data,
  input  logic                   wr_en,
  input  logic [INIT_STRIDE-1:0] wr_idx,
  input  dt_entry_t              wr_data
);

  dt_entry_t table_q [2**INIT_STRIDE];

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_idx] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= table_q[rd_idx];
  end

endmodule
