// sub_table: one hash sub-table, 2**R buckets of C key entries each.
// Every access reads or writes a whole bucket (one memory row), so all C keys
// of a bucket reach the match processors together.
// Port A is read-only and serves lookups: la_en with la_addr in one cycle,
// la_row valid in the next. Port B serves the insertion controller: ub_re
// reads a bucket the same way onto ub_row; ub_we_mask writes the selected
// entries of bucket ub_addr from ub_wrow at the clock edge (a read on the same
// cycle returns the old contents). Entries are opaque W-bit words here.
// The document describes a row-oriented SRAM or DRAM array of 2**R rows of c
// keys; the second port for updates, the per-entry write mask and the
// one-cycle read latency are this design's choices. The array has no reset:
// the insertion controller clears it row by row after reset.
module sub_table #(
  parameter int unsigned R = 12,
  parameter int unsigned C = 32,
  parameter int unsigned W = 40
) (
  input  logic                 clk,
  // port A: lookup read
  input  logic                 la_en,
  input  logic [R-1:0]         la_addr,
  output logic [C-1:0][W-1:0]  la_row,
  // port B: update read / masked write
  input  logic                 ub_re,
  input  logic [R-1:0]         ub_addr,
  output logic [C-1:0][W-1:0]  ub_row,
  input  logic [C-1:0]         ub_we_mask,
  input  logic [C-1:0][W-1:0]  ub_wrow
);

  logic [C-1:0][W-1:0] mem [2**R];

  always_ff @(posedge clk) begin
    if (la_en) la_row <= mem[la_addr];
    if (ub_re) ub_row <= mem[ub_addr];
    for (int unsigned e = 0; e < C; e++)
      if (ub_we_mask[e]) mem[ub_addr][e] <= ub_wrow[e];
  end

endmodule
