// hash_index: index generator of one sub-table (skew, then XOR-fold).
// The F folded bits are first skewed by rotating them left by TABLE_ID
// places, so that each sub-table uses a different hash function over the
// same selected bits. The skewed F bits are then XOR-folded onto the R index
// bits: index bit k is r[k] xor skewed_f[k mod F]. The fold is its own inverse
// for a given f, so feeding a bucket index back in as r recovers the R bits of
// an item stored there; the insertion controller relies on this.
// XOR-folding and skew by rearranging the F bits follow the document; the
// rotation as skew and the k mod F folding pattern are this design's choice.
// Purely combinational, so it can share a cycle with the memory access.
module hash_index #(
  parameter int unsigned R        = 12,
  parameter int unsigned F        = 4,
  parameter int unsigned TABLE_ID = 0
) (
  input  logic [R-1:0] r,
  input  logic [F-1:0] f,
  output logic [R-1:0] idx
);

  localparam int unsigned ROT = TABLE_ID % F;

  logic [F-1:0] fsk;

  always_comb begin
    for (int unsigned b = 0; b < F; b++) fsk[(b + ROT) % F] = f[b];
    for (int unsigned k = 0; k < R; k++) idx[k] = r[k] ^ fsk[k % F];
  end

endmodule
