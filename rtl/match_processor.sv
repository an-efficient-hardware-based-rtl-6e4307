// match_processor: the c match units of one sub-table plus the in-bucket
// longest-prefix choice.
// Each of the C fetched entries is compared with the search key at once. An
// entry matches when it is valid, its stored folded bits f equal the key's
// f bits exactly (these were fully specified at insertion), and its tag bits t
// equal the key's t bits on the leftmost tlen positions (the part of the tag
// that lies inside the prefix). The bucket index was computed from the key, so
// equal f bits imply equal R index bits. Among matching entries the one with
// the largest stored prefix length wins; on a tie the lower entry number.
// The document gives the parallel compare and the stored prefix length; the
// tag layout and tie rule are this design's. Purely combinational.
`include "mht_entry.svh"
module match_processor
  import mht_pkg::*;
#(
  parameter int unsigned R      = 12,
  parameter int unsigned F      = 4,
  parameter int unsigned C      = 32,
  parameter int unsigned NH_W   = 8,
  parameter int unsigned T_W    = ADDR_W - R - F,
  parameter int unsigned TLEN_W = $clog2(T_W + 1),
  parameter int unsigned W      = 1 + F + T_W + LEN_W + TLEN_W + NH_W
) (
  input  logic [C-1:0][W-1:0] row,
  input  logic [F-1:0]        key_f,
  input  logic [T_W-1:0]      key_t,
  output logic                hit,
  output plen_t               len,
  output logic [NH_W-1:0]     nh
);

  `MHT_ENTRY_T

  entry_t               e;
  logic [C-1:0]         m;
  logic [T_W-1:0]       tcare;

  always_comb begin
    hit = 1'b0;
    len = '0;
    nh  = '0;
    for (int unsigned i = 0; i < C; i++) begin
      e     = entry_t'(row[i]);
      // ones on the leftmost e.tlen tag bits
      tcare = ~({T_W{1'b1}} >> e.tlen);
      m[i]  = e.valid && (e.f == key_f) && (((e.t ^ key_t) & tcare) == '0);
      if (m[i] && (!hit || e.len > len)) begin
        hit = 1'b1;
        len = e.len;
        nh  = e.nh;
      end
    end
  end

endmodule
