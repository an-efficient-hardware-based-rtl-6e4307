// victim_tcam: small ternary CAM for items whose insertion ended in an
// unresolved collision ("crisis").
// Each entry holds a 32-bit value, a 32-bit care mask, the original prefix
// length and a next hop. A search compares the key with every valid entry at
// once (key and value must agree on every care bit) and returns the matching
// entry with the largest prefix length, lowest entry number on a tie. The
// choice is made in two levels: within groups of 64 entries, then among the
// groups. The search is one combinational block of nested loops over all
// DEPTH entries; a synthesis front end with a loop-unroll limit below DEPTH
// needs that limit raised.
// Timing: s_key is sampled with s_en at a clock edge and the result appears
// on r_hit/r_len/r_nh after that edge (one cycle, like a sub-table read).
// Writes (we, waddr) take effect at the clock edge; clear empties the CAM.
// The document asks for a victim space of about 5% of the routing table
// searched in parallel with the sub-tables; the entry format, the
// length-based priority and the write port are this design's choices.
module victim_tcam
  import mht_pkg::*;
#(
  parameter int unsigned DEPTH = 9830,
  parameter int unsigned NH_W  = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  addr_t           wvalue,
  input  addr_t           wcare,
  input  plen_t           wlen,
  input  logic [NH_W-1:0] wnh,
  input  logic            s_en,
  input  addr_t           s_key,
  output logic            r_hit,
  output plen_t           r_len,
  output logic [NH_W-1:0] r_nh
);

  localparam int unsigned G  = 64;
  localparam int unsigned NG = (DEPTH + G - 1) / G;


  logic [G-1:0]     valid [NG];   // valid bits, one word per group
  logic             wr_ok;
  addr_t            value [DEPTH];
  addr_t            care  [DEPTH];
  plen_t            elen  [DEPTH];
  logic [NH_W-1:0]  enh   [DEPTH];

  assign wr_ok = we && ({1'b0, waddr} < (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned g = 0; g < NG; g++) valid[g] <= '0;
    end else if (clear) begin
      for (int unsigned g = 0; g < NG; g++) valid[g] <= '0;
    end else if (wr_ok) begin
      valid[int'(waddr) / G][int'(waddr) % G] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      value[waddr] <= wvalue & wcare;
      care[waddr]  <= wcare;
      elen[waddr]  <= wlen;
      enh[waddr]   <= wnh;
    end
  end

  // Two-level priority choice: each group of G entries picks its best match,
  // then the best group result wins.
  logic            ghit [NG];
  plen_t           glen [NG];
  logic [NH_W-1:0] gnh  [NG];

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      ghit[g] = 1'b0;
      glen[g] = '0;
      gnh[g]  = '0;
      for (int unsigned k = 0; k < G; k++) begin
        int unsigned e;
        e = g * G + k;
        if (e < DEPTH) begin
          if (valid[g][k] && (((s_key ^ value[e]) & care[e]) == '0) &&
              (!ghit[g] || elen[e] > glen[g])) begin
            ghit[g] = 1'b1;
            glen[g] = elen[e];
            gnh[g]  = enh[e];
          end
        end
      end
    end
  end

  logic            bhit;
  plen_t           blen;
  logic [NH_W-1:0] bnh;

  always_comb begin
    bhit = 1'b0;
    blen = '0;
    bnh  = '0;
    for (int unsigned g = 0; g < NG; g++) begin
      if (ghit[g] && (!bhit || glen[g] > blen)) begin
        bhit = 1'b1;
        blen = glen[g];
        bnh  = gnh[g];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_hit <= 1'b0;
      r_len <= '0;
      r_nh  <= '0;
    end else if (s_en) begin
      r_hit <= bhit;
      r_len <= blen;
      r_nh  <= bnh;
    end
  end

endmodule
