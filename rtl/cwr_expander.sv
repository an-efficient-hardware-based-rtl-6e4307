// cwr_expander: controlled wildcard resolution (CWR) at insertion time.
// A prefix is expanded only on those wildcard bits (positions past its length)
// that are also selected hash bits; wildcard bits outside the hash bits stay
// wildcards. With w such bits the prefix yields 2**w items, one per cycle,
// each equal to the prefix (bits past the length cleared) with a counter value
// deposited into those w positions (counter bit 0 into the lowest position).
// Items keep the original length and next hop; out_last marks the final one.
// Handshakes: in_valid/in_ready accepts a prefix when the expander is empty;
// out_valid/out_ready passes items on. The expansion rule follows the
// document; the ordering of items and the handshakes are this design's.
// sel_mask must not change while an expansion is in progress.
module cwr_expander
  import mht_pkg::*;
#(
  parameter int unsigned SEL_W = 16,
  parameter int unsigned NH_W  = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  addr_t           sel_mask,
  input  logic            in_valid,
  output logic            in_ready,
  input  addr_t           in_prefix,
  input  plen_t           in_len,
  input  logic [NH_W-1:0] in_nh,
  output logic            out_valid,
  input  logic            out_ready,
  output addr_t           out_key,
  output plen_t           out_len,
  output logic [NH_W-1:0] out_nh,
  output logic            out_last
);

  logic            busy;
  addr_t           base, wild;
  plen_t           len_q;
  logic [NH_W-1:0] nh_q;
  logic [SEL_W:0]  cnt, last_cnt;

  addr_t           in_pmask, in_wild;
  logic [SEL_W:0]  in_w;
  addr_t           dep;
  int unsigned     j;

  assign in_ready  = !busy;
  assign out_valid = busy;
  assign out_len   = len_q;
  assign out_nh    = nh_q;
  assign out_last  = (cnt == last_cnt);

  always_comb begin
    in_pmask = prefix_mask(in_len);
    in_wild  = sel_mask & ~in_pmask;
    in_w     = '0;
    for (int unsigned i = 0; i < ADDR_W; i++) in_w = in_w + (SEL_W+1)'(in_wild[i]);
  end

  // deposit the counter bits into the wildcard hash positions
  always_comb begin
    dep = '0;
    j   = 0;
    for (int unsigned i = 0; i < ADDR_W; i++) begin
      if (wild[i]) begin
        if (j <= SEL_W) dep[i] = cnt[j];
        j++;
      end
    end
    out_key = base | dep;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      base     <= '0;
      wild     <= '0;
      len_q    <= '0;
      nh_q     <= '0;
      cnt      <= '0;
      last_cnt <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy     <= 1'b1;
        base     <= in_prefix & in_pmask;
        wild     <= in_wild;
        len_q    <= in_len;
        nh_q     <= in_nh;
        cnt      <= '0;
        last_cnt <= ((SEL_W+1)'(1) << in_w) - 1'b1;
      end
    end else if (out_ready) begin
      if (out_last) busy <= 1'b0;
      else          cnt  <= cnt + 1'b1;
    end
  end

endmodule
