// bit_select: the reconfigurable Bit-Select mechanism.
// A 32-bit selection mask marks the R+F address positions that feed the hash
// index generators, independently of the prefix length. The selected bits are
// gathered in address order (lowest selected position goes to bit 0); the R
// lower (rightmost) of them form the index part r and the F upper (leftmost)
// ones the folded part f. All other bits are gathered the same way into the
// tag part t. For a prefix, tag bits past its length are cleared and tlen
// counts how many of the t bits lie inside the prefix; the hash bits are taken
// as they are (an item from the CWR expander has them all specified). For a
// search address pass len = 32.
// The document specifies that any bits may be selected and that R+F bits take
// part in the index; the gather order and the split into r and f are this
// design's choice. The mask must hold exactly R+F ones. Purely combinational.
module bit_select
  import mht_pkg::*;
#(
  parameter int unsigned R      = 12,
  parameter int unsigned F      = 4,
  parameter int unsigned SEL_W  = R + F,
  parameter int unsigned T_W    = ADDR_W - SEL_W,
  parameter int unsigned TLEN_W = $clog2(T_W + 1)
) (
  input  addr_t             key,
  input  plen_t             len,
  input  addr_t             sel_mask,
  output logic [R-1:0]      r,
  output logic [F-1:0]      f,
  output logic [T_W-1:0]    t,
  output logic [TLEN_W-1:0] tlen
);

  addr_t             pmask;
  addr_t             kmasked;
  logic [SEL_W-1:0]  hsel;
  int unsigned       hi, ti;

  always_comb begin
    pmask   = prefix_mask(len);
    kmasked = key & pmask;
    hsel    = '0;
    t       = '0;
    tlen    = '0;
    hi      = 0;
    ti      = 0;
    for (int unsigned i = 0; i < ADDR_W; i++) begin
      if (sel_mask[i]) begin
        if (hi < SEL_W) hsel[hi] = key[i];
        hi++;
      end else begin
        if (ti < T_W) begin
          t[ti] = kmasked[i];
          if (pmask[i]) tlen = tlen + 1'b1;
        end
        ti++;
      end
    end
    r = hsel[R-1:0];
    f = hsel[SEL_W-1:R];
  end

endmodule
