// lpm_select: final longest-prefix-match choice of the lookup engine.
// Takes N candidate results (one per sub-table match processor, plus the
// victim TCAM) and returns the hit with the largest prefix length; on equal
// lengths the lowest input number wins. No hit anywhere gives hit = 0,
// len = 0, nh = 0. The document names this stage; the tie rule is this
// design's choice. Purely combinational.
module lpm_select
  import mht_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned NH_W = 8
) (
  input  logic [N-1:0]            in_hit,
  input  plen_t [N-1:0]           in_len,
  input  logic [N-1:0][NH_W-1:0]  in_nh,
  output logic                    hit,
  output plen_t                   len,
  output logic [NH_W-1:0]         nh,
  output logic [$clog2(N)-1:0]    src
);

  always_comb begin
    hit = 1'b0;
    len = '0;
    nh  = '0;
    src = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (in_hit[i] && (!hit || in_len[i] > len)) begin
        hit = 1'b1;
        len = in_len[i];
        nh  = in_nh[i];
        src = ($clog2(N))'(i);
      end
    end
  end

endmodule
