// tb_lpm_select: random candidate sets for four inputs; the expected winner
// is the hit with the largest length, the lowest input on equal lengths.
module tb_lpm_select;
  import mht_pkg::*;
  localparam int unsigned N = 4, NH_W = 8;
  logic [N-1:0] in_hit;
  plen_t [N-1:0] in_len;
  logic [N-1:0][NH_W-1:0] in_nh;
  logic hit;
  plen_t len;
  logic [NH_W-1:0] nh;
  logic [1:0] src;
  int checks = 0, failures = 0;

  lpm_select #(.N(N), .NH_W(NH_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int n = 0; n < 3000; n++) begin
      in_hit = N'($urandom());
      for (int i = 0; i < N; i++) begin
        in_len[i] = plen_t'($urandom_range(32, 0));
        in_nh[i]  = NH_W'($urandom());
      end
      if (n % 4 == 0) in_len[3] = in_len[1];
      #1;
      best = -1;
      for (int i = N - 1; i >= 0; i--)
        if (in_hit[i] && (best < 0 || in_len[i] >= in_len[best])) best = i;
      checks++;
      if (best < 0) begin
        if (hit !== 1'b0) failures++;
      end else if (hit !== 1'b1 || len !== in_len[best] || nh !== in_nh[best] || src !== 2'(best)) begin
        failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
