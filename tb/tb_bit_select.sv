// tb_bit_select: random addresses, prefix lengths and selection masks with
// exactly R+F ones; the expected r, f, t and tlen are rebuilt by a separate
// MSB-first shift model and compared with the module's outputs.
module tb_bit_select;
  import mht_pkg::*;
  localparam int unsigned R = 12, F = 4, SEL_W = R + F, T_W = 32 - SEL_W;
  localparam int unsigned TLEN_W = $clog2(T_W + 1);

  addr_t key, mask;
  plen_t len;
  logic [R-1:0] r;
  logic [F-1:0] f;
  logic [T_W-1:0] t;
  logic [TLEN_W-1:0] tlen;
  int checks = 0, failures = 0;

  bit_select #(.R(R), .F(F)) dut (.key, .len, .sel_mask(mask), .r, .f, .t, .tlen);

  function automatic addr_t rand_mask(int unsigned n);
    addr_t m = '0;
    int unsigned k = 0;
    while (k < n) begin
      int unsigned p = $urandom_range(31, 0);
      if (!m[p]) begin m[p] = 1'b1; k++; end
    end
    return m;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SEL_W-1:0] eh;
    logic [T_W-1:0] et;
    int unsigned etl;
    for (int n = 0; n < 3000; n++) begin
      key  = $urandom();
      len  = plen_t'($urandom_range(32, 0));
      mask = (n == 0) ? 32'h3FFF_C000 : rand_mask(SEL_W);
      #1;
      eh = '0; et = '0; etl = 0;
      for (int p = 31; p >= 0; p--) begin
        if (mask[p]) eh = {eh[SEL_W-2:0], key[p]};
        else begin
          et = {et[T_W-2:0], (p >= 32 - int'(len)) ? key[p] : 1'b0};
          if (p >= 32 - int'(len)) etl++;
        end
      end
      checks++;
      if (r !== eh[R-1:0] || f !== eh[SEL_W-1:R] || t !== et || tlen !== TLEN_W'(etl)) begin
        failures++;
        if (failures < 5) $display("mismatch key=%h len=%0d mask=%h r=%h/%h f=%h/%h t=%h/%h tlen=%0d/%0d",
                                   key, len, mask, r, eh[R-1:0], f, eh[SEL_W-1:R], t, et, tlen, etl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
