// tb_cwr_expander: random prefixes and 6-bit selection masks; the expander
// must emit exactly 2**w items (w = selected positions past the prefix
// length), all different, each equal to the prefix outside those positions,
// with the prefix's length and next hop, and out_last only on the final one.
// out_ready is toggled randomly. The first case is the three-bit example
// prefix 101 with hash bits at positions 2 to 4: one wildcard hash bit, two items.
module tb_cwr_expander;
  import mht_pkg::*;
  localparam int unsigned SEL_W = 6, NH_W = 8;
  logic clk = 0, rst_n = 0;
  addr_t sel_mask, in_prefix, out_key;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  plen_t in_len, out_len;
  logic [NH_W-1:0] in_nh, out_nh;
  int checks = 0, failures = 0;

  cwr_expander #(.SEL_W(SEL_W), .NH_W(NH_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    addr_t pm, wild, base;
    int w, got, lasts, multi = 0;
    bit seen [addr_t];
    in_valid = 0; out_ready = 0; in_prefix = '0; in_len = '0; in_nh = '0; sel_mask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      if (n == 0) begin
        in_prefix = 32'hA000_0000; in_len = 6'd3;
        sel_mask  = 32'h7000_0000;   // hash bits at positions 2..4
      end else begin
        sel_mask  = rand_mask(SEL_W);
        in_len    = plen_t'($urandom_range(32, 0));
        in_prefix = $urandom();
      end
      in_nh = NH_W'($urandom());
      pm = prefix_mask(in_len);
      wild = sel_mask & ~pm;
      base = in_prefix & pm;
      w = $countones(wild);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      seen.delete();
      got = 0; lasts = 0;
      while (lasts == 0 && got < 200) begin
        out_ready = ($urandom_range(3, 0) != 0);
        #1;
        if (out_valid && out_ready) begin
          got++;
          checks++;
          if ((out_key & ~wild) !== base || out_len !== in_len || out_nh !== in_nh || seen.exists(out_key))
            failures++;
          seen[out_key] = 1;
          if (out_last) lasts++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (got != (1 << w)) begin
        failures++;
        if (failures < 5) $display("n=%0d w=%0d got=%0d", n, w, got);
      end
      if (n == 0) begin checks++; if (got != 2 || w != 1) failures++; end
      if (got > 1) multi++;
    end
    checks++;
    if (multi < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
