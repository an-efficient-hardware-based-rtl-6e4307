// tb_sub_table: random reads on both ports and masked writes on port B of a
// small sub-table (16 buckets of 4 entries), compared with an array model;
// reads return data one cycle after the request, old data on a same-cycle
// write.
module tb_sub_table;
  localparam int unsigned R = 4, C = 4, W = 8;
  logic clk = 0;
  logic la_en, ub_re;
  logic [R-1:0] la_addr, ub_addr;
  logic [C-1:0][W-1:0] la_row, ub_row, ub_wrow;
  logic [C-1:0] ub_we_mask;
  logic [C-1:0][W-1:0] model [2**R];
  logic [C-1:0][W-1:0] exp_a, exp_b;
  logic chk_a, chk_b;
  int checks = 0, failures = 0;

  sub_table #(.R(R), .C(C), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    la_en = 0; ub_re = 0; ub_we_mask = '0; la_addr = '0; ub_addr = '0; ub_wrow = '0;
    chk_a = 0; chk_b = 0;
    // fill every row first so that reads are defined
    for (int a = 0; a < 2**R; a++) begin
      @(negedge clk);
      ub_addr = R'(a); ub_we_mask = '1;
      for (int e = 0; e < C; e++) ub_wrow[e] = W'($urandom());
      model[a] = ub_wrow;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (la_row !== exp_a) failures++; end
      if (chk_b) begin checks++; if (ub_row !== exp_b) failures++; end
      la_en = $urandom_range(1, 0); la_addr = R'($urandom());
      ub_re = $urandom_range(1, 0); ub_addr = R'($urandom());
      ub_we_mask = C'($urandom());
      for (int e = 0; e < C; e++) ub_wrow[e] = W'($urandom());
      chk_a = la_en; exp_a = model[la_addr];
      chk_b = ub_re; exp_b = model[ub_addr];
      for (int e = 0; e < C; e++) if (ub_we_mask[e]) model[ub_addr][e] = ub_wrow[e];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
