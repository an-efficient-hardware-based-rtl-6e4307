// tb_hash_index: checks the three default sub-table hash functions (12-bit
// index, 4 folded bits) against the closed form idx = r ^ {3{rotl(f, i)}},
// and that feeding an index back in as r returns the original r bits.
module tb_hash_index;
  localparam int unsigned R = 12, F = 4;
  logic [R-1:0] r;
  logic [F-1:0] f;
  logic [2:0][R-1:0] idx, back;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) u  (.r(r),      .f(f), .idx(idx[i]));
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) ub (.r(idx[i]), .f(f), .idx(back[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [F-1:0] rot;
    logic [R-1:0] e;
    for (int n = 0; n < 2000; n++) begin
      r = R'($urandom());
      f = F'($urandom());
      #1;
      for (int i = 0; i < 3; i++) begin
        rot = (i == 0) ? f : F'({f, f} >> (F - i));
        e = r ^ {rot, rot, rot};
        checks++;
        if (idx[i] !== e || back[i] !== r) begin
          failures++;
          if (failures < 5) $display("table %0d r=%h f=%h idx=%h exp=%h back=%h", i, r, f, idx[i], e, back[i]);
        end
      end
    end
    // the three functions must differ for some f
    r = '0; f = 4'b0001; #1;
    checks++;
    if (idx[0] == idx[1] || idx[1] == idx[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
