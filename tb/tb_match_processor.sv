// tb_match_processor: buckets of 8 random entries built around a random search
// key (some with equal f and tag, some with a flipped bit inside or outside
// their significant tag part, some invalid). The expected hit and longest
// length are computed bit by bit, independently of the module.
`include "mht_entry.svh"
module tb_match_processor;
  import mht_pkg::*;
  localparam int unsigned R = 12, F = 4, C = 8, NH_W = 8;
  localparam int unsigned T_W = 32 - R - F, TLEN_W = $clog2(T_W + 1);
  localparam int unsigned W = 1 + F + T_W + LEN_W + TLEN_W + NH_W;

  `MHT_ENTRY_T

  entry_t [C-1:0] row;
  logic [F-1:0] key_f;
  logic [T_W-1:0] key_t;
  logic hit;
  plen_t len;
  logic [NH_W-1:0] nh;
  int checks = 0, failures = 0;

  match_processor #(.R(R), .F(F), .C(C), .NH_W(NH_W)) dut (
    .row(row), .key_f, .key_t, .hit, .len, .nh);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok, ehit;
    int elen, enh, hits = 0;
    for (int n = 0; n < 3000; n++) begin
      key_f = F'($urandom());
      key_t = T_W'($urandom());
      for (int e = 0; e < C; e++) begin
        row[e].valid = ($urandom_range(9, 0) != 0);
        row[e].f     = ($urandom_range(2, 0) == 0) ? key_f : F'($urandom());
        row[e].tlen  = TLEN_W'($urandom_range(T_W, 0));
        row[e].t     = key_t;
        for (int b = 0; b < T_W - int'(row[e].tlen); b++) row[e].t[b] = 1'b0;
        if ($urandom_range(1, 0) == 0) row[e].t[$urandom_range(T_W - 1, 0)] ^= 1'b1;
        row[e].len   = plen_t'($urandom_range(32, 0));
        row[e].nh    = NH_W'($urandom());
      end
      #1;
      ehit = 0; elen = 0; enh = 0;
      for (int e = 0; e < C; e++) begin
        ok = row[e].valid && (row[e].f == key_f);
        for (int k = 0; k < int'(row[e].tlen); k++)
          if (row[e].t[T_W-1-k] != key_t[T_W-1-k]) ok = 0;
        if (ok && (!ehit || int'(row[e].len) > elen)) begin
          ehit = 1; elen = row[e].len; enh = row[e].nh;
        end
      end
      hits += ehit;
      checks++;
      if (hit !== ehit || (ehit && (len !== plen_t'(elen) || nh !== NH_W'(enh)))) begin
        failures++;
        if (failures < 5) $display("n=%0d hit=%0d/%0d len=%0d/%0d nh=%0d/%0d", n, hit, ehit, len, elen, nh, enh);
      end
    end
    checks++;
    if (hits < 100 || hits > 2950) failures++;
    $display("bucket hits: %0d of 3000", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
