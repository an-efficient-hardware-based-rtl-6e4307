// tb_victim_tcam: a 100-entry victim TCAM (two priority groups) is filled with
// random prefixes whose care masks also cover some extra hash positions, then
// searched with keys derived from stored entries and with random keys. The
// expected result is a brute-force longest match over a model of the entries,
// one cycle after the search. A clear must empty it.
module tb_victim_tcam;
  import mht_pkg::*;
  localparam int unsigned DEPTH = 100, NH_W = 8, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic clear, we, s_en;
  logic [AW-1:0] waddr;
  addr_t wvalue, wcare, s_key;
  plen_t wlen;
  logic [NH_W-1:0] wnh;
  logic r_hit;
  plen_t r_len;
  logic [NH_W-1:0] r_nh;
  int checks = 0, failures = 0;

  addr_t mval [DEPTH], mcare [DEPTH];
  int    mlen [DEPTH], mnh [DEPTH];
  bit    mvalid [DEPTH];

  victim_tcam #(.DEPTH(DEPTH), .NH_W(NH_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search_and_check(addr_t key);
    int bi;
    @(negedge clk);
    s_en = 1; s_key = key;
    bi = -1;
    for (int i = 0; i < DEPTH; i++)
      if (mvalid[i] && ((key ^ mval[i]) & mcare[i]) == 0 && (bi < 0 || mlen[i] > mlen[bi])) bi = i;
    @(negedge clk);
    s_en = 0;
    checks++;
    if (bi < 0) begin
      if (r_hit !== 1'b0) failures++;
    end else if (r_hit !== 1'b1 || r_len !== plen_t'(mlen[bi]) || r_nh !== NH_W'(mnh[bi])) begin
      failures++;
      if (failures < 5) $display("key=%h hit=%0d len=%0d/%0d nh=%0d/%0d", key, r_hit, r_len, mlen[bi], r_nh, mnh[bi]);
    end
  endtask

  initial begin
    int hits = 0;
    clear = 0; we = 0; s_en = 0; waddr = '0; wvalue = '0; wcare = '0; wlen = '0; wnh = '0; s_key = '0;
    for (int i = 0; i < DEPTH; i++) mvalid[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = (i % 7 != 3);            // leave some entries empty
      waddr = AW'(i);
      wlen = plen_t'($urandom_range(24, 8));
      wcare = prefix_mask(wlen) | 32'h0003_C000;
      wvalue = $urandom() & wcare;
      wnh = NH_W'($urandom());
      if (we) begin
        mvalid[i] = 1; mval[i] = wvalue; mcare[i] = wcare; mlen[i] = wlen; mnh[i] = wnh;
      end
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 1500; n++) begin
      int k = $urandom_range(DEPTH - 1, 0);
      if (n % 3 == 0) search_and_check($urandom());
      else search_and_check(mval[k] | ($urandom() & ~mcare[k]));
      hits += r_hit;
    end
    checks++;
    if (hits < 500) failures++;
    // clear empties the CAM
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < DEPTH; i++) mvalid[i] = 0;
    for (int n = 0; n < 20; n++) search_and_check(mval[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
