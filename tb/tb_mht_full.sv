// tb_mht_full: the lookup engine at its default size (3 sub-tables of 4096
// buckets x 32 entries, 12-bit index from 16 hash bits, 9830-entry victim
// TCAM). After the 4096-cycle clearing sweep it inserts 80,000 distinct random
// prefixes with a core-table-like length mix (mostly /16 to /24, some shorter
// ones that CWR expands). That is about 200,000 stored items, a load factor of
// about 0.5 of the 393,216 entries. It prints how many items needed a Cuckoo
// move or a victim entry, counts a failure for any dropped item, and then
// checks 1000 back-to-back lookups against a brute-force longest-prefix match,
// including the two-cycle latency. Random prefixes hash more evenly than real
// routing tables, so the migration and victim counts are a best case.
module tb_mht_full;
  import mht_pkg::*;
  localparam int unsigned NH_W = 8;
  localparam int NPFX = 80000;

  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_ready, init_busy;
  addr_t cfg_sel_mask, sel_mask;
  logic ins_valid, ins_ready;
  addr_t ins_prefix;
  plen_t ins_len;
  logic [NH_W-1:0] ins_nh;
  logic ev_direct, ev_migrate, ev_victim, ev_crisis;
  logic [14:0] victim_count;
  logic lk_valid;
  addr_t lk_addr;
  logic res_valid, res_hit;
  plen_t res_len;
  logic [NH_W-1:0] res_nh;
  logic [1:0] res_src;

  mht_ip_lookup dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, items = 0, expanded = 0, hits = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t pv [$];
  int    pl [$], pn [$];

  always @(posedge clk) if (ev_direct || ev_migrate || ev_victim || ev_crisis) items++;
  always @(posedge clk) if (ev_crisis) failures++;

  bit seen [longint];
  int n_migrate = 0, n_victim = 0;
  always @(posedge clk) if (ev_migrate) n_migrate++;
  always @(posedge clk) if (ev_victim) n_victim++;

  initial begin
    int c;
    cfg_we = 0; cfg_sel_mask = '0; ins_valid = 0; ins_prefix = '0; ins_len = '0; ins_nh = '0;
    lk_valid = 0; lk_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c = 0;
    while (init_busy) begin @(negedge clk); c++; end
    checks++;
    if (c != 4096) failures++;
    $display("cleared after %0d cycles", c);

    while (pv.size() < NPFX) begin
      automatic int r = $urandom_range(99, 0);
      automatic int len = (r < 55) ? 24 : (r < 95) ? $urandom_range(23, 16) : $urandom_range(15, 12);
      automatic addr_t v = $urandom() & prefix_mask(plen_t'(len));
      if (!seen.exists(longint'({len[5:0], v}))) begin
        automatic int i0 = items;
        seen[longint'({len[5:0], v})] = 1;
        pv.push_back(v); pl.push_back(len); pn.push_back($urandom_range(255, 0));
        @(negedge clk);
        ins_valid = 1; ins_prefix = v; ins_len = plen_t'(len); ins_nh = NH_W'(pn[$]);
        @(posedge clk);
        while (!ins_ready) @(posedge clk);
        @(negedge clk);
        ins_valid = 0;
        while (!ins_ready) @(negedge clk);
        @(negedge clk);
        if (items - i0 > 1) expanded++;
        if (pv.size() % 10000 == 0) $display("%0d prefixes inserted", pv.size());
      end
    end
    checks++;
    if (expanded == 0) failures++;

    // back-to-back lookups, result two edges after issue
    for (int n = 0; n < 1002; n++) begin
      static addr_t key [3];
      @(negedge clk);
      if (n >= 2 && n < 1002) begin
        // result of the lookup issued two iterations ago is visible now
        automatic int best = -1;
        for (int k = 0; k < pv.size(); k++)
          if (((key[1] ^ pv[k]) & prefix_mask(plen_t'(pl[k]))) == 0 && (best < 0 || pl[k] > pl[best])) best = k;
        checks++;
        if (!res_valid || res_hit !== (best >= 0) ||
            (best >= 0 && (res_len !== plen_t'(pl[best]) || res_nh !== NH_W'(pn[best])))) begin
          failures++;
          if (failures < 6) $display("key %h: hit=%0d len=%0d nh=%0d", key[1], res_hit, res_len, res_nh);
        end
        hits += res_hit;
      end
      key[0] = key[1];
      key[1] = lk_addr;
      if (n < 1000) begin
        automatic int k = $urandom_range(pv.size() - 1, 0);
        lk_valid = 1;
        lk_addr = (n % 5 == 0) ? $urandom() : (pv[k] | ($urandom() & ~prefix_mask(plen_t'(pl[k]))));
      end else lk_valid = 0;
    end
    checks++;
    if (hits < 500) failures++;
    $display("prefixes=%0d items=%0d expanded=%0d hits=%0d", pv.size(), items, expanded, hits);
    $display("load factor %0d/%0d, migrations=%0d, victim entries=%0d", items, 3 * 4096 * 32, n_migrate, n_victim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
