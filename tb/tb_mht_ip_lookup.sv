// tb_mht_ip_lookup: end-to-end test of the lookup engine at reduced size
// (3 sub-tables of 16 buckets x 2 entries, 4+2 hash bits, 8 victim entries).
// Prefixes are inserted through the CWR path while lookups run every cycle;
// every lookup result is compared with a brute-force longest-prefix match over
// the prefixes inserted so far (lookups whose answer depends on the prefix
// being inserted, or on a prefix that lost an item, are not judged). Checked:
// two-cycle latency and one result per cycle, the clearing sweep, a change of
// Bit-Select configuration (empties the tables, then the same prefixes are
// inserted again), and a final overload that fills the victim TCAM. Each
// mechanism (direct placement, Cuckoo migration, victim placement, crisis,
// CWR expansion, reconfiguration, hits from tables and from the victim TCAM,
// misses, lookups during insertion) must occur at least once.
module tb_mht_ip_lookup;
  import mht_pkg::*;
  localparam int unsigned R = 4, F = 2, C = 2, D = 3, NH_W = 8, VDEPTH = 8;
  localparam int unsigned VAW = $clog2(VDEPTH), SW = $clog2(D + 1);
  localparam addr_t MASK0 = 32'h1F80_0000;   // positions 4..9
  localparam addr_t MASK1 = 32'h00FC_0000;   // positions 9..14
  localparam int NPFX = 28;

  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_ready, init_busy;
  addr_t cfg_sel_mask, sel_mask;
  logic ins_valid, ins_ready;
  addr_t ins_prefix;
  plen_t ins_len;
  logic [NH_W-1:0] ins_nh;
  logic ev_direct, ev_migrate, ev_victim, ev_crisis;
  logic [VAW:0] victim_count;
  logic lk_valid;
  addr_t lk_addr;
  logic res_valid, res_hit;
  plen_t res_len;
  logic [NH_W-1:0] res_nh;
  logic [SW-1:0] res_src;

  mht_ip_lookup #(.R(R), .F(F), .C(C), .D(D), .NH_W(NH_W), .VDEPTH(VDEPTH),
                  .DEFAULT_SEL_MASK(MASK0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_direct = 0, n_migrate = 0, n_victim = 0, n_crisis = 0, n_expand = 0, n_reconfig = 0;
  int n_hit_table = 0, n_hit_victim = 0, n_miss = 0, n_lk_during_ins = 0, n_judged = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference prefix set
  addr_t pv [$];
  int    pl [$], pn [$];
  bit    pbad [$];           // some item of this prefix was dropped
  int    active = -1;        // prefix being inserted, -1 if none

  function automatic bit pmatch(addr_t key, int k);
    return ((key ^ pv[k]) & prefix_mask(plen_t'(pl[k]))) == 0;
  endfunction

  // expected result; judge = 0 when the answer is not determined
  function automatic void ref_lookup(addr_t key, output bit hit, output int len, output int nh, output bit judge);
    int best = -1;
    judge = 1;
    for (int k = 0; k < pv.size(); k++) begin
      if (k == active) begin
        if (pmatch(key, k)) judge = 0;
        continue;
      end
      if (pmatch(key, k)) begin
        if (pbad[k]) judge = 0;
        if (best < 0 || pl[k] > pl[best]) best = k;
      end
    end
    hit = (best >= 0);
    len = hit ? pl[best] : 0;
    nh  = hit ? pn[best] : 0;
  endfunction

  // ---------------- lookup driver and checker
  typedef struct { bit hit; int len; int nh; bit judge; int cyc; } exp_t;
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  exp_t expq [$];
  bit   lk_run = 0;
  int   lk_issued = 0, lk_results = 0;
  int   lat_bad = 0;

  function automatic addr_t pick_key();
    if (pv.size() == 0 || $urandom_range(4, 0) == 0) return $urandom();
    begin
      int k = $urandom_range(pv.size() - 1, 0);
      return pv[k] | ($urandom() & ~prefix_mask(plen_t'(pl[k])));
    end
  endfunction

  always @(negedge clk) begin
    if (lk_run) begin
      exp_t x;
      lk_valid = 1;
      lk_addr  = pick_key();
      ref_lookup(lk_addr, x.hit, x.len, x.nh, x.judge);
      x.cyc = cycle;
      expq.push_back(x);
      lk_issued++;
      if (active >= 0) n_lk_during_ins++;
    end else begin
      lk_valid = 0;
    end
  end

  // each result must come two clock edges after its lookup was issued
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      exp_t x;
      if (expq.size() == 0) begin
        lat_bad++;
        x = '{0, 0, 0, 0, 0};
      end else begin
        x = expq.pop_front();
        if (cycle - x.cyc != 2) lat_bad++;
      end
      lk_results++;
      if (x.judge) begin
        n_judged++;
        checks++;
        if (res_hit !== x.hit || (x.hit && (res_len !== plen_t'(x.len) || res_nh !== NH_W'(x.nh)))) begin
          failures++;
          if (failures < 6) $display("lookup: hit=%0d/%0d len=%0d/%0d nh=%0d/%0d", res_hit, x.hit, res_len, x.len, res_nh, x.nh);
        end
      end
      if (res_hit && res_src == SW'(D)) n_hit_victim++;
      else if (res_hit) n_hit_table++;
      else n_miss++;
    end
  end

  always @(posedge clk) begin
    if (ev_direct)  n_direct++;
    if (ev_migrate) n_migrate++;
    if (ev_victim)  n_victim++;
    if (ev_crisis)  begin n_crisis++; if (active >= 0) pbad[active] = 1; end
  end

  // ---------------- insertion
  task automatic insert_prefix(addr_t v, int len, int nh);
    int items0, items;
    items0 = n_direct + n_migrate + n_victim + n_crisis;
    pv.push_back(v & prefix_mask(plen_t'(len))); pl.push_back(len); pn.push_back(nh); pbad.push_back(0);
    active = pv.size() - 1;
    @(negedge clk);
    ins_valid = 1; ins_prefix = v; ins_len = plen_t'(len); ins_nh = NH_W'(nh);
    @(posedge clk);
    while (!ins_ready) @(posedge clk);
    @(negedge clk);
    ins_valid = 0;
    while (!ins_ready) @(negedge clk);
    @(negedge clk);
    items = n_direct + n_migrate + n_victim + n_crisis - items0;
    if (items > 1) n_expand++;
    active = -1;
  endtask

  function automatic bit exists(addr_t v, int len);
    for (int k = 0; k < pv.size(); k++)
      if (pl[k] == len && pv[k] == (v & prefix_mask(plen_t'(len)))) return 1;
    return 0;
  endfunction

  addr_t sv_v [$];
  int    sv_l [$], sv_n [$];

  task automatic new_prefixes(int n);
    while (n > 0) begin
      int len = ($urandom_range(3, 0) == 0) ? $urandom_range(9, 6) : $urandom_range(32, 10);
      addr_t v = $urandom() & prefix_mask(plen_t'(len));
      if (!exists(v, len)) begin
        int nh = $urandom_range(255, 0);
        sv_v.push_back(v); sv_l.push_back(len); sv_n.push_back(nh);
        insert_prefix(v, len, nh);
        n--;
      end
    end
  endtask

  task automatic run_lookups(int n);
    lk_run = 1;
    repeat (n) @(negedge clk);
    lk_run = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int c;
    cfg_we = 0; cfg_sel_mask = '0; ins_valid = 0; ins_prefix = '0; ins_len = '0; ins_nh = '0;
    lk_valid = 0; lk_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c = 0;
    while (init_busy) begin @(negedge clk); c++; end
    checks++;
    if (c != 2**R || sel_mask !== MASK0) failures++;

    // phase 1: insert with lookups running every cycle
    lk_run = 1;
    new_prefixes(NPFX);
    lk_run = 0;
    repeat (4) @(negedge clk);
    // phase 2: back-to-back lookups only
    run_lookups(600);

    // phase 3: new Bit-Select configuration, then the same prefixes again
    @(negedge clk);
    cfg_we = 1; cfg_sel_mask = MASK1;
    @(negedge clk);
    cfg_we = 0;
    n_reconfig++;
    checks++;
    if (sel_mask !== MASK1 || !init_busy) failures++;
    while (init_busy) @(negedge clk);
    pv.delete(); pl.delete(); pn.delete(); pbad.delete();
    run_lookups(50);                     // everything misses now
    checks++;
    if (victim_count != 0) failures++;
    lk_run = 1;
    for (int k = 0; k < sv_v.size(); k++) insert_prefix(sv_v[k], sv_l[k], sv_n[k]);
    lk_run = 0;
    repeat (4) @(negedge clk);
    run_lookups(600);

    // phase 4: overload until the victim TCAM is full and items are dropped
    for (int k = 0; k < 120 && n_crisis == 0; k++) new_prefixes(1);
    checks++;
    if (victim_count !== (VAW+1)'(VDEPTH)) failures++;
    run_lookups(300);

    checks++;
    if (lat_bad != 0 || lk_results != lk_issued) begin
      failures++;
      $display("latency/throughput: %0d late, %0d issued, %0d results", lat_bad, lk_issued, lk_results);
    end
    $display("events: direct=%0d migrate=%0d victim=%0d crisis=%0d expand=%0d reconfig=%0d",
             n_direct, n_migrate, n_victim, n_crisis, n_expand, n_reconfig);
    $display("lookups: table_hit=%0d victim_hit=%0d miss=%0d during_insert=%0d judged=%0d",
             n_hit_table, n_hit_victim, n_miss, n_lk_during_ins, n_judged);
    if (n_direct == 0)        begin failures++; $display("no direct placement"); end
    if (n_migrate == 0)       begin failures++; $display("no migration"); end
    if (n_victim == 0)        begin failures++; $display("no victim placement"); end
    if (n_crisis == 0)        begin failures++; $display("no crisis"); end
    if (n_expand == 0)        begin failures++; $display("no CWR expansion"); end
    if (n_reconfig == 0)      begin failures++; $display("no reconfiguration"); end
    if (n_hit_table == 0)     begin failures++; $display("no table hit"); end
    if (n_hit_victim == 0)    begin failures++; $display("no victim hit"); end
    if (n_miss == 0)          begin failures++; $display("no miss"); end
    if (n_lk_during_ins == 0) begin failures++; $display("no lookup during insertion"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
