// tb_insert_ctrl: the insertion controller on three small sub-tables
// (8 buckets of 2 entries, 5 hash bits of which 2 are folded) and a 4-entry
// victim space. A reference model written here runs the same placement rules
// (least loaded bucket, leftmost on a tie; else one Cuckoo move of the first
// movable occupant, table by table and entry by entry, to the leftmost other
// table with room; else victim; else drop). For every item the event, the
// victim write and the number of cycles until the controller is idle again
// are checked; after each round the three tables are compared entry by entry
// with the model. A clear request between the rounds must empty everything.
`include "mht_entry.svh"
module tb_insert_ctrl;
  import mht_pkg::*;
  localparam int unsigned R = 3, F = 2, C = 2, D = 3, NH_W = 8, VDEPTH = 4;
  localparam int unsigned VAW = $clog2(VDEPTH);
  localparam int unsigned SEL_W = R + F, T_W = 32 - SEL_W, TLEN_W = $clog2(T_W + 1);
  localparam int unsigned W = 1 + F + T_W + LEN_W + TLEN_W + NH_W;
  localparam addr_t MASK = 32'h0F80_0000;

  `MHT_ENTRY_T

  logic clk = 0, rst_n = 0;
  logic clear_req, idle, it_valid, it_ready;
  addr_t sel_mask, it_key;
  plen_t it_len;
  logic [NH_W-1:0] it_nh;
  logic [D-1:0] tb_re;
  logic [D-1:0][R-1:0] tb_addr;
  logic [D-1:0][C-1:0][W-1:0] tb_rrow, tb_wrow;
  logic [D-1:0][C-1:0] tb_we_mask;
  logic vt_clear, vt_we;
  logic [VAW-1:0] vt_waddr;
  addr_t vt_wvalue, vt_wcare;
  plen_t vt_wlen;
  logic [NH_W-1:0] vt_wnh;
  logic [VAW:0] victim_count;
  logic ev_direct, ev_migrate, ev_victim, ev_crisis;

  insert_ctrl #(.R(R), .F(F), .C(C), .D(D), .NH_W(NH_W), .VDEPTH(VDEPTH)) dut (.*);

  sub_table #(.R(R), .C(C), .W(W)) t0 (.clk, .la_en(1'b0), .la_addr('0), .la_row(),
    .ub_re(tb_re[0]), .ub_addr(tb_addr[0]), .ub_row(tb_rrow[0]), .ub_we_mask(tb_we_mask[0]), .ub_wrow(tb_wrow[0]));
  sub_table #(.R(R), .C(C), .W(W)) t1 (.clk, .la_en(1'b0), .la_addr('0), .la_row(),
    .ub_re(tb_re[1]), .ub_addr(tb_addr[1]), .ub_row(tb_rrow[1]), .ub_we_mask(tb_we_mask[1]), .ub_wrow(tb_wrow[1]));
  sub_table #(.R(R), .C(C), .W(W)) t2 (.clk, .la_en(1'b0), .la_addr('0), .la_row(),
    .ub_re(tb_re[2]), .ub_addr(tb_addr[2]), .ub_row(tb_rrow[2]), .ub_we_mask(tb_we_mask[2]), .ub_wrow(tb_wrow[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_direct = 0, n_migrate = 0, n_victim = 0, n_crisis = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  entry_t rt [D][2**R][C];
  int     rvcount;

  function automatic logic [R-1:0] hfun(logic [R-1:0] r, logic [F-1:0] f, int i);
    logic [F-1:0] rot;
    logic [R-1:0] idx;
    for (int b = 0; b < F; b++) rot[(b + i) % F] = f[b];
    for (int k = 0; k < R; k++) idx[k] = r[k] ^ rot[k % F];
    return idx;
  endfunction

  function automatic entry_t make_entry(addr_t key, plen_t len, logic [NH_W-1:0] nh, output logic [R-1:0] r);
    entry_t e;
    logic [SEL_W-1:0] h = '0;
    logic [T_W-1:0] t = '0;
    int tl = 0;
    for (int p = 31; p >= 0; p--) begin
      if (MASK[p]) h = {h[SEL_W-2:0], key[p]};
      else begin
        t = {t[T_W-2:0], (p >= 32 - int'(len)) ? key[p] : 1'b0};
        if (p >= 32 - int'(len)) tl++;
      end
    end
    r = h[R-1:0];
    e.valid = 1; e.f = h[SEL_W-1:R]; e.t = t; e.len = len; e.tlen = TLEN_W'(tl); e.nh = nh;
    return e;
  endfunction

  function automatic int first_free(int i, logic [R-1:0] a);
    for (int e = 0; e < C; e++) if (!rt[i][a][e].valid) return e;
    return -1;
  endfunction

  function automatic int load_of(int i, logic [R-1:0] a);
    int l = 0;
    for (int e = 0; e < C; e++) l += rt[i][a][e].valid;
    return l;
  endfunction

  // returns 0 direct, 1 migrate, 2 victim, 3 crisis; tries = candidates examined
  function automatic int ref_insert(entry_t x, logic [R-1:0] xr, output int tries);
    logic [R-1:0] hx [D];
    int best = 0;
    tries = 0;
    for (int i = 0; i < D; i++) hx[i] = hfun(xr, x.f, i);
    for (int i = 1; i < D; i++) if (load_of(i, hx[i]) < load_of(best, hx[best])) best = i;
    if (load_of(best, hx[best]) < C) begin
      rt[best][hx[best]][first_free(best, hx[best])] = x;
      return 0;
    end
    for (int i = 0; i < D; i++)
      for (int s = 0; s < C; s++) begin
        entry_t y = rt[i][hx[i]][s];
        logic [R-1:0] ry = hfun(hx[i], y.f, i);
        tries++;
        for (int j = 0; j < D; j++) begin
          logic [R-1:0] hy = hfun(ry, y.f, j);
          if (j != i && first_free(j, hy) >= 0) begin
            rt[j][hy][first_free(j, hy)] = y;
            rt[i][hx[i]][s] = x;
            return 1;
          end
        end
      end
    if (rvcount < VDEPTH) begin rvcount++; return 2; end
    return 3;
  endfunction

  // ---------------- stimulus
  int seen_ev;
  always @(posedge clk) begin
    if (ev_direct)  begin seen_ev = 0; n_direct++;  end
    if (ev_migrate) begin seen_ev = 1; n_migrate++; end
    if (ev_victim)  begin seen_ev = 2; n_victim++;  end
    if (ev_crisis)  begin seen_ev = 3; n_crisis++;  end
  end

  addr_t vt_exp_value, vt_exp_care;
  int vt_writes;
  always @(posedge clk) if (vt_we) begin
    vt_writes++;
    checks++;
    if (vt_wvalue !== vt_exp_value || vt_wcare !== vt_exp_care || vt_waddr !== VAW'(rvcount - 1))
      failures++;
  end

  task automatic compare_tables(string tag);
    entry_t got;
    int bad = 0;
    for (int a = 0; a < 2**R; a++)
      for (int e = 0; e < C; e++) begin
        for (int i = 0; i < D; i++) begin
          got = entry_t'(i == 0 ? t0.mem[a][e] : i == 1 ? t1.mem[a][e] : t2.mem[a][e]);
          if (got.valid !== rt[i][a][e].valid || (got.valid && got !== rt[i][a][e])) bad++;
        end
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: %0d table entries differ from the model", tag, bad);
    end
  endtask

  task automatic run_round(int items);
    for (int n = 0; n < items; n++) begin
      addr_t key;
      plen_t len;
      logic [NH_W-1:0] nh;
      entry_t x;
      logic [R-1:0] xr;
      int expect_ev, tries, cycles;
      len = plen_t'($urandom_range(32, 0));
      key = ($urandom() & prefix_mask(len)) | ($urandom() & MASK);
      nh  = NH_W'($urandom());
      x = make_entry(key, len, nh, xr);
      vt_exp_value = key;
      vt_exp_care  = prefix_mask(len) | MASK;
      expect_ev = ref_insert(x, xr, tries);
      seen_ev = -1;
      @(negedge clk);
      it_valid = 1; it_key = key; it_len = len; it_nh = nh;
      @(posedge clk);
      while (!it_ready) @(posedge clk);
      @(negedge clk);
      it_valid = 0;
      cycles = 0;
      while (!idle) begin @(negedge clk); cycles++; end
      checks++;
      if (seen_ev != expect_ev) begin
        failures++;
        if (failures < 6) $display("item %0d: event %0d, expected %0d", n, seen_ev, expect_ev);
      end
      checks++;
      if (cycles != 1 + 2 * tries) begin
        failures++;
        if (failures < 6) $display("item %0d: %0d busy cycles, expected %0d", n, cycles, 1 + 2 * tries);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) for (int a = 0; a < 2**R; a++) for (int e = 0; e < C; e++) rt[i][a][e] = '0;
    rvcount = 0; vt_writes = 0;
    clear_req = 0; it_valid = 0; it_key = '0; it_len = '0; it_nh = '0; sel_mask = MASK;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clearing sweep after reset: 2**R cycles
    begin
      int c = 0;
      while (!idle) begin @(negedge clk); c++; end
      checks++;
      if (c != 2**R) failures++;
    end
    run_round(70);
    compare_tables("round 1");
    checks++;
    if (victim_count !== (VAW+1)'(rvcount)) failures++;
    // clear request empties the tables and the victim count
    @(negedge clk); clear_req = 1;
    @(negedge clk); clear_req = 0;
    while (!idle) @(negedge clk);
    for (int i = 0; i < D; i++) for (int a = 0; a < 2**R; a++) for (int e = 0; e < C; e++) rt[i][a][e] = '0;
    rvcount = 0;
    compare_tables("after clear");
    checks++;
    if (victim_count != 0) failures++;
    run_round(40);
    compare_tables("round 2");
    $display("placements: direct=%0d migrate=%0d victim=%0d crisis=%0d", n_direct, n_migrate, n_victim, n_crisis);
    checks++;
    if (n_direct == 0 || n_migrate == 0 || n_victim == 0 || n_crisis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
