// mht_ip_lookup: hash-based IP longest-prefix-match engine with D parallel
// sub-tables, one-step Cuckoo insertion and a victim TCAM.
//
// Lookup path (one lookup per cycle, result two cycles later):
//   cycle 0  the Bit-Select logic extracts r, f and t from lk_addr; each
//            sub-table's hash_index turns (r, f) into its own bucket index and
//            the D buckets are read in parallel; the victim TCAM is searched
//            at the same time;
//   cycle 1  D match processors compare the C keys of each fetched bucket with
//            the key; lpm_select picks the longest match among the D buckets
//            and the victim TCAM; the result is registered;
//   cycle 2  res_valid, res_hit, res_len, res_nh (next hop), res_src (0..D-1
//            sub-table, D victim TCAM).
// Insertion path: a prefix (ins_prefix, ins_len, ins_nh) enters through a
// valid/ready handshake; cwr_expander resolves the wildcard bits that fall on
// hash bits (controlled wildcard resolution) and insert_ctrl places each
// resulting item (d-left, one Cuckoo step, victim TCAM). Each item raises one
// of ev_direct, ev_migrate, ev_victim, ev_crisis. Insertion uses a second
// port of each sub-table, so lookups continue during updates.
// Configuration: the Bit-Select mask (R+F ones) resets to DEFAULT_SEL_MASK
// and can be replaced with cfg_we when cfg_ready is high; this empties the
// tables (a 2**R cycle sweep, also done after reset, with init_busy high).
// Default sizes: 3 sub-tables of 4096 buckets, 12-bit index from 16 selected
// bits, as in the document's baseline. Bucket size C = 32, an 8-bit next hop,
// a 9830-entry victim TCAM and the default mask are this design's choices.
module mht_ip_lookup
  import mht_pkg::*;
#(
  parameter int unsigned R                = 12,
  parameter int unsigned F                = 4,
  parameter int unsigned C                = 32,
  parameter int unsigned D                = 3,
  parameter int unsigned NH_W             = 8,
  parameter int unsigned VDEPTH           = 9830,
  parameter logic [31:0] DEFAULT_SEL_MASK = 32'h3FFF_C000,
  parameter int unsigned VAW              = $clog2(VDEPTH),
  parameter int unsigned SW               = $clog2(D + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // Bit-Select configuration
  input  logic            cfg_we,
  input  addr_t           cfg_sel_mask,
  output logic            cfg_ready,
  output addr_t           sel_mask,
  output logic            init_busy,
  // prefix insertion
  input  logic            ins_valid,
  output logic            ins_ready,
  input  addr_t           ins_prefix,
  input  plen_t           ins_len,
  input  logic [NH_W-1:0] ins_nh,
  output logic            ev_direct,
  output logic            ev_migrate,
  output logic            ev_victim,
  output logic            ev_crisis,
  output logic [VAW:0]    victim_count,
  // lookup
  input  logic            lk_valid,
  input  addr_t           lk_addr,
  output logic            res_valid,
  output logic            res_hit,
  output plen_t           res_len,
  output logic [NH_W-1:0] res_nh,
  output logic [SW-1:0]   res_src
);

  localparam int unsigned T_W    = ADDR_W - R - F;
  localparam int unsigned TLEN_W = $clog2(T_W + 1);
  localparam int unsigned W      = 1 + F + T_W + LEN_W + TLEN_W + NH_W;

  // ---- configuration register
  logic  ctrl_idle, cwr_ready, clear_req;
  assign cfg_ready = ctrl_idle && cwr_ready;
  assign clear_req = cfg_we && cfg_ready;
  assign init_busy = !ctrl_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sel_mask <= DEFAULT_SEL_MASK;
    else if (clear_req) sel_mask <= cfg_sel_mask;
  end

  // ---- insertion: CWR expansion, then placement
  logic            it_valid, it_ready;
  addr_t           it_key;
  plen_t           it_len;
  logic [NH_W-1:0] it_nh;

  cwr_expander #(.SEL_W(R + F), .NH_W(NH_W)) u_cwr (
    .clk, .rst_n, .sel_mask,
    .in_valid(ins_valid && ctrl_idle), .in_ready(cwr_ready),
    .in_prefix(ins_prefix), .in_len(ins_len), .in_nh(ins_nh),
    .out_valid(it_valid), .out_ready(it_ready),
    .out_key(it_key), .out_len(it_len), .out_nh(it_nh), .out_last()
  );
  assign ins_ready = cwr_ready && ctrl_idle;

  logic [D-1:0]               tb_re;
  logic [D-1:0][R-1:0]        tb_addr;
  logic [D-1:0][C-1:0][W-1:0] tb_rrow;
  logic [D-1:0][C-1:0]        tb_we_mask;
  logic [D-1:0][C-1:0][W-1:0] tb_wrow;
  logic                       vt_clear, vt_we;
  logic [VAW-1:0]             vt_waddr;
  addr_t                      vt_wvalue, vt_wcare;
  plen_t                      vt_wlen;
  logic [NH_W-1:0]            vt_wnh;

  insert_ctrl #(.R(R), .F(F), .C(C), .D(D), .NH_W(NH_W), .VDEPTH(VDEPTH)) u_ins (
    .clk, .rst_n, .clear_req, .idle(ctrl_idle), .sel_mask,
    .it_valid, .it_ready, .it_key, .it_len, .it_nh,
    .tb_re, .tb_addr, .tb_rrow, .tb_we_mask, .tb_wrow,
    .vt_clear, .vt_we, .vt_waddr, .vt_wvalue, .vt_wcare, .vt_wlen, .vt_wnh,
    .victim_count,
    .ev_direct, .ev_migrate, .ev_victim, .ev_crisis
  );

  // ---- lookup stage 0: bit select, index generation, memory access
  logic [R-1:0]        kr;
  logic [F-1:0]        kf;
  logic [T_W-1:0]      kt;
  logic [D-1:0][R-1:0] kidx;
  logic [D-1:0][C-1:0][W-1:0] la_row;

  bit_select #(.R(R), .F(F)) u_bsel (
    .key(lk_addr), .len(plen_t'(ADDR_W)), .sel_mask,
    .r(kr), .f(kf), .t(kt), .tlen()
  );

  for (genvar i = 0; i < D; i++) begin : g_tab
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) u_hash (.r(kr), .f(kf), .idx(kidx[i]));
    sub_table #(.R(R), .C(C), .W(W)) u_tab (
      .clk,
      .la_en(lk_valid), .la_addr(kidx[i]), .la_row(la_row[i]),
      .ub_re(tb_re[i]), .ub_addr(tb_addr[i]), .ub_row(tb_rrow[i]),
      .ub_we_mask(tb_we_mask[i]), .ub_wrow(tb_wrow[i])
    );
  end

  logic            v_hit;
  plen_t           v_len;
  logic [NH_W-1:0] v_nh;

  victim_tcam #(.DEPTH(VDEPTH), .NH_W(NH_W)) u_victim (
    .clk, .rst_n, .clear(vt_clear),
    .we(vt_we), .waddr(vt_waddr), .wvalue(vt_wvalue), .wcare(vt_wcare),
    .wlen(vt_wlen), .wnh(vt_wnh),
    .s_en(lk_valid), .s_key(lk_addr),
    .r_hit(v_hit), .r_len(v_len), .r_nh(v_nh)
  );

  // key bits needed by the match processors, one cycle later
  logic           s1_valid;
  logic [F-1:0]   s1_f;
  logic [T_W-1:0] s1_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_f     <= '0;
      s1_t     <= '0;
    end else begin
      s1_valid <= lk_valid;
      if (lk_valid) begin
        s1_f <= kf;
        s1_t <= kt;
      end
    end
  end

  // ---- lookup stage 1: match processors and LPM choice
  logic [D:0]            c_hit;
  plen_t [D:0]           c_len;
  logic [D:0][NH_W-1:0]  c_nh;

  for (genvar i = 0; i < D; i++) begin : g_match
    match_processor #(.R(R), .F(F), .C(C), .NH_W(NH_W)) u_mp (
      .row(la_row[i]), .key_f(s1_f), .key_t(s1_t),
      .hit(c_hit[i]), .len(c_len[i]), .nh(c_nh[i])
    );
  end
  assign c_hit[D] = v_hit;
  assign c_len[D] = v_len;
  assign c_nh[D]  = v_nh;

  logic            l_hit;
  plen_t           l_len;
  logic [NH_W-1:0] l_nh;
  logic [SW-1:0]   l_src;

  lpm_select #(.N(D + 1), .NH_W(NH_W)) u_lpm (
    .in_hit(c_hit), .in_len(c_len), .in_nh(c_nh),
    .hit(l_hit), .len(l_len), .nh(l_nh), .src(l_src)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_len   <= '0;
      res_nh    <= '0;
      res_src   <= '0;
    end else begin
      res_valid <= s1_valid;
      res_hit   <= s1_valid && l_hit;
      res_len   <= l_len;
      res_nh    <= l_nh;
      res_src   <= l_src;
    end
  end

  // ---- handshake and configuration rules
  property p_ins_stable;
    @(posedge clk) disable iff (!rst_n)
      ins_valid && !ins_ready |=> $stable(ins_prefix) && $stable(ins_len) && $stable(ins_nh);
  endproperty
  a_ins_stable: assert property (p_ins_stable);

  a_mask_width: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(sel_mask) == R + F);

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ev_direct, ev_migrate, ev_victim, ev_crisis}));

endmodule
