// insert_ctrl: insertion controller of the multi-hash table.
// It takes fully specified items (already expanded by CWR) one at a time and
// places each in one of the D sub-tables:
//  1. Read the D candidate buckets T_i[h_i(x)] in parallel (one memory cycle).
//  2. If any has a free entry, write x into the least loaded one, the
//     leftmost on a tie (d-left). Event ev_direct.
//  3. Otherwise try one Cuckoo step: for each occupant y of the D full buckets
//     (table by table, entry by entry, c x d candidates at most) read the
//     buckets T_j[h_j(y)], j != i, in parallel. The first candidate with a
//     free entry in some T_j (leftmost j) moves there and x takes its place;
//     both writes happen in the same cycle, so y is never absent. ev_migrate.
//  4. If no occupant can move, the collision is unresolved and x goes to the
//     victim TCAM (ev_victim), or is dropped when that is full (ev_crisis).
// The R index bits of y are not stored; they are recovered by passing y's
// bucket index through the same hash_index fold (the fold is an involution).
// After reset and on clear_req the controller sweeps every row of every
// sub-table, writing empty entries, and empties the victim TCAM; idle is low
// meanwhile (2**R cycles).
// Timing per item: 2 cycles when placed directly (read, write), plus 2 cycles
// per Cuckoo candidate examined. Worst case c*d+1 bucket reads, as the
// document states. The algorithm is the document's; the order in which
// candidates are tried, the cycle timing and the clear sweep are this
// design's choices.
`include "mht_entry.svh"
module insert_ctrl
  import mht_pkg::*;
#(
  parameter int unsigned R      = 12,
  parameter int unsigned F      = 4,
  parameter int unsigned C      = 32,
  parameter int unsigned D      = 3,
  parameter int unsigned NH_W   = 8,
  parameter int unsigned VDEPTH = 9830,
  parameter int unsigned VAW    = $clog2(VDEPTH),
  parameter int unsigned T_W    = ADDR_W - R - F,
  parameter int unsigned TLEN_W = $clog2(T_W + 1),
  parameter int unsigned W      = 1 + F + T_W + LEN_W + TLEN_W + NH_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear_req,
  output logic                       idle,
  input  addr_t                      sel_mask,
  // items from the CWR expander
  input  logic                       it_valid,
  output logic                       it_ready,
  input  addr_t                      it_key,
  input  plen_t                      it_len,
  input  logic [NH_W-1:0]            it_nh,
  // update ports (port B) of the D sub-tables
  output logic [D-1:0]               tb_re,
  output logic [D-1:0][R-1:0]        tb_addr,
  input  logic [D-1:0][C-1:0][W-1:0] tb_rrow,
  output logic [D-1:0][C-1:0]        tb_we_mask,
  output logic [D-1:0][C-1:0][W-1:0] tb_wrow,
  // victim TCAM write port
  output logic                       vt_clear,
  output logic                       vt_we,
  output logic [VAW-1:0]             vt_waddr,
  output addr_t                      vt_wvalue,
  output addr_t                      vt_wcare,
  output plen_t                      vt_wlen,
  output logic [NH_W-1:0]            vt_wnh,
  output logic [VAW:0]               victim_count,
  // one pulse per item, telling how it was placed
  output logic                       ev_direct,
  output logic                       ev_migrate,
  output logic                       ev_victim,
  output logic                       ev_crisis
);

  `MHT_ENTRY_T

  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned LW = $clog2(C + 1);

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_PROBE, S_CK_ISSUE, S_CK_CHK} state_t;

  state_t              state;
  logic [R-1:0]        clr_cnt;
  entry_t              x_q;
  addr_t               xkey_q;
  logic [D-1:0][R-1:0] hx_q;
  entry_t              bufrow [D][C];
  logic [DW-1:0]       cand_t;
  logic [CW-1:0]       cand_s;
  logic [VAW:0]        vcount;

  // ---- the incoming item: hash bits, tag and indices
  logic [R-1:0]        xr;
  logic [F-1:0]        xf;
  logic [T_W-1:0]      xt;
  logic [TLEN_W-1:0]   xtlen;
  logic [D-1:0][R-1:0] hx;
  entry_t              x_new;

  bit_select #(.R(R), .F(F)) u_bsel (
    .key(it_key), .len(it_len), .sel_mask(sel_mask),
    .r(xr), .f(xf), .t(xt), .tlen(xtlen)
  );

  assign x_new = '{valid: 1'b1, f: xf, t: xt, len: it_len, tlen: xtlen, nh: it_nh};

  // ---- the migration candidate y = bufrow[cand_t][cand_s]
  entry_t              y;
  logic [D-1:0][R-1:0] ry_all;
  logic [R-1:0]        ry;
  logic [D-1:0][R-1:0] hy;

  assign y  = bufrow[cand_t][cand_s];
  assign ry = ry_all[cand_t];

  for (genvar i = 0; i < D; i++) begin : g_hash
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) u_hx (.r(xr),      .f(xf),  .idx(hx[i]));
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) u_ry (.r(hx_q[i]), .f(y.f), .idx(ry_all[i]));
    hash_index #(.R(R), .F(F), .TABLE_ID(i)) u_hy (.r(ry),      .f(y.f), .idx(hy[i]));
  end

  // ---- bucket loads and free entries of the rows just read
  logic [D-1:0][LW-1:0] load;
  logic [D-1:0]         has_free;
  logic [D-1:0][CW-1:0] free_slot;

  always_comb begin
    for (int unsigned i = 0; i < D; i++) begin
      load[i]      = '0;
      has_free[i]  = 1'b0;
      free_slot[i] = '0;
      for (int unsigned e = 0; e < C; e++) begin
        if (tb_rrow[i][e][W-1]) load[i] = load[i] + 1'b1;
        else if (!has_free[i]) begin
          has_free[i]  = 1'b1;
          free_slot[i] = CW'(e);
        end
      end
    end
  end

  // least loaded table (leftmost on a tie)
  logic [DW-1:0] best_t;
  always_comb begin
    best_t = '0;
    for (int unsigned i = 1; i < D; i++)
      if (load[i] < load[best_t]) best_t = DW'(i);
  end

  // first other table with room for y
  logic          mig_ok;
  logic [DW-1:0] mig_t;
  always_comb begin
    mig_ok = 1'b0;
    mig_t  = '0;
    for (int unsigned j = 0; j < D; j++)
      if (DW'(j) != cand_t && has_free[j] && !mig_ok) begin
        mig_ok = 1'b1;
        mig_t  = DW'(j);
      end
  end

  logic last_cand;
  assign last_cand = (cand_t == DW'(D - 1)) && (cand_s == CW'(C - 1));

  // ---- memory port control
  always_comb begin
    tb_re      = '0;
    tb_we_mask = '0;
    tb_addr    = hx_q;
    tb_wrow    = '0;
    vt_clear   = 1'b0;
    vt_we      = 1'b0;
    vt_waddr   = vcount[VAW-1:0];
    vt_wvalue  = xkey_q;
    vt_wcare   = prefix_mask(x_q.len) | sel_mask;
    vt_wlen    = x_q.len;
    vt_wnh     = x_q.nh;
    ev_direct  = 1'b0;
    ev_migrate = 1'b0;
    ev_victim  = 1'b0;
    ev_crisis  = 1'b0;
    unique case (state)
      S_CLEAR: begin
        vt_clear = (clr_cnt == '0);
        for (int unsigned i = 0; i < D; i++) begin
          tb_addr[i]    = clr_cnt;
          tb_we_mask[i] = '1;
        end
      end
      S_IDLE: begin
        if (it_valid && !clear_req) begin
          tb_re   = '1;
          tb_addr = hx;
        end
      end
      S_PROBE: begin
        if (has_free[best_t]) begin
          ev_direct = 1'b1;
          tb_we_mask[best_t][free_slot[best_t]] = 1'b1;
          for (int unsigned e = 0; e < C; e++) tb_wrow[best_t][e] = W'(x_q);
        end
      end
      S_CK_ISSUE: begin
        for (int unsigned j = 0; j < D; j++)
          if (DW'(j) != cand_t) begin
            tb_re[j]   = 1'b1;
            tb_addr[j] = hy[j];
          end
      end
      S_CK_CHK: begin
        for (int unsigned j = 0; j < D; j++)
          if (DW'(j) != cand_t) tb_addr[j] = hy[j];
        if (mig_ok) begin
          ev_migrate = 1'b1;
          tb_we_mask[mig_t][free_slot[mig_t]] = 1'b1;
          tb_we_mask[cand_t][cand_s]          = 1'b1;
          for (int unsigned e = 0; e < C; e++) begin
            tb_wrow[mig_t][e]  = W'(y);
            tb_wrow[cand_t][e] = W'(x_q);
          end
        end else if (last_cand) begin
          if (vcount < (VAW+1)'(VDEPTH)) begin
            ev_victim = 1'b1;
            vt_we     = 1'b1;
          end else begin
            ev_crisis = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

  // ---- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      clr_cnt <= '0;
      x_q     <= '0;
      xkey_q  <= '0;
      hx_q    <= '0;
      cand_t  <= '0;
      cand_s  <= '0;
      vcount  <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          vcount  <= '0;
          clr_cnt <= clr_cnt + 1'b1;
          if (clr_cnt == '1) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clear_req) begin
            state <= S_CLEAR;
          end else if (it_valid) begin
            x_q    <= x_new;
            xkey_q <= it_key;
            hx_q   <= hx;
            state  <= S_PROBE;
          end
        end
        S_PROBE: begin
          for (int unsigned i = 0; i < D; i++)
            for (int unsigned e = 0; e < C; e++)
              bufrow[i][e] <= entry_t'(tb_rrow[i][e]);
          cand_t <= '0;
          cand_s <= '0;
          state  <= has_free[best_t] ? S_IDLE : S_CK_ISSUE;
        end
        S_CK_ISSUE: state <= S_CK_CHK;
        S_CK_CHK: begin
          if (mig_ok) begin
            state <= S_IDLE;
          end else if (last_cand) begin
            if (vcount < (VAW+1)'(VDEPTH)) vcount <= vcount + 1'b1;
            state <= S_IDLE;
          end else begin
            if (cand_s == CW'(C - 1)) begin
              cand_s <= '0;
              cand_t <= cand_t + 1'b1;
            end else begin
              cand_s <= cand_s + 1'b1;
            end
            state <= S_CK_ISSUE;
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  assign idle         = (state == S_IDLE);
  assign it_ready     = (state == S_IDLE) && !clear_req;
  assign victim_count = vcount;

endmodule
