// Layout of one key entry of a sub-table bucket. Expects the parameters
// F (folded hash bits), T_W (tag bits outside the hash bits), TLEN_W and NH_W
// to be visible where the macro is used.
//   valid : entry in use
//   f     : the F folded hash bits of the stored item (fully specified)
//   t     : the T_W bits of the prefix that do not take part in hashing,
//           in address order; bits past the prefix length are zero
//   len   : original prefix length, used to pick the longest match
//   tlen  : how many of the t bits (from the left) lie inside the prefix
//   nh    : next-hop identifier returned by a lookup
// The R index bits are not stored: they follow from the bucket address and f.
`ifndef MHT_ENTRY_SVH
`define MHT_ENTRY_SVH
`define MHT_ENTRY_T \
  typedef struct packed { \
    logic                     valid; \
    logic [F-1:0]             f; \
    logic [T_W-1:0]           t; \
    logic [mht_pkg::LEN_W-1:0] len; \
    logic [TLEN_W-1:0]        tlen; \
    logic [NH_W-1:0]          nh; \
  } entry_t;
`endif
