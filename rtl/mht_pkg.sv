// mht_pkg: constants and helpers shared by the multi-hash IP lookup engine.
// Addresses are IPv4 (32 bits). Bit 31 is the first (leftmost) bit of an
// address, so a prefix of length L occupies bits 31 down to 32-L.
// Prefix lengths 0..32 need 6 bits. Everything else (table geometry, entry
// layout) is a parameter of the modules that use it.
package mht_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned LEN_W  = 6;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  plen_t;

  // Care mask of a prefix of length len: ones on its len leftmost bits.
  function automatic addr_t prefix_mask(input plen_t len);
    addr_t all_ones;
    all_ones = '1;
    if (len >= plen_t'(ADDR_W)) return all_ones;
    return ~(all_ones >> len);
  endfunction

endpackage
