// pbs_pkg -- shared constants, geometry functions and types of the
// Physical Broadcast Structure (PBS) and of the TBH test chip.
//
// A PBS broadcast domain H_h is a dual tree of height h with branching ratio
// alpha.  The link between tree level l and level l+1 (l = 0 is the PN row)
// is called link l here.  The fat-tree rule of the design is that a link's
// width doubles (multiplexing ratio r_m = 2) at each level from the first fat
// link upwards, while its flit time (the wire delay, in clock cycles) grows by
// the same factor, so every level carries the same number of bits per cycle.
// Links below the first fat link are "non-fat": bottom-level width, one cycle
// per flit.  The functions below give that geometry so that the tree modules
// and the testbenches compute it the same way.
package pbs_pkg;

  // Integer power.
  function automatic int unsigned ipow(input int unsigned b, input int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned k = 0; k < e; k++) r = r * b;
    return r;
  endfunction

  // Width in bits of link l (the link from level l up to level l+1, or the
  // same link in the broadcast tree).  fat_from is the index of the lowest
  // fat link.
  function automatic int unsigned link_width(input int unsigned l,
                                             input int unsigned base_w,
                                             input int unsigned rm,
                                             input int unsigned fat_from);
    if (l < fat_from) return base_w;
    return base_w * ipow(rm, l - fat_from + 1);
  endfunction

  // Flit time of link l in clock cycles (one cycle per bottom-level flit).
  function automatic int unsigned link_cycles(input int unsigned l,
                                              input int unsigned base_w,
                                              input int unsigned rm,
                                              input int unsigned fat_from);
    return link_width(l, base_w, rm, fat_from) / base_w;
  endfunction

  // Number of SNs on level i (1..h) of one tree of an H_h domain.
  function automatic int unsigned sns_on_level(input int unsigned i,
                                               input int unsigned alpha,
                                               input int unsigned h);
    return ipow(alpha, h - i);
  endfunction

  // Index of the first link-l channel in a flat array holding the channels
  // of all levels: links of level 0 first (alpha^h of them), then level 1...
  function automatic int unsigned link_base(input int unsigned l,
                                            input int unsigned alpha,
                                            input int unsigned h);
    int unsigned s;
    s = 0;
    for (int unsigned k = 0; k < l; k++) s = s + ipow(alpha, h - k);
    return s;
  endfunction

  // Total number of channels on links 0..h-1 of one tree.
  function automatic int unsigned link_total(input int unsigned alpha,
                                             input int unsigned h);
    return link_base(h, alpha, h);
  endfunction

  // Smallest number of bits that can hold values 0..n-1 (at least 1).
  function automatic int unsigned clog2_min1(input int unsigned n);
    int unsigned r;
    r = 0;
    while ((1 << r) < n) r++;
    return (r == 0) ? 1 : r;
  endfunction

  // ------------------------------------------------------------------
  // TBH test chip
  // ------------------------------------------------------------------
  localparam int unsigned TBH_PNS      = 8;  // transmit PNs and receive PNs
  localparam int unsigned TBH_MSG_BITS = 7;  // 3 address bits + 4 value bits
  localparam int unsigned TBH_SWITCHES = 7;  // concentrate tree switches 0..6

  // A TBH message as loaded into a transmit PN: the receive PN address in
  // the low three bits, sent first, and the value in the high four bits.
  typedef struct packed {
    logic [3:0] value;
    logic [2:0] addr;
  } tbh_msg_t;

endpackage
