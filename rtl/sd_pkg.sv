// sd_pkg: types and helper functions shared by the sign-detection networks.
//
// The networks decide the sign of x + y for two's-complement fractions
// x = x0.x1...xn and y = y0.y1...yn.  Bit x1 is the most significant fraction
// bit; in the RTL a fraction is held in a descending vector frac[N-1:0], so the
// fraction bit x_i sits at frac[N-i].  The fraction is cut into k-bit groups
// ("bytes"); group 1 is the most significant one and holds frac[N-1 -: K].
//
// Everything here is combinational helper code: a pair type for the group
// propagate / generate signals, the carry-lookahead combine of two pairs, and
// the size arithmetic of a k-ary reduction tree.
package sd_pkg;

  // Group propagate / generate pair (P, G) of the tree networks.
  typedef struct packed {
    logic p;
    logic g;
  } pg_pair_t;

  // Number of k-input modules on each level: ceil(m / k).
  function automatic int unsigned ceil_div(input int unsigned m, input int unsigned k);
    return (m + k - 1) / k;
  endfunction

  // Number of levels a k-ary tree needs to reduce m pairs to one.
  function automatic int unsigned tree_levels(input int unsigned m, input int unsigned k);
    int unsigned cnt;
    int unsigned lv;
    cnt = m;
    lv  = 0;
    while (cnt > 1) begin
      cnt = ceil_div(cnt, k);
      lv++;
    end
    return lv;
  endfunction

  // Number of pairs present at the input of level lv (level 0 = leaves).
  function automatic int unsigned level_width(input int unsigned m, input int unsigned k,
                                              input int unsigned lv);
    int unsigned cnt;
    cnt = m;
    for (int unsigned i = 0; i < lv; i++) cnt = ceil_div(cnt, k);
    return cnt;
  endfunction

endpackage
