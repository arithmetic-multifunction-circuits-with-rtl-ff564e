// arith_pkg: types and the prefix operator shared by the recursive arithmetic trees.
//
// mf_ctrl_t bundles the four mode inputs of the multifunction tree (Add, F, Inv, C/L).
// gp_t is one (generate, not-propagate) pair. The carry trees keep the complement of the
// propagate signal, because the propagate of one bit is A^B and its complement XNOR(A,B) is
// what the foundation block produces; with that signal the prefix operator becomes a
// 2:1 multiplexer plus an OR gate:
//   (g, np) = (ga, npa) D' (gb, npb):  g = npa ? ga : gb ;  np = npa | npb
// where (ga, npa) is the more significant group. This operator is the document's; the
// packaging as a function is this design's choice.
package arith_pkg;

  typedef struct packed {
    logic add;  // 1: addition (uses generate / not-propagate)
    logic f;    // flip: trailing instead of leading digit
    logic inv;  // invert all inputs
    logic cl;   // 1: comparator (XOR foundation), 0: lead-digit detector
  } mf_ctrl_t;

  typedef struct packed {
    logic g;   // group generate
    logic np;  // group not-propagate
  } gp_t;

  // Delta' prefix operator; a is the more significant group.
  function automatic gp_t delta_p(gp_t a, gp_t b);
    gp_t r;
    r.g  = a.np ? a.g : b.g;
    r.np = a.np | b.np;
    return r;
  endfunction

endpackage
