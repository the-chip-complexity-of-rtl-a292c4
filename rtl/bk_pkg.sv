// bk_pkg: shared types and the carry operator of the prefix adder.
//
// A bit position of an addition is described by a (g, p) pair: g = a & b
// (carry generate) and p = a ^ b (carry propagate).  The operator "o"
//   (g, p) o (g', p') = (g | (p & g'), p & p')
// is associative, so the block carry (G_i, P_i) = (g_i,p_i) o ... o (g_1,p_1)
// can be evaluated in any bracketing, and G_i is the carry out of bit i when
// the carry into bit 1 is 0.  The left operand is always the more
// significant one.  (0, 1) is the identity of "o": it neither generates
// nor kills a carry.
package bk_pkg;

  typedef struct packed {
    logic g;  // generate
    logic p;  // propagate
  } gp_t;

  localparam gp_t GP_IDENTITY = '{g: 1'b0, p: 1'b1};

  // hi o lo, hi being the more significant block
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
