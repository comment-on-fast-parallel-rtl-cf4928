// mod2n1_pkg: types and the prefix operator shared by the modulo 2^n+1 adder.
//
// A prefix operand is a (generate, propagate) pair. The fundamental carry
// operator "o" combines a more significant group (hi) with the adjacent less
// significant group (lo):
//   (G, P) = (g_hi | p_hi & g_lo, p_hi & p_lo)
// Propagate is the inclusive OR form (p = s | c), as used throughout the
// adder; the exclusive half sums are kept separately for the sum bits.
// Purely combinational; nothing here has timing of its own.
package mod2n1_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Identity element of the prefix operator: (0, 1).
  localparam gp_t GP_IDENTITY = '{g: 1'b0, p: 1'b1};

  function automatic gp_t gp_dot(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
