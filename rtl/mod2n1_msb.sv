// mod2n1_msb: corrected most significant sum bit r_n of the modulo 2^n+1 adder.
//
// Arithmetically r_n is the parity of s_n + c_{n-1} + ~m_{n+1} + G*_{n-1,1}.
// Folding m_{n+1} = c_n | G_{n,1} into the first three terms gives
//   r_n = (c_n | s_n & c_{n-1} | (s_n | c_{n-1}) & ~G_{n-1,1}) ^ ~G*_{n-1,1}
// and the left term is rewritten as one extra prefix node fed straight from
// the operand bits:
//   gamma = ~(a_n | b_n | c_{n-1})
//   pi    = ~(a_n & b_n | (a_n | b_n) & c_{n-1})
//   r_n   = ~((gamma, pi) o (G_{n-1,1}, P_{n-1,1})).g ^ ~G*_{n-1,1}
// gamma and pi are ready after 2 and 3 gate delays, before the prefix tree
// output, so r_n does not lengthen the adder's critical path.
//
// Interface: a_n, b_n, c_{n-1} (= a_{n-1} | b_{n-1}), G_{n-1,1} and
// G*_{n-1,1} from the carry tree. Only the generate half of the final node is
// needed, so P_{n-1,1} is not an input. Timing: combinational.
// The equations follow the published correction; the block boundary is this
// design's own.
module mod2n1_msb (
  input  logic an,
  input  logic bn,
  input  logic cnm1,
  input  logic g_lo,
  input  logic gstar_top,
  output logic rn
);

  logic gamma, pi_n;
  logic node_g;

  always_comb begin
    gamma = ~(an | bn | cnm1);
    pi_n  = ~((an & bn) | ((an | bn) & cnm1));
    // Generate half of the prefix node (gamma, pi) o (G_{n-1,1}, P_{n-1,1}).
    node_g = gamma | (pi_n & g_lo);
    rn     = ~node_g ^ ~gstar_top;
  end

endmodule
