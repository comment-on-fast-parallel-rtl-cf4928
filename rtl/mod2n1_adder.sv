// mod2n1_adder: modulo 2^n+1 adder built on a totally parallel prefix tree.
//
// Computes R = (A + B) mod (2^n + 1) for operands A, B in [0, 2^n], each
// n+1 bits wide (bit n set only for the value 2^n). The sum is formed as
// M = A + B + 2^n - 1 in carry-save form (mod2n1_preproc). If M >= 2^{n+1}
// (m_{n+1} = 1) the result is M - 2^{n+1}, otherwise M + 2^n + 1, both
// taken modulo 2^{n+1}; the +1 enters as an end-around carry-in whose effect
// on every column is computed inside the prefix network (mod2n1_tpp_tree).
// The low sum bits come from mod2n1_sum and the top bit r_n from the
// corrected equation in mod2n1_msb.
//
// Interface: a, b in, r out, all N+1 bits; inputs above 2^N are outside the
// adder's domain and give unspecified results.
// Timing: purely combinational, about 6 + 2*log2(N) unit gate delays; no
// clock and no registers.
// The arithmetic and equations follow the corrected TPP adder published as a
// comment on Efstathiou, Vergos and Nikolos (IEEE Trans. Computers, 2004);
// N = 8 is the size used there. The module partitioning is this design's own.
module mod2n1_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] r
);

  logic [N:0]   s, c;
  logic [N:1]   g, p, h;
  logic [N-1:0] gstar;
  logic         cin, g_lo;

  mod2n1_preproc #(.N(N)) u_pre (
    .a(a), .b(b), .s(s), .c(c), .g(g), .p(p), .h(h)
  );

  mod2n1_tpp_tree #(.N(N)) u_tree (
    .s0(s[0]), .cn(c[N]), .g(g), .p(p),
    .gstar(gstar), .cin(cin), .g_lo(g_lo)
  );

  mod2n1_sum #(.N(N)) u_sum (
    .s0(s[0]), .h(h[N-1:1]), .cin(cin), .gstar(gstar[N-2:0]), .r(r[N-1:0])
  );

  mod2n1_msb u_msb (
    .an(a[N]), .bn(b[N]), .cnm1(c[N-1]),
    .g_lo(g_lo), .gstar_top(gstar[N-1]), .rn(r[N])
  );

endmodule
