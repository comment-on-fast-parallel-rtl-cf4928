// mod2n1_tpp_tree: parallel-prefix carry network of the modulo 2^n+1 adder.
//
// The result is R = m_{n..0} + (2^n + 1) * ~m_{n+1} (mod 2^{n+1}), so the low
// part needs the carries of m_{n-1..0} + cin with the end-around carry-in
// cin = ~m_{n+1} = ~(c_n | G_{n,1}). This block produces every such carry
// G*_{i,1} (carry into column i+1) without a second carry pass, using the
// corrected closed form
//   G*_{i,1} = G_{i,1} | P_{i,1} & s_0 & ~( (c_n|g_n, p_n) o (G_{n-1,i+1}, P_{n-1,i+1}) ).g
// with G*_0 = s_0 & cin. Two Kogge-Stone trees of clog2(N) levels run side by
// side: a prefix tree over columns 1..n-1 gives (G_{i,1}, P_{i,1}), and a
// suffix tree over columns n..1 (column n's operand being (c_n|g_n, p_n))
// gives the group generates of columns n..i+1. One last row of AND-OR gates
// merges them per column.
//
// Interface: s0, cn, g/p of columns 1..N from mod2n1_preproc. Outputs:
// gstar[i] = G*_{i,1} for i = 0..N-1, cin = ~m_{n+1}, g_lo = G_{n-1,1}.
// Timing: combinational, clog2(N) prefix levels plus the final row.
// The closed-form carry equation follows the published correction; the
// Kogge-Stone node placement is this design's own choice, since any
// log-depth prefix layout computes the same groups.
module mod2n1_tpp_tree
  import mod2n1_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         s0,
  input  logic         cn,
  input  logic [N:1]   g,
  input  logic [N:1]   p,
  output logic [N-1:0] gstar,
  output logic         cin,
  output logic         g_lo
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 1;

  // pre[k][i]: after k levels, group of columns i down to max(1, i-2^k+1).
  // suf[k][j]: after k levels, group of columns min(N, j+2^k-1) down to j.
  gp_t pre [L+1][N+1];
  gp_t suf [L+1][N+1];

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      pre[0][i] = GP_IDENTITY;
      suf[0][i] = GP_IDENTITY;
    end
    for (int i = 1; i <= N; i++) begin
      pre[0][i] = '{g: g[i], p: p[i]};
      suf[0][i] = '{g: g[i], p: p[i]};
    end
    // The most significant column also absorbs c_n, the carry of column n+1.
    suf[0][N].g = cn | g[N];

    for (int k = 0; k < L; k++) begin
      for (int i = 0; i <= N; i++) begin
        if (i >= 1 + (1 << k))
          pre[k+1][i] = gp_dot(pre[k][i], pre[k][i-(1<<k)]);
        else
          pre[k+1][i] = pre[k][i];
        if (i >= 1 && i + (1 << k) <= N)
          suf[k+1][i] = gp_dot(suf[k][i+(1<<k)], suf[k][i]);
        else
          suf[k+1][i] = suf[k][i];
      end
    end
  end

  always_comb begin
    // m_{n+1} = c_n | G_{n,1}; the end-around carry-in is its complement.
    cin      = ~suf[L][1].g;
    gstar[0] = s0 & cin;
    for (int i = 1; i < N; i++)
      gstar[i] = pre[L][i].g | (pre[L][i].p & s0 & ~suf[L][i+1].g);
    g_lo = pre[L][N-1].g;
  end

endmodule
