// mod2n1_preproc: carry-save front end of the modulo 2^n+1 adder.
//
// The adder first forms M = A + B + (2^n - 1) with one row of full/half
// adders, so that M = S + 2C:
//   bits 0..n-1 : a_i + b_i + 1  ->  s_i = ~(a_i ^ b_i),  c_i = a_i | b_i
//   bit  n      : a_n + b_n      ->  s_n =   a_n ^ b_n ,  c_n = a_n & b_n
// Column i (1..n) of S + 2C holds s_i and c_{i-1}; column 0 holds s_0 alone
// and column n+1 holds c_n alone. For columns 1..n the block also gives the
// prefix inputs g_i = s_i & c_{i-1}, p_i = s_i | c_{i-1} and the half sum
// h_i = s_i ^ c_{i-1}.
//
// Interface: a, b are (N+1)-bit operands in [0, 2^N] (a_N set only for 2^N).
// Timing: combinational, two unit gate delays to g/p/h.
// The equations are those of the corrected 2^n+1 TPP adder; port naming and
// the split into blocks are this design's own.
module mod2n1_preproc #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s,
  output logic [N:0] c,
  output logic [N:1] g,
  output logic [N:1] p,
  output logic [N:1] h
);

  always_comb begin
    s[N-1:0] = ~(a[N-1:0] ^ b[N-1:0]);
    c[N-1:0] = a[N-1:0] | b[N-1:0];
    s[N]     = a[N] ^ b[N];
    c[N]     = a[N] & b[N];
  end

  always_comb begin
    g = s[N:1] & c[N-1:0];
    p = s[N:1] | c[N-1:0];
    h = s[N:1] ^ c[N-1:0];
  end

endmodule
