// mod2n1_sum: low sum bits r_0 .. r_{n-1} of the modulo 2^n+1 adder.
//
// Column 0 of M holds s_0 alone and receives the end-around carry-in
// cin = ~m_{n+1}, so r_0 = s_0 ^ cin. Every other low column i adds its half
// sum h_i = s_i ^ c_{i-1} to the carry arriving from below:
//   r_i = h_i ^ G*_{i-1,1}     (1 <= i <= n-1)
// Interface: s0, h[N-1:1] from mod2n1_preproc; cin and gstar[N-2:0] from
// mod2n1_tpp_tree. Timing: one XOR level after the carries.
// The equations follow the published correction.
module mod2n1_sum #(
  parameter int unsigned N = 8
) (
  input  logic         s0,
  input  logic [N-1:1] h,
  input  logic         cin,
  input  logic [N-2:0] gstar,
  output logic [N-1:0] r
);

  always_comb begin
    r[0]     = s0 ^ cin;
    r[N-1:1] = h ^ gstar;
  end

endmodule
