// tb_mod2n1_sum: exhaustive check of the low sum bits for N = 8.
// For every operand pair in [0, 2^N] the block gets s_0, the half sums
// h_i = (s_i + c_{i-1}) mod 2, the end-around carry-in and the carries G*_i,
// all found by integer addition, and r[N-1:0] must equal the low N bits of
// (A + B) mod (2^N + 1).
module tb_mod2n1_sum;
  import mod2n1_ref_pkg::*;

  localparam int N = 8;

  logic         s0, cin;
  logic [N-1:1] h;
  logic [N-2:0] gstar;
  logic [N-1:0] r;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mod2n1_sum dut (.s0(s0), .h(h), .cin(cin), .gstar(gstar), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av <= (1 << N); av++) begin
      for (int bv = 0; bv <= (1 << N); bv++) begin
        longint unsigned exp_r;
        s0  = ref_s(av, bv, N, 0)[0];
        cin = ref_cin(av, bv, N);
        for (int i = 1; i < N; i++)
          h[i] = ((ref_s(av, bv, N, i) + ref_c(av, bv, N, i - 1)) % 2) == 1;
        for (int i = 0; i < N - 1; i++)
          gstar[i] = ref_gstar(av, bv, N, i);
        #1;
        exp_r = ref_mod(av, bv, N);
        checks++;
        if (r != exp_r[N-1:0]) begin
          failures++;
          if (failures < 20) $display("FAIL A=%0d B=%0d r=%0h expected %0h", av, bv, r, exp_r[N-1:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
