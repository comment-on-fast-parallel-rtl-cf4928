// tb_mod2n1_adder: end-to-end, exhaustive test of the modulo 2^n+1 adder at
// its default size (N = 8, no parameter override).
// Every operand pair A, B in [0, 2^8] (257 x 257 pairs) is applied and R is
// compared with (A + B) mod 257. The adder is combinational, so R is sampled
// one time step after the inputs change and no clock latency is expected.
// Each mechanism of the design is counted and must occur at least once:
//   - M >= 2^(N+1): result M - 2^(N+1), end-around carry-in 0
//   - M <  2^(N+1): result M + 2^N + 1, end-around carry-in 1
//   - the carry-in ripples through every low column (R low bits all zero
//     after wrap-around, e.g. A + B = 2^N + 1)
//   - r_N = 1 (A + B = 2^N)
//   - an operand equal to 2^N (its bit N set)
//   - an operand pair on which the uncorrected rule r_N = ~c_N & P_N & s_0
//     disagrees with the true r_N (the corrected rule must still be right)
module tb_mod2n1_adder;
  import mod2n1_ref_pkg::*;

  localparam int N = 8;

  logic [N:0] a, b, r;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_nowrap = 0, n_full_ripple = 0, n_rn1 = 0, n_top_operand = 0;
  int n_old_rule_wrong = 0;
  logic clk = 1'b0;

  mod2n1_adder dut (.a(a), .b(b), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_seen(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-44s %0d", what, n);
  endtask

  initial begin
    for (int av = 0; av <= (1 << N); av++) begin
      for (int bv = 0; bv <= (1 << N); bv++) begin
        longint unsigned exp_r, m;
        bit all_prop, old_rule;
        a = (N+1)'(av);
        b = (N+1)'(bv);
        #1;
        exp_r = ref_mod(av, bv, N);
        checks++;
        if (r != exp_r[N:0]) begin
          failures++;
          if (failures < 20) $display("FAIL A=%0d B=%0d R=%0d expected %0d", av, bv, r, exp_r);
        end
        m = ref_m(av, bv, N);
        if (m[N+1]) n_wrap++; else n_nowrap++;
        if (m[N+1] && exp_r == 0) n_full_ripple++;
        if (exp_r[N]) n_rn1++;
        if (av[N] || bv[N]) n_top_operand++;
        all_prop = 1'b1;
        for (int i = 1; i <= N; i++)
          if (ref_s(av, bv, N, i) + ref_c(av, bv, N, i - 1) == 0) all_prop = 1'b0;
        old_rule = (ref_c(av, bv, N, N) == 0) && all_prop && (ref_s(av, bv, N, 0) == 1);
        if (old_rule != exp_r[N]) n_old_rule_wrong++;
      end
    end
    $display("mechanisms exercised:");
    count_seen(n_wrap,           "M >= 2^(N+1), subtract 2^(N+1)");
    count_seen(n_nowrap,         "M < 2^(N+1), add 2^N + 1 (carry-in 1)");
    count_seen(n_full_ripple,    "carry through all low columns");
    count_seen(n_rn1,            "r_N = 1");
    count_seen(n_top_operand,    "operand equal to 2^N");
    count_seen(n_old_rule_wrong, "uncorrected r_N rule would be wrong");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
