// tb_mod2n1_msb: exhaustive check of the corrected top sum bit for N = 8.
// For every operand pair in [0, 2^N] the block is fed a_N, b_N,
// c_{N-1} = (a_{N-1} + b_{N-1} + 1) / 2 and the two carries G_{N-1,1} and
// G*_{N-1,1}, all obtained by integer addition, and r_N must equal bit N of
// (A + B) mod (2^N + 1). It also counts the operand pairs on which the
// earlier, uncorrected rule r_N = ~c_N & P_N & s_0 would be wrong, and the
// pairs with r_N = 1, and fails if either never occurs.
module tb_mod2n1_msb;
  import mod2n1_ref_pkg::*;

  localparam int N = 8;

  logic an, bn, cnm1, g_lo, gstar_top, rn;
  int checks = 0, failures = 0;
  int n_old_rule_wrong = 0, n_rn1 = 0, pairs = 0;
  logic clk = 1'b0;

  mod2n1_msb dut (
    .an(an), .bn(bn), .cnm1(cnm1), .g_lo(g_lo), .gstar_top(gstar_top), .rn(rn)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, int av, int bv);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s A=%0d B=%0d", what, av, bv);
    end
  endtask

  initial begin
    for (int av = 0; av <= (1 << N); av++) begin
      for (int bv = 0; bv <= (1 << N); bv++) begin
        longint unsigned r;
        bit old_rule, all_prop;
        an        = av[N];
        bn        = bv[N];
        cnm1      = ref_c(av, bv, N, N - 1)[0];
        g_lo      = ref_glo(av, bv, N);
        gstar_top = ref_gstar(av, bv, N, N - 1);
        #1;
        r = ref_mod(av, bv, N);
        check(rn == r[N], "r_n", av, bv);
        pairs++;
        if (r[N]) n_rn1++;
        // Uncorrected rule: every column 1..N propagates, s_0 = 1, c_N = 0.
        all_prop = 1'b1;
        for (int i = 1; i <= N; i++)
          if (ref_s(av, bv, N, i) + ref_c(av, bv, N, i - 1) == 0) all_prop = 1'b0;
        old_rule = (ref_c(av, bv, N, N) == 0) && all_prop && (ref_s(av, bv, N, 0) == 1);
        if (old_rule != r[N]) n_old_rule_wrong++;
      end
    end
    check(n_rn1 > 0, "r_n = 1 never seen", 0, 0);
    check(n_old_rule_wrong > 0, "no pair separates the corrected rule from the old one", 0, 0);
    $display("r_n = 1 on %0d of %0d pairs; uncorrected rule wrong on %0d pairs",
             n_rn1, pairs, n_old_rule_wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
