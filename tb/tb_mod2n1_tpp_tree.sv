// tb_mod2n1_tpp_tree: exhaustive check of the prefix carry network for N = 8.
// For every operand pair in [0, 2^N] the testbench derives the tree's
// inputs (s_0, c_N, g_i, p_i) from column sums, then compares the tree's
// outputs with carries found by plain addition: cin = 1 when
// A + B + 2^N - 1 < 2^(N+1), G*_i = carry into column i+1 of
// (M mod 2^N) + cin, and G_{N-1,1} = carry out of column N-1 of S + 2C.
// It also counts how often the end-around carry-in is 1 and 0, and fails if
// either case never occurs.
module tb_mod2n1_tpp_tree;
  import mod2n1_ref_pkg::*;

  localparam int N = 8;

  logic         s0, cn, cin, g_lo;
  logic [N:1]   g, p;
  logic [N-1:0] gstar;
  int checks = 0, failures = 0;
  int n_cin1 = 0, n_cin0 = 0;
  logic clk = 1'b0;

  mod2n1_tpp_tree dut (
    .s0(s0), .cn(cn), .g(g), .p(p), .gstar(gstar), .cin(cin), .g_lo(g_lo)
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
        s0 = ref_s(av, bv, N, 0)[0];
        cn = ref_c(av, bv, N, N)[0];
        for (int i = 1; i <= N; i++) begin
          automatic int t = int'(ref_s(av, bv, N, i)) + int'(ref_c(av, bv, N, i - 1));
          g[i] = (t == 2);
          p[i] = (t >= 1);
        end
        #1;
        check(cin == ref_cin(av, bv, N), "cin", av, bv);
        if (cin) n_cin1++; else n_cin0++;
        check(g_lo == ref_glo(av, bv, N), "G_{n-1,1}", av, bv);
        for (int i = 0; i < N; i++)
          check(gstar[i] == ref_gstar(av, bv, N, i), $sformatf("G*[%0d]", i), av, bv);
      end
    end
    check(n_cin1 > 0, "carry-in 1 never seen", 0, 0);
    check(n_cin0 > 0, "carry-in 0 never seen", 0, 0);
    $display("end-around carry-in: 1 in %0d cases, 0 in %0d cases", n_cin1, n_cin0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
