// tb_mod2n1_preproc: exhaustive check of the carry-save front end for N = 8.
// For every operand pair in [0, 2^N] it checks, column by column, that
// s_i + 2 c_i equals a_i + b_i + k_i (k = 2^N - 1), that S + 2C equals
// A + B + 2^N - 1 as a number, and that g, p, h are the carry, "any one" and
// parity of the two bits s_i, c_{i-1} that meet in column i.
module tb_mod2n1_preproc;
  import mod2n1_ref_pkg::*;

  localparam int N = 8;

  logic [N:0] a, b, s, c;
  logic [N:1] g, p, h;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mod2n1_preproc dut (.a(a), .b(b), .s(s), .c(c), .g(g), .p(p), .h(h));

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
        longint unsigned sv, cv;
        a = (N+1)'(av);
        b = (N+1)'(bv);
        #1;
        for (int i = 0; i <= N; i++) begin
          check(s[i] == ref_s(av, bv, N, i)[0], $sformatf("s[%0d]", i), av, bv);
          check(c[i] == ref_c(av, bv, N, i)[0], $sformatf("c[%0d]", i), av, bv);
        end
        sv = longint'(s);
        cv = longint'(c);
        check(sv + 2 * cv == ref_m(av, bv, N), "S+2C", av, bv);
        for (int i = 1; i <= N; i++) begin
          automatic int t = int'(s[i]) + int'(c[i-1]);
          check(g[i] == (t == 2), $sformatf("g[%0d]", i), av, bv);
          check(p[i] == (t >= 1), $sformatf("p[%0d]", i), av, bv);
          check(h[i] == (t % 2 == 1), $sformatf("h[%0d]", i), av, bv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
