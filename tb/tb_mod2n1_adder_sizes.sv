// tb_mod2n1_adder_sizes: the modulo 2^n+1 adder at other widths.
//   N = 4  : the counter-example 12 + 12 = 24 = 7 (mod 17), where the
//            uncorrected top-bit rule gives r_4 = 1; then all 17 x 17 pairs.
//   N = 5  : a width that is not a power of two, all 33 x 33 pairs.
//   N = 2  : the smallest width, all 5 x 5 pairs.
//   N = 16 : 100000 random in-range pairs plus the corner pairs.
//   N = 32 : 100000 random in-range pairs plus the corner pairs.
// Results are compared with (A + B) mod (2^N + 1) computed in 64-bit integers.
module tb_mod2n1_adder_sizes;
  import mod2n1_ref_pkg::*;

  logic [2:0]  a2, b2, r2;
  logic [4:0]  a4, b4, r4;
  logic [5:0]  a5, b5, r5;
  logic [16:0] a16, b16, r16;
  logic [32:0] a32, b32, r32;
  int checks = 0, failures = 0;
  localparam longint unsigned C16 [4] = '{0, 1, 65535, 65536};
  localparam longint unsigned C32 [4] = '{0, 1, 64'hFFFF_FFFF, 64'h1_0000_0000};
  logic clk = 1'b0;

  mod2n1_adder #(.N(2))  u2  (.a(a2),  .b(b2),  .r(r2));
  mod2n1_adder #(.N(4))  u4  (.a(a4),  .b(b4),  .r(r4));
  mod2n1_adder #(.N(5))  u5  (.a(a5),  .b(b5),  .r(r5));
  mod2n1_adder #(.N(16)) u16 (.a(a16), .b(b16), .r(r16));
  mod2n1_adder #(.N(32)) u32 (.a(a32), .b(b32), .r(r32));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint unsigned got, longint unsigned av, longint unsigned bv, int n);
    longint unsigned exp_r = ref_mod(av, bv, n);
    checks++;
    if (got != exp_r) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d A=%0d B=%0d R=%0d expected %0d", n, av, bv, got, exp_r);
    end
  endtask

  task automatic apply(longint unsigned av, longint unsigned bv);
    a16 = 17'(av % ((64'd1 << 16) + 1));
    b16 = 17'(bv % ((64'd1 << 16) + 1));
    a32 = 33'(av % ((64'd1 << 32) + 1));
    b32 = 33'(bv % ((64'd1 << 32) + 1));
    #1;
    check(64'(r16), 64'(a16), 64'(b16), 16);
    check(64'(r32), 64'(a32), 64'(b32), 32);
  endtask

  initial begin
    // Counter-example for the uncorrected top-bit rule.
    a4 = 5'd12; b4 = 5'd12;
    #1;
    check(64'(r4), 12, 12, 4);
    checks++;
    if (r4 != 5'd7 || r4[4] != 1'b0) begin
      failures++;
      $display("FAIL counter-example 12 + 12 mod 17 gave %0d", r4);
    end

    for (int av = 0; av <= 16; av++)
      for (int bv = 0; bv <= 16; bv++) begin
        a4 = 5'(av); b4 = 5'(bv); #1; check(64'(r4), av, bv, 4);
      end
    for (int av = 0; av <= 32; av++)
      for (int bv = 0; bv <= 32; bv++) begin
        a5 = 6'(av); b5 = 6'(bv); #1; check(64'(r5), av, bv, 5);
      end
    for (int av = 0; av <= 4; av++)
      for (int bv = 0; bv <= 4; bv++) begin
        a2 = 3'(av); b2 = 3'(bv); #1; check(64'(r2), av, bv, 2);
      end

    // Corners for the wide instances: 0, 1, 2^n - 1, 2^n and their mixes.
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a16 = 17'(C16[i]); b16 = 17'(C16[j]);
        a32 = 33'(C32[i]); b32 = 33'(C32[j]);
        #1;
        check(64'(r16), C16[i], C16[j], 16);
        check(64'(r32), C32[i], C32[j], 32);
      end
    for (int k = 0; k < 100000; k++)
      apply(ref_rand_operand(32), ref_rand_operand(32));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
