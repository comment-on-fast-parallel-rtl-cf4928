// mod2n1_ref_pkg: arithmetic reference values for the modulo 2^n+1 adder
// testbenches. Everything here is computed with integer arithmetic on whole
// numbers (sums, shifts, remainders), never with the adder's gate equations,
// so the testbenches compare the logic against an independent model.
// Valid for n up to 32.
package mod2n1_ref_pkg;

  // (A + B) mod (2^n + 1)
  function automatic longint unsigned ref_mod(longint unsigned a, longint unsigned b, int n);
    return (a + b) % ((64'd1 << n) + 1);
  endfunction

  // M = A + B + 2^n - 1
  function automatic longint unsigned ref_m(longint unsigned a, longint unsigned b, int n);
    return a + b + (64'd1 << n) - 1;
  endfunction

  // Bit i of the carry-save pair: a_i + b_i + k_i = s_i + 2 c_i, where k is
  // the constant 2^n - 1 (k_i = 1 below bit n).
  function automatic int unsigned ref_s(longint unsigned a, longint unsigned b, int n, int i);
    int unsigned t = int'(a[i]) + int'(b[i]) + ((i < n) ? 1 : 0);
    return t % 2;
  endfunction

  function automatic int unsigned ref_c(longint unsigned a, longint unsigned b, int n, int i);
    int unsigned t = int'(a[i]) + int'(b[i]) + ((i < n) ? 1 : 0);
    return t / 2;
  endfunction

  // S and C as numbers (C unshifted: bit i of C has weight 2^(i+1) in M).
  function automatic longint unsigned ref_svec(longint unsigned a, longint unsigned b, int n);
    longint unsigned v = 0;
    for (int i = 0; i <= n; i++) v += longint'(ref_s(a, b, n, i)) << i;
    return v;
  endfunction

  function automatic longint unsigned ref_cvec(longint unsigned a, longint unsigned b, int n);
    longint unsigned v = 0;
    for (int i = 0; i <= n; i++) v += longint'(ref_c(a, b, n, i)) << i;
    return v;
  endfunction

  // End-around carry-in: 1 when M < 2^(n+1).
  function automatic bit ref_cin(longint unsigned a, longint unsigned b, int n);
    return (ref_m(a, b, n) >> (n + 1)) == 0;
  endfunction

  // Carry into column i+1 of the three-operand sum S + 2C + cin, restricted
  // to columns 0..i (i = 0..n-1). Column 0 holds s_0 and cin, column j >= 1
  // holds s_j and c_{j-1}.
  function automatic bit ref_gstar(longint unsigned a, longint unsigned b, int n, int i);
    longint unsigned sl = ref_svec(a, b, n) & ((64'd1 << (i + 1)) - 1);
    longint unsigned cl = ref_cvec(a, b, n) & ((64'd1 << i) - 1);
    return ((sl + 2 * cl + longint'(ref_cin(a, b, n))) >> (i + 1)) != 0;
  endfunction

  // Carry out of column n-1 when only S and 2C are summed (no carry-in).
  function automatic bit ref_glo(longint unsigned a, longint unsigned b, int n);
    longint unsigned sl = ref_svec(a, b, n) & ((64'd1 << n) - 1);
    longint unsigned cl = ref_cvec(a, b, n) & ((64'd1 << (n - 1)) - 1);
    return ((sl + 2 * cl) >> n) != 0;
  endfunction

  // Operand values that are in range: 0 .. 2^n.
  function automatic longint unsigned ref_rand_operand(int n);
    longint unsigned r = {$urandom, $urandom};
    return r % ((64'd1 << n) + 1);
  endfunction

endpackage
