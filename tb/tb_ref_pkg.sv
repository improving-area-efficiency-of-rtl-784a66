// tb_ref_pkg: reference arithmetic for the testbenches, written apart from
// the design's own package so the checks do not reuse the design's helpers.
// Provides the two residue code maps the tests use (binary, and an affine
// permutation code(r) = (5r + 3) mod 2^W), the reference modulo operations
// and the simple-scheme bit choice (most balanced code bit, lowest on a tie).
package tb_ref_pkg;

  function automatic int unsigned width_of(int unsigned m);
    int unsigned w;
    w = 0;
    while ((1 << w) < m) w++;
    return w;
  endfunction

  // Code of residue r for modulus m; perm = 0 is binary.
  function automatic int unsigned code_of(int unsigned m, bit perm, int unsigned r);
    int unsigned w;
    w = width_of(m);
    return perm ? ((5 * r + 3) % (1 << w)) : r;
  endfunction

  // op: 0 add, 1 multiply, 2 multiply-accumulate, 3 subtract
  function automatic int unsigned ref_op(int unsigned op, int unsigned m,
                                         int unsigned a, int unsigned b,
                                         int unsigned c);
    if (op == 3) return int'((longint'(a) - longint'(b) + 10 * m) % m);
    if (op == 0) return (a + b) % m;
    if (op == 1) return (a * b) % m;
    return (a * b + c) % m;
  endfunction

  function automatic int unsigned ref_sel_bit(int unsigned m, bit perm);
    int unsigned w, best, best_bal;
    w = width_of(m);
    best = 0;
    best_bal = 1000;
    for (int unsigned i = 0; i < w; i++) begin
      int ones, zeros, bal;
      ones = 0;
      for (int unsigned r = 0; r < m; r++) ones += (code_of(m, perm, r) >> i) & 1;
      zeros = int'(m) - ones;
      bal = (ones > zeros) ? ones - zeros : zeros - ones;
      if (bal < int'(best_bal)) begin
        best_bal = bal;
        best = i;
      end
    end
    return best;
  endfunction

endpackage
