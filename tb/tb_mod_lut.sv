// tb_mod_lut: self-checking test of the modulo look-up table.
// Every modulus of the design's set plus modulus 3 (the worked example),
// every operation (add, multiply, multiply-accumulate; subtraction with the
// full table only), every row-storage
// scheme (full, elaborate-reduced, bit-reduced) and two residue codes
// (binary and a permuted code) are checked exhaustively by tb_lut_check.
// Also checks the truth-table row counts of the modulus-3 multiply example:
// 9 rows full, 6 with the elaborate scheme, 7 with the one-bit scheme, and
// the general row counts for every modulus under binary code.
module tb_mod_lut;
  localparam int NM = 6;
  localparam int unsigned MODS [NM] = '{3, 5, 7, 9, 11, 13};
  localparam int NCFG = NM * 3 * 3 * 2;

  int   chk [NCFG];
  int   fail[NCFG];
  int   rows[NCFG];
  logic done[NCFG];

  for (genvar mi = 0; mi < NM; mi++) begin : g_m
    for (genvar op = 0; op < 3; op++) begin : g_op
      for (genvar sym = 0; sym < 3; sym++) begin : g_sym
        for (genvar p = 0; p < 2; p++) begin : g_p
          localparam int IDX = ((mi * 3 + op) * 3 + sym) * 2 + p;
          tb_lut_check #(.M(MODS[mi]), .OP(op), .SYM(sym), .PERM(p)) u_chk (
            .checks(chk[IDX]), .failures(fail[IDX]), .rows(rows[IDX]), .done(done[IDX])
          );
        end
      end
    end
  end

  // Subtraction tables (full table only), one per modulus.
  int   chk_s [NM];
  int   fail_s[NM];
  int   rows_s[NM];
  logic done_s[NM];

  for (genvar mi = 0; mi < NM; mi++) begin : g_sub
    tb_lut_check #(.M(MODS[mi]), .OP(3), .SYM(0), .PERM(mi % 2)) u_chk (
      .checks(chk_s[mi]), .failures(fail_s[mi]), .rows(rows_s[mi]), .done(done_s[mi])
    );
  end

  int checks, failures;

  function automatic int idx(int mi, int op, int sym, int p);
    return ((mi * 3 + op) * 3 + sym) * 2 + p;
  endfunction

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    checks = 0;
    failures = 0;
    do begin
      #10;
      all_done = 1'b1;
      for (int i = 0; i < NCFG; i++) if (done[i] !== 1'b1) all_done = 1'b0;
      for (int i = 0; i < NM; i++) if (done_s[i] !== 1'b1) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < NM; i++) begin
      checks += chk_s[i];
      failures += fail_s[i];
    end
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    // Row counts of the modulus-3 multiplication truth table (binary code).
    checks += 3;
    if (rows[idx(0, 1, 0, 0)] != 9) failures++;
    if (rows[idx(0, 1, 1, 0)] != 6) failures++;
    if (rows[idx(0, 1, 2, 0)] != 7) failures++;
    $display("mod-3 multiply rows: full %0d, elaborate %0d, one-bit %0d",
             rows[idx(0, 1, 0, 0)], rows[idx(0, 1, 1, 0)], rows[idx(0, 1, 2, 0)]);
    // Stored (a, b) rows per modulus under binary code, for reference; the
    // multiply-accumulate table has M times as many (one per c).
    // Odd modulus, binary code: full m*m, elaborate m(m+1)/2, one-bit
    // m*m - (m-1)/2 * (m+1)/2 (the LSB splits the codes most evenly).
    for (int mi = 0; mi < NM; mi++) begin
      int m;
      m = int'(MODS[mi]);
      checks += 3;
      if (rows[idx(mi, 1, 0, 0)] != m * m) failures++;
      if (rows[idx(mi, 1, 1, 0)] != m * (m + 1) / 2) failures++;
      if (rows[idx(mi, 1, 2, 0)] != m * m - (m - 1) / 2 * (m + 1) / 2) failures++;
    end
    $display("modulus  full  elaborate  one-bit");
    for (int mi = 0; mi < NM; mi++)
      $display("%7d %5d %10d %8d", MODS[mi], rows[idx(mi, 1, 0, 0)],
               rows[idx(mi, 1, 1, 0)], rows[idx(mi, 1, 2, 0)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
