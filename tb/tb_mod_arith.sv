// tb_mod_arith: self-checking test of the redundancy-detection based modulo
// unit (detector + multiplexers + reduced table). Every modulus of the set
// (5, 7, 9, 11, 13), every operation, every scheme and two code maps are
// checked exhaustively through tb_arith_check; the reduced schemes must have
// swapped operands at least once in every configuration.
module tb_mod_arith;
  localparam int NM = 5;
  localparam int unsigned MODS [NM] = '{5, 7, 9, 11, 13};
  localparam int NCFG = NM * 3 * 3 * 2;

  int   chk  [NCFG];
  int   fail [NCFG];
  int   swp  [NCFG];
  logic done [NCFG];

  for (genvar mi = 0; mi < NM; mi++) begin : g_m
    for (genvar op = 0; op < 3; op++) begin : g_op
      for (genvar sym = 0; sym < 3; sym++) begin : g_sym
        for (genvar p = 0; p < 2; p++) begin : g_p
          localparam int IDX = ((mi * 3 + op) * 3 + sym) * 2 + p;
          tb_arith_check #(.M(MODS[mi]), .OP(op), .SYM(sym), .PERM(p)) u_chk (
            .checks(chk[IDX]), .failures(fail[IDX]), .swaps(swp[IDX]), .done(done[IDX])
          );
        end
      end
    end
  end

  int checks, failures;

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
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i] + 1;
      failures += fail[i];
      // sym index is (i / 2) % 3: reduced schemes must swap, none must not
      if (((i / 2) % 3) != 0 ? (swp[i] == 0) : (swp[i] != 0)) begin
        failures++;
        $display("configuration %0d: %0d swaps", i, swp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
