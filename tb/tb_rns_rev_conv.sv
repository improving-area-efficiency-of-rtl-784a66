// tb_rns_rev_conv: self-checking test of the residue-to-binary converter.
// Every integer y of the signed range -22522 .. 22522 is split into its
// residues by the testbench, coded (binary and permuted code maps) and
// applied; the converter must return y.
module tb_rns_rev_conv;
  import rns_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned MODS [5] = '{5, 7, 9, 11, 13};

  function automatic code_set_t make_codes(bit perm);
    code_set_t cs;
    for (int i = 0; i < 5; i++) begin
      cs[i] = '0;
      for (int unsigned r = 0; r < MODS[i]; r++) cs[i][r] = RES_W'(code_of(MODS[i], perm, r));
    end
    return cs;
  endfunction

  logic [NUM_MOD-1:0][RES_W-1:0] r_bin, r_perm;
  logic signed [15:0] y_bin, y_perm;

  rns_rev_conv dut_bin (.res(r_bin), .y(y_bin));
  rns_rev_conv #(.CODES(make_codes(1'b1))) dut_perm (.res(r_perm), .y(y_perm));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = -22522; v <= 22522; v++) begin
      for (int i = 0; i < 5; i++) begin
        int m, rr;
        m = int'(MODS[i]);
        rr = ((v % m) + m) % m;
        r_bin[i]  = RES_W'(code_of(MODS[i], 0, rr));
        r_perm[i] = RES_W'(code_of(MODS[i], 1, rr));
      end
      #1;
      checks += 2;
      if (int'(y_bin) != v) begin
        failures++;
        if (failures < 5) $display("y=%0d: got %0d", v, y_bin);
      end
      if (int'(y_perm) != v) begin
        failures++;
        if (failures < 5) $display("y=%0d perm: got %0d", v, y_perm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
