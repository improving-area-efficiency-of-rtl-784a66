// tb_rns_fwd_conv: self-checking test of the binary-to-residue converter.
// Every 16-bit input is applied to a converter with binary codes and to one
// with permuted codes; each residue must equal the mathematical residue
// ((x mod m) + m) mod m, coded by the reference code map.
module tb_rns_fwd_conv;
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

  logic signed [15:0] x;
  logic [NUM_MOD-1:0][RES_W-1:0] r_bin, r_perm;

  rns_fwd_conv dut_bin (.x(x), .res(r_bin));
  rns_fwd_conv #(.CODES(make_codes(1'b1))) dut_perm (.x(x), .res(r_perm));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      x = 16'(v);
      #1;
      for (int i = 0; i < 5; i++) begin
        int m, rr;
        m = int'(MODS[i]);
        rr = ((v % m) + m) % m;
        checks += 2;
        if (int'(r_bin[i]) != int'(code_of(MODS[i], 0, rr))) begin
          failures++;
          if (failures < 5) $display("x=%0d m=%0d: %0d, expected %0d", v, m, r_bin[i], rr);
        end
        if (int'(r_perm[i]) != int'(code_of(MODS[i], 1, rr))) begin
          failures++;
          if (failures < 5) $display("x=%0d m=%0d perm: %0d", v, m, r_perm[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
