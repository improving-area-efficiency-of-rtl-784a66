// tb_lut_check: exhaustive check of one mod_lut configuration.
// Drives every operand combination of residues (a, b, and c for the
// multiply-accumulate table), one every time unit, and compares y with the
// reference: the code of the true result on a stored row, zero on a row the
// reduced table leaves out (code(a) > code(b) for the elaborate scheme; bit S
// of a at 0 and of b at 1 for the simple scheme). Counts the stored rows of
// the (a, b) truth table. Reports through its ports once done is high.
module tb_lut_check
  import rns_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned M    = 5,
  parameter int unsigned OP   = 0,
  parameter int unsigned SYM  = 0,
  parameter bit          PERM = 1'b0
) (
  output int   checks,
  output int   failures,
  output int   rows,
  output logic done
);
  localparam int unsigned W = width_of(M);

  function automatic code_map_t make_map();
    code_map_t c;
    c = '0;
    for (int unsigned r = 0; r < M; r++) c[r] = RES_W'(code_of(M, PERM, r));
    return c;
  endfunction

  logic [W-1:0] a, b, c, y;

  mod_lut #(.M(M), .OP(mod_op_e'(OP)), .SYM(sym_mode_e'(SYM)), .CODE(make_map()))
    dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    int unsigned s, ca, cb;
    checks = 0; failures = 0; rows = 0; done = 1'b0;
    a = '0; b = '0; c = '0;
    s = ref_sel_bit(M, PERM);
    for (int unsigned ra = 0; ra < M; ra++)
      for (int unsigned rb = 0; rb < M; rb++) begin
        bit keep;
        ca = code_of(M, PERM, ra);
        cb = code_of(M, PERM, rb);
        case (SYM)
          1:       keep = ca <= cb;
          2:       keep = !(((ca >> s) & 1) == 0 && ((cb >> s) & 1) == 1);
          default: keep = 1'b1;
        endcase
        if (keep) rows++;
        for (int unsigned rc = 0; rc < ((OP == 2) ? M : 1); rc++) begin
          int unsigned exp;
          exp = keep ? code_of(M, PERM, ref_op(OP, M, ra, rb, rc)) : 0;
          a = W'(ca);
          b = W'(cb);
          c = W'(code_of(M, PERM, rc));
          #1;
          checks++;
          if (int'(y) != int'(exp)) begin
            failures++;
            if (failures < 5)
              $display("mod_lut M=%0d op=%0d sym=%0d perm=%0d: %0d,%0d,%0d -> %0d, expected %0d",
                       M, OP, SYM, PERM, ra, rb, rc, y, exp);
          end
        end
      end
    done = 1'b1;
  end
endmodule
