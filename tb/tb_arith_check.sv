// tb_arith_check: exhaustive check of one mod_arith configuration. Every
// residue combination must give the code of the true result, whatever the
// scheme, since the detector must route each pair to a stored row. Also
// counts how many combinations the detector swapped.
module tb_arith_check
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
  output int   swaps,
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
  logic         sw;

  mod_arith #(.M(M), .OP(mod_op_e'(OP)), .SYM(sym_mode_e'(SYM)), .CODE(make_map()))
    dut (.a(a), .b(b), .c(c), .y(y), .swap(sw));

  initial begin
    checks = 0; failures = 0; swaps = 0; done = 1'b0;
    a = '0; b = '0; c = '0;
    for (int unsigned ra = 0; ra < M; ra++)
      for (int unsigned rb = 0; rb < M; rb++)
        for (int unsigned rc = 0; rc < ((OP == 2) ? M : 1); rc++) begin
          int unsigned exp;
          exp = code_of(M, PERM, ref_op(OP, M, ra, rb, rc));
          a = W'(code_of(M, PERM, ra));
          b = W'(code_of(M, PERM, rb));
          c = W'(code_of(M, PERM, rc));
          #1;
          checks++;
          if (sw) swaps++;
          if (int'(y) != int'(exp)) begin
            failures++;
            if (failures < 5)
              $display("mod_arith M=%0d op=%0d sym=%0d perm=%0d: %0d,%0d,%0d -> %0d, expected %0d",
                       M, OP, SYM, PERM, ra, rb, rc, y, exp);
          end
        end
    done = 1'b1;
  end
endmodule
