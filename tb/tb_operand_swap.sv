// tb_operand_swap: self-checking test of the redundancy detector and operand
// multiplexers. For the elaborate scheme the swap must happen exactly when
// code(a) > code(b); for the one-bit scheme exactly when the most balanced
// code bit S of b is 1 (S worked out by the reference package); with no
// scheme never. Outputs must be the inputs, exchanged when swapped. All code
// pairs are tried for moduli 5, 9 and 13, binary and permuted code maps.
module tb_operand_swap;
  import rns_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int NC = 3 * 3 * 2;
  localparam int unsigned MODS [3] = '{5, 9, 13};

  // Test stimulus per configuration: 4-bit a/b, outputs widened to 4 bits.
  logic [3:0] a [NC];
  logic [3:0] b [NC];
  logic [3:0] ao[NC];
  logic [3:0] bo[NC];
  logic       sw[NC];

  function automatic code_map_t make_map(int unsigned m, bit perm);
    code_map_t c;
    c = '0;
    for (int unsigned r = 0; r < m; r++) c[r] = RES_W'(code_of(m, perm, r));
    return c;
  endfunction

  for (genvar mi = 0; mi < 3; mi++) begin : g_m
    for (genvar s = 0; s < 3; s++) begin : g_s
      for (genvar p = 0; p < 2; p++) begin : g_p
        localparam int I = (mi * 3 + s) * 2 + p;
        localparam int unsigned W = width_of(MODS[mi]);
        logic [W-1:0] ao_w, bo_w;
        operand_swap #(.M(MODS[mi]), .SYM(sym_mode_e'(s)), .CODE(make_map(MODS[mi], p))) dut (
          .a(a[I][W-1:0]), .b(b[I][W-1:0]), .a_o(ao_w), .b_o(bo_w), .swap(sw[I])
        );
        assign ao[I] = 4'(ao_w);
        assign bo[I] = 4'(bo_w);
      end
    end
  end

  initial begin
    for (int i = 0; i < NC; i++) begin a[i] = '0; b[i] = '0; end
    for (int mi = 0; mi < 3; mi++)
      for (int s = 0; s < 3; s++)
        for (int p = 0; p < 2; p++) begin
          int i, sel;
          i = (mi * 3 + s) * 2 + p;
          sel = int'(ref_sel_bit(MODS[mi], p));
          for (int unsigned ra = 0; ra < MODS[mi]; ra++)
            for (int unsigned rb = 0; rb < MODS[mi]; rb++) begin
              int unsigned ca, cb;
              bit exp_sw;
              ca = code_of(MODS[mi], p, ra);
              cb = code_of(MODS[mi], p, rb);
              a[i] = 4'(ca);
              b[i] = 4'(cb);
              #1;
              case (s)
                1:       exp_sw = ca > cb;
                2:       exp_sw = ((cb >> sel) & 1) == 1;
                default: exp_sw = 1'b0;
              endcase
              checks++;
              if (sw[i] != exp_sw || ao[i] != (exp_sw ? 4'(cb) : 4'(ca)) ||
                  bo[i] != (exp_sw ? 4'(ca) : 4'(cb))) begin
                failures++;
                if (failures < 5)
                  $display("swap M=%0d sym=%0d perm=%0d a=%0d b=%0d: swap=%0d out=%0d,%0d",
                           MODS[mi], s, p, ca, cb, sw[i], ao[i], bo[i]);
              end
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
