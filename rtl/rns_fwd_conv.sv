// rns_fwd_conv: binary-to-residue converter.
//
// Maps a 16-bit two's-complement integer X onto its residues |X|_{m_i} for
// the moduli set (5, 7, 9, 11, 13) and emits each residue as its code under
// that channel's code map, so the converter follows whatever residue encoding
// the arithmetic tables use.
//
// How: a negative X is first lifted to U = X + M (M = 45045 is a multiple of
// every modulus, so the residues do not change); U is in [0, M). For each
// modulus, |U|_m = | sum_j u_j * |2^j|_m |_m: the weighted bit sum is at most
// 16 * 12 and is reduced by one small constant modulo. The legal signed range
// is -22522 .. 22522; larger magnitudes wrap modulo M.
//
// Interface: x in; res[i] is the code for channel i in bits [W_i-1:0] with
// the upper bits zero (W_i = clog2(m_i)). Purely combinational.
//
// Residue definition and the need for converters that honour the encoding
// follow the design; the signed range, the weighted-bit-sum method and the
// port format are this implementation's choices.
module rns_fwd_conv
  import rns_pkg::*;
#(
  parameter code_set_t CODES = BINARY_CODES
) (
  input  logic signed [15:0]             x,
  output logic [NUM_MOD-1:0][RES_W-1:0]  res
);

  logic [16:0] u;

  assign u = x[15] ? 17'(signed'({x[15], x}) + 17'(DYN_RANGE)) : 17'(x);

  for (genvar i = 0; i < int'(NUM_MOD); i++) begin : g_mod
    localparam int unsigned MI = MODULI[i];
    localparam int unsigned WI = $clog2(MI);

    logic [7:0]      wsum;
    logic [3:0]      r;

    always_comb begin
      wsum = '0;
      for (int j = 0; j < 16; j++)
        if (u[j]) wsum = wsum + 8'(((1 << j) % MI));
      r = 4'(wsum % 8'(MI));
      res[i] = '0;
      res[i][WI-1:0] = CODES[i][r][WI-1:0];
    end
  end

endmodule
