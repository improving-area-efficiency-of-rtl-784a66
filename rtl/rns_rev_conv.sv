// rns_rev_conv: residue-to-binary converter (Chinese remainder theorem).
//
// Rebuilds the integer from its five residue codes. Each code is first
// decoded to its residue value x_i under the channel's code map; then
//   U = | sum_i |x_i * T_i|_M |_M,  T_i = M_i * |M_i^-1|_{m_i},  M_i = M / m_i,
// with M = 45045. Each |x_i * T_i|_M is a constant table of m_i words worked
// out at elaboration, the five words are added (sum below 5M) and the sum is
// brought below M by subtracting 4M, 2M and M where they fit. Finally U is
// read as a signed value: U > (M-1)/2 stands for U - M.
//
// Interface: res[i] holds channel i's code in bits [W_i-1:0]; y is the signed
// 16-bit result in -22522 .. 22522. A code that stands for no residue is read
// as residue 0. Purely combinational.
//
// The converter's place in the system and its need to honour the residue
// encoding follow the design; the CRT method and the signed mapping are this
// implementation's choices.
module rns_rev_conv
  import rns_pkg::*;
#(
  parameter code_set_t CODES = BINARY_CODES
) (
  input  logic [NUM_MOD-1:0][RES_W-1:0]  res,
  output logic signed [15:0]             y
);

  localparam logic [17:0] M1 = 18'(DYN_RANGE);
  localparam logic [17:0] M2 = 18'(2 * DYN_RANGE);
  localparam logic [17:0] M4 = 18'(4 * DYN_RANGE);
  localparam logic [17:0] HALF = 18'((DYN_RANGE - 1) / 2);

  typedef logic [MAX_M-1:0][15:0] term_tab_t;

  // |r * T_i|_M for each residue r of channel i, indexed by the code of r.
  function automatic term_tab_t build_terms(int unsigned i);
    term_tab_t t;
    int unsigned mi, wi, ti;
    mi = MODULI[i];
    wi = $clog2(mi);
    ti = crt_weight(i);
    t = '0;
    for (int unsigned r = 0; r < mi; r++)
      t[int'(CODES[i][r]) & ((1 << wi) - 1)] = 16'((r * ti) % DYN_RANGE);
    return t;
  endfunction

  logic [NUM_MOD-1:0][15:0] term;

  for (genvar i = 0; i < int'(NUM_MOD); i++) begin : g_mod
    localparam int unsigned MI = MODULI[i];
    localparam int unsigned WI = $clog2(MI);

    localparam term_tab_t TERMS = build_terms(i);

    assign term[i] = TERMS[res[i][WI-1:0]];
  end

  logic [17:0] s0, s1, s2, s3;

  always_comb begin
    s0 = '0;
    for (int i = 0; i < int'(NUM_MOD); i++) s0 = s0 + 18'(term[i]);
    s1 = (s0 >= M4) ? s0 - M4 : s0;
    s2 = (s1 >= M2) ? s1 - M2 : s1;
    s3 = (s2 >= M1) ? s2 - M1 : s2;
    y  = (s3 > HALF) ? 16'(s3 - M1) : 16'(s3);
  end

endmodule
