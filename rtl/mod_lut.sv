// mod_lut: look-up table for one modulo operation on encoded residues.
//
// This is the two-level (PLA style) table that carries out residue arithmetic
// for a small modulus M: modulo addition |a+b|_M, modulo multiplication
// |a*b|_M, the merged multiply-accumulate |a*b+c|_M, or modulo subtraction
// |a-b|_M. Subtraction is not commutative, so it only exists as a full table
// (SYM_NONE); any other SYM with OP_SUB stops elaboration. Operands and result are
// residue codes given by the code map CODE; the table is derived from CODE at
// elaboration, so a changed encoding needs no change to the RTL. Each input
// pattern is one row of the truth table; a pattern that no residue (or no
// stored row) produces reads as zero, which is what a PLA without a matching
// product term delivers.
//
// SYM selects which rows are stored:
//   SYM_NONE  every (a, b) pair, the plain table;
//   SYM_FULL  only pairs with code(a) <= code(b), the reduced table L2 of the
//             elaborate redundancy-detection scheme;
//   SYM_BIT   every pair except those with bit S of a at 0 and bit S of b at
//             1, the reduced table of the simple scheme, where S is the most
//             balanced code bit.
// With SYM_FULL or SYM_BIT the table must be driven through operand_swap
// (see mod_arith); on its own it returns 0 for the rows it does not store.
//
// Interface: a, b, c and y are W = clog2(M) bits wide; c is read only when
// OP is OP_MAC. The table is purely combinational.
//
// The three operations, the shared code for all columns and the two reduced
// tables follow the design; the zero output for unused patterns and the
// default binary code are choices of this implementation.
module mod_lut
  import rns_pkg::*;
#(
  parameter int unsigned M    = 13,
  parameter mod_op_e     OP   = OP_MAC,
  parameter sym_mode_e   SYM  = SYM_NONE,
  parameter code_map_t   CODE = BINARY_CODE,
  localparam int unsigned W   = $clog2(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  localparam int unsigned NCOL  = (OP == OP_MAC) ? 3 : 2;
  localparam int unsigned IDX_W = NCOL * W;
  localparam int unsigned TAB_N = 1 << IDX_W;
  localparam int unsigned SEL   = best_sel_bit(M, W, CODE);

  typedef logic [TAB_N-1:0][W-1:0] table_t;

  // Is the row (code a, code b) kept in the table?
  function automatic bit stored(logic [W-1:0] ca, logic [W-1:0] cb);
    case (SYM)
      SYM_FULL: return ca <= cb;
      SYM_BIT:  return !(ca[SEL] == 1'b0 && cb[SEL] == 1'b1);
      default:  return 1'b1;
    endcase
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int unsigned n = 0; n < TAB_N; n++) t[n] = '0;
    for (int unsigned ra = 0; ra < M; ra++)
      for (int unsigned rb = 0; rb < M; rb++)
        for (int unsigned rc = 0; rc < ((OP == OP_MAC) ? M : 1); rc++) begin
          logic [W-1:0] ca, cb, cc;
          int unsigned idx;
          ca = CODE[ra][W-1:0];
          cb = CODE[rb][W-1:0];
          cc = CODE[rc][W-1:0];
          if (OP == OP_MAC) idx = int'({ca, cb, cc});
          else              idx = int'({ca, cb});
          if (stored(ca, cb)) t[idx] = CODE[mod_op(OP, M, ra, rb, rc)][W-1:0];
        end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  if (OP == OP_SUB && SYM != SYM_NONE) begin : g_bad_sym
    $error("mod_lut: subtraction is not commutative and needs SYM_NONE");
  end

  logic [IDX_W-1:0] idx;

  always_comb begin
    if (OP == OP_MAC) idx = IDX_W'({a, b, c});
    else              idx = IDX_W'({a, b});
  end

  assign y = TABLE[idx];

endmodule
