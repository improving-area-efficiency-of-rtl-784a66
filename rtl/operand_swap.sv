// operand_swap: redundancy detector (L1) and operand multiplexers.
//
// Addition and multiplication are commutative, so a table only has to hold
// one of the two operand orders (a, b) and (b, a). This block detects an
// operand pair whose order the reduced table does not hold and swaps it, so
// the table that follows always sees an order it stores.
//
//   SYM_FULL  elaborate detection: swap when code(a) > code(b). A magnitude
//             comparison of the codes themselves, so it holds for any code
//             map; the table then stores code(a) <= code(b) only.
//   SYM_BIT   simple detection: bit S of b drives the multiplexers directly,
//             with S the code bit whose ones and zeros are most evenly split
//             over the M codes. The table never sees bit S of a at 0 together
//             with bit S of b at 1.
//   SYM_NONE  no detection; the operands pass unchanged.
//
// Interface: a, b in; a_o, b_o out (W = clog2(M) bits); swap shows the
// multiplexer select. Purely combinational.
//
// Both schemes and the bit choice rule follow the design. The "greater than"
// comparator as L1, and taking the bit from operand b, are this
// implementation's choices.
module operand_swap
  import rns_pkg::*;
#(
  parameter int unsigned M    = 13,
  parameter sym_mode_e   SYM  = SYM_FULL,
  parameter code_map_t   CODE = BINARY_CODE,
  localparam int unsigned W   = $clog2(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o,
  output logic         swap
);

  localparam int unsigned SEL = best_sel_bit(M, W, CODE);

  always_comb begin
    case (SYM)
      SYM_FULL: swap = (a > b);
      SYM_BIT:  swap = b[SEL];
      default:  swap = 1'b0;
    endcase
    a_o = swap ? b : a;
    b_o = swap ? a : b;
  end

endmodule
