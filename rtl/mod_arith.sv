// mod_arith: redundancy-detection based modulo arithmetic unit.
//
// A commutative modulo operation (add, multiply, or multiply-accumulate with
// the two multiplicands commutative; subtraction only with SYM_NONE) built as a redundancy detector L1 with
// operand multiplexers (operand_swap) followed by the reduced table L2
// (mod_lut). The detector moves every operand pair into the order that L2
// stores, so L2 holds about half the rows of a full table (SYM_FULL) or the
// rows left by the simple one-bit scheme (SYM_BIT). With SYM_NONE this is a
// plain look-up table.
//
// Interface: codes a, b, c (c used by OP_MAC only) and result code y, all
// W = clog2(M) bits wide; swap is high when the detector exchanged a and b.
// Purely combinational: the detector and the multiplexers add their delay in
// front of the table.
//
// The structure follows the design; the default operation (MAC) and scheme
// (elaborate detection) are the combination the area study found smallest
// for the multiply-accumulate table.
module mod_arith
  import rns_pkg::*;
#(
  parameter int unsigned M    = 13,
  parameter mod_op_e     OP   = OP_MAC,
  parameter sym_mode_e   SYM  = SYM_FULL,
  parameter code_map_t   CODE = BINARY_CODE,
  localparam int unsigned W   = $clog2(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         swap
);

  logic [W-1:0] a_s, b_s;

  operand_swap #(.M(M), .SYM(SYM), .CODE(CODE)) u_l1 (
    .a(a), .b(b), .a_o(a_s), .b_o(b_s), .swap(swap)
  );

  mod_lut #(.M(M), .OP(OP), .SYM(SYM), .CODE(CODE)) u_l2 (
    .a(a_s), .b(b_s), .c(c), .y(y)
  );

endmodule
