// rns_pkg: constants, types and elaboration-time helper functions shared by
// the residue number system (RNS) FIR filter.
//
// The moduli set is (5, 7, 9, 11, 13), the set the area study of this design
// is carried out on. The moduli are pairwise relatively prime, so the dynamic
// range is their product, M = 45045 (about 15.5 bits).
//
// A residue of modulus m travels on clog2(m) wires (3 bits for 5 and 7, 4 bits
// for 9, 11 and 13). The bit pattern that stands for a residue value is set by
// a code map (code_map_t): entry r holds the code of residue r. The design does
// not need codes to be binary: every table is derived from the map, so an
// optimised residue encoding is only a parameter change. The default map is
// plain binary (residue r is coded as r), which is this design's choice since
// the optimised code tables are not published.
//
// Everything here is either a constant or a function that is evaluated while
// parameters are elaborated; none of it becomes logic on its own.
package rns_pkg;

  localparam int unsigned NUM_MOD = 5;   // number of residue channels
  localparam int unsigned MAX_M   = 16;  // largest modulus a channel supports
  localparam int unsigned RES_W   = 4;   // wires of the widest residue bus

  typedef int unsigned moduli_t [NUM_MOD];
  localparam moduli_t MODULI = '{5, 7, 9, 11, 13};

  // Dynamic range M = product of the moduli.
  localparam int unsigned DYN_RANGE = 5 * 7 * 9 * 11 * 13;  // 45045

  // Operation held by a modulo look-up table.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,   // |a + b|_m
    OP_MUL = 2'd1,   // |a * b|_m
    OP_MAC = 2'd2,   // |a * b + c|_m
    OP_SUB = 2'd3    // |a - b|_m, not commutative: full table only
  } mod_op_e;

  // How a look-up table exploits the commutativity of its a and b operands.
  typedef enum logic [1:0] {
    SYM_NONE = 2'd0, // full table, no operand swapping
    SYM_FULL = 2'd1, // elaborate detection: store only code(a) <= code(b)
    SYM_BIT  = 2'd2  // simple detection: one code bit of b drives the swap
  } sym_mode_e;

  // Residue code map: entry r is the code of residue r. Entries at and above
  // the modulus are unused.
  typedef logic [MAX_M-1:0][RES_W-1:0] code_map_t;

  // Binary code: residue r is coded as r.
  function automatic code_map_t binary_code();
    code_map_t c;
    for (int r = 0; r < int'(MAX_M); r++) c[r] = RES_W'(r);
    return c;
  endfunction

  localparam code_map_t BINARY_CODE = binary_code();

  // A code map per channel, channel i in entry i.
  typedef logic [NUM_MOD-1:0][MAX_M-1:0][RES_W-1:0] code_set_t;
  localparam code_set_t BINARY_CODES = {NUM_MOD{BINARY_CODE}};

  // Result of an operation on residue values (not codes).
  function automatic int unsigned mod_op(mod_op_e op, int unsigned m,
                                         int unsigned a, int unsigned b,
                                         int unsigned c);
    case (op)
      OP_ADD:  return (a + b) % m;
      OP_MUL:  return (a * b) % m;
      OP_SUB:  return (a + m - b) % m;
      default: return (a * b + c) % m;
    endcase
  endfunction

  // Simple redundancy detection: the code bit whose ones and zeros are most
  // evenly split over the m codes in use, |ones - zeros| smallest; on a tie
  // the lowest bit wins.
  function automatic int unsigned best_sel_bit(int unsigned m, int unsigned w,
                                               code_map_t code);
    int best, best_bal;
    best = 0;
    best_bal = 1 << 30;
    for (int i = 0; i < int'(w); i++) begin
      int ones, bal;
      ones = 0;
      for (int r = 0; r < int'(m); r++) ones += int'(code[r][i]);
      bal = ones - (int'(m) - ones);
      if (bal < 0) bal = -bal;
      if (bal < best_bal) begin
        best_bal = bal;
        best = i;
      end
    end
    return best;
  endfunction

  // Multiplicative inverse of x modulo m (m prime to x), by search.
  function automatic int unsigned mod_inverse(int unsigned x, int unsigned m);
    for (int unsigned k = 1; k < m; k++)
      if ((x * k) % m == 1) return k;
    return 0;
  endfunction

  // Chinese-remainder weight of channel i: T_i = M_i * |M_i^-1|_{m_i} with
  // M_i = M / m_i. Then X = | sum_i x_i * T_i |_M.
  function automatic int unsigned crt_weight(int unsigned i);
    int unsigned mi;
    mi = DYN_RANGE / MODULI[i];
    return mi * mod_inverse(mi % MODULI[i], MODULI[i]);
  endfunction

endpackage
