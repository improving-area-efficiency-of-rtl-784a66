// mod_fir_channel: modulo-m FIR filter, one residue channel of the RNS filter.
//
// Computes y[n] = | sum_{k=0}^{TAPS-1} h[k] * x[n-k] |_M on residue codes,
// the way a conventional filter is built around one multiplier and one adder:
// a coefficient register file, a delay line of past samples and an
// accumulator, with the taps visited one per clock. With USE_MAC = 1 each tap
// is a single look-up in a merged multiply-accumulate table, |h*x + acc|_M;
// with USE_MAC = 0 it is a multiply table followed by an add table, two
// look-ups in series. Either table is a mod_arith unit, so it can use the
// operand-swapping reduced tables (SYM).
//
// Interface (all data are W = clog2(M)-bit residue codes under CODE):
//   coef_we/coef_addr/coef_data  write h[coef_addr]; coef_addr 0 is h[0].
//   in_valid/in_ready/in_data    a sample is taken when both are high.
//   out_valid/out_data           one-cycle pulse with y[n].
// Timing: the clock edge that takes a sample shifts it into the delay line
// and clears the accumulator; each of the next TAPS edges does one tap, and
// the last of them raises out_valid, so the result is there TAPS cycles after
// the sample was taken. in_ready is low during those TAPS cycles: a new
// sample is taken at most every TAPS + 1 cycles. A coefficient may only be
// written while in_ready is high (an assertion checks this). Synchronous
// active-low reset clears the delay line and coefficients to the code of
// residue 0.
//
// The one-multiplier-one-adder filter, the MAC table and the two-table
// alternative follow the design; the tap count, the serial schedule, the
// handshake and the reset values are this implementation's choices.
module mod_fir_channel
  import rns_pkg::*;
#(
  parameter int unsigned M       = 13,
  parameter int unsigned TAPS    = 16,
  parameter bit          USE_MAC = 1'b1,
  parameter sym_mode_e   SYM     = SYM_FULL,
  parameter code_map_t   CODE    = BINARY_CODE,
  localparam int unsigned W      = $clog2(M),
  localparam int unsigned AW     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  logic [W-1:0]  coef_data,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  output logic [W-1:0]  out_data
);

  localparam logic [W-1:0] ZERO = CODE[0][W-1:0];

  logic [TAPS-1:0][W-1:0] coef;   // h[k]
  logic [TAPS-1:0][W-1:0] dline;  // x[n-k]
  logic [W-1:0]           acc;
  logic [AW-1:0]          k;
  logic                   busy;
  logic [W-1:0]           tap_y;

  // One tap: |h[k] * x[n-k] + acc|_M
  if (USE_MAC) begin : g_mac
    mod_arith #(.M(M), .OP(OP_MAC), .SYM(SYM), .CODE(CODE)) u_mac (
      .a(coef[k]), .b(dline[k]), .c(acc), .y(tap_y), .swap()
    );
  end else begin : g_mul_add
    logic [W-1:0] prod;
    mod_arith #(.M(M), .OP(OP_MUL), .SYM(SYM), .CODE(CODE)) u_mul (
      .a(coef[k]), .b(dline[k]), .c(ZERO), .y(prod), .swap()
    );
    mod_arith #(.M(M), .OP(OP_ADD), .SYM(SYM), .CODE(CODE)) u_add (
      .a(prod), .b(acc), .c(ZERO), .y(tap_y), .swap()
    );
  end

  assign in_ready = !busy;
  assign out_data = acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      coef <= {TAPS{ZERO}};
    end else if (coef_we && int'(coef_addr) < int'(TAPS)) begin
      coef[coef_addr] <= coef_data;
    end
  end

  // Usage rule: coefficients change only between computations.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(coef_we && busy))
        else $error("mod_fir_channel: coefficient written during a computation");
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dline     <= {TAPS{ZERO}};
      acc       <= ZERO;
      k         <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          dline <= {dline[TAPS-2:0], in_data};
          acc   <= ZERO;
          k     <= '0;
          busy  <= 1'b1;
        end
      end else begin
        acc <= tap_y;
        if (k == AW'(TAPS - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
