// rns_fir: residue number system FIR filter.
//
// y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k], computed as five independent
// small-modulus filters, one per modulus of the set (5, 7, 9, 11, 13), whose
// results are combined back into one integer. The arithmetic inside each
// channel is done by look-up tables (multiply-accumulate tables by default,
// reduced by operand swapping), which is what makes residue arithmetic fast:
// no carry crosses from one channel into another.
//
//   in_data --> rns_fwd_conv --> 5 x mod_fir_channel --> rns_rev_conv --> out
//   coef_in --> rns_fwd_conv --> coefficient registers of every channel
//
// Interface:
//   coef_we, coef_addr, coef_in  write coefficient h[coef_addr] (signed).
//   in_valid, in_ready, in_data  sample handshake; a sample is taken when both
//                                are high.
//   out_valid, out_data          one-cycle pulse with y[n] (signed).
// Numbers: every value is an integer modulo M = 45045 read in the range
// -22522 .. 22522. The output is exact when the true y[n] lies in that range;
// otherwise it is y[n] wrapped modulo M, as in any RNS design.
// Timing: out_valid rises TAPS + 1 cycles after the clock edge that took the
// sample (one cycle per tap, one for the output register after the reverse
// converter); a new sample is taken at most every TAPS + 1 cycles.
// Coefficients should only be written while in_ready is high.
//
// The partition into forward converter, modulo channels and reverse
// converter, the moduli set and the table-based channels follow the design;
// the tap count, word widths, signed range, handshake and the binary default
// residue code are this implementation's choices.
module rns_fir
  import rns_pkg::*;
#(
  parameter int unsigned TAPS    = 16,
  parameter bit          USE_MAC = 1'b1,
  parameter sym_mode_e   SYM     = SYM_FULL,
  parameter code_set_t   CODES   = BINARY_CODES,
  localparam int unsigned AW     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               coef_we,
  input  logic [AW-1:0]      coef_addr,
  input  logic signed [15:0] coef_in,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] in_data,
  output logic               out_valid,
  output logic signed [15:0] out_data
);

  logic [NUM_MOD-1:0][RES_W-1:0] x_res, h_res, y_res;
  logic [NUM_MOD-1:0]            ch_ready, ch_valid;
  logic signed [15:0]            y_bin;

  rns_fwd_conv #(.CODES(CODES)) u_fwd_x (.x(in_data), .res(x_res));
  rns_fwd_conv #(.CODES(CODES)) u_fwd_h (.x(coef_in), .res(h_res));

  for (genvar i = 0; i < int'(NUM_MOD); i++) begin : g_ch
    localparam int unsigned MI = MODULI[i];
    localparam int unsigned WI = $clog2(MI);

    mod_fir_channel #(
      .M(MI), .TAPS(TAPS), .USE_MAC(USE_MAC), .SYM(SYM), .CODE(CODES[i])
    ) u_ch (
      .clk       (clk),
      .rst_n     (rst_n),
      .coef_we   (coef_we),
      .coef_addr (coef_addr),
      .coef_data (h_res[i][WI-1:0]),
      .in_valid  (in_valid),
      .in_ready  (ch_ready[i]),
      .in_data   (x_res[i][WI-1:0]),
      .out_valid (ch_valid[i]),
      .out_data  (y_res[i][WI-1:0])
    );

    if (WI < RES_W) begin : g_pad
      assign y_res[i][RES_W-1:WI] = '0;
    end
  end

  // The channels run in lock step: they see the same handshake and take the
  // same number of cycles.
  assign in_ready = &ch_ready;

  rns_rev_conv #(.CODES(CODES)) u_rev (.res(y_res), .y(y_bin));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= ch_valid[0];
      if (ch_valid[0]) out_data <= y_bin;
    end
  end

endmodule
