// tb_rns_example: the textbook RNS example on the moduli set (5, 7, 11),
// run on the design's table units: X = 47 = (2, 5, 3) and Y = 31 = (1, 3, 9).
// Channel-wise addition through the reduced add tables must give
// (3, 1, 1) = 78, and channel-wise multiplication must give the residues of
// 1457 = (2, 1, 5); both are also recombined here by search over 0..384 to
// confirm they stand for 78 and 1457 mod 385.
module tb_rns_example;
  import rns_pkg::*;

  localparam int unsigned MODS [3] = '{5, 7, 11};

  logic [3:0] xa [3];
  logic [3:0] ya [3];
  logic [3:0] sum[3];
  logic [3:0] prd[3];

  for (genvar i = 0; i < 3; i++) begin : g_ch
    localparam int unsigned W = $clog2(MODS[i]);
    logic [W-1:0] s, p;
    mod_arith #(.M(MODS[i]), .OP(OP_ADD), .SYM(SYM_FULL)) u_add (
      .a(xa[i][W-1:0]), .b(ya[i][W-1:0]), .c('0), .y(s), .swap());
    mod_arith #(.M(MODS[i]), .OP(OP_MUL), .SYM(SYM_BIT)) u_mul (
      .a(xa[i][W-1:0]), .b(ya[i][W-1:0]), .c('0), .y(p), .swap());
    assign sum[i] = 4'(s);
    assign prd[i] = 4'(p);
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int recombine(int r0, int r1, int r2);
    for (int v = 0; v < 385; v++)
      if (v % 5 == r0 && v % 7 == r1 && v % 11 == r2) return v;
    return -1;
  endfunction

  initial begin
    xa = '{4'd2, 4'd5, 4'd3};
    ya = '{4'd1, 4'd3, 4'd9};
    #1;
    checks += 4;
    if (sum[0] != 3 || sum[1] != 1 || sum[2] != 1) failures++;
    if (recombine(sum[0], sum[1], sum[2]) != 78) failures++;
    if (prd[0] != 4'(1457 % 5) || prd[1] != 4'(1457 % 7) || prd[2] != 4'(1457 % 11)) failures++;
    if (recombine(prd[0], prd[1], prd[2]) != 1457 % 385) failures++;
    $display("47 + 31 -> (%0d, %0d, %0d), 47 * 31 -> (%0d, %0d, %0d)",
             sum[0], sum[1], sum[2], prd[0], prd[1], prd[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
