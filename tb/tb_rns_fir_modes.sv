// tb_rns_fir_modes: end-to-end test of the RNS FIR filter in its other
// configurations: separate multiply and add tables with the one-bit operand
// swap under a permuted residue code (5 taps); merged multiply-accumulate
// tables without operand swapping under a permuted code (3 taps); merged
// tables with the one-bit swap under binary code (8 taps). Stimulus and
// reference come from tb_fir_driver; each instance must pass all value and
// latency checks and show stalls, wrapped and exact results, and (where the
// scheme swaps) operand swaps.
module tb_rns_fir_modes;
  import rns_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned MODS [5] = '{5, 7, 9, 11, 13};

  function automatic code_set_t make_codes(bit perm);
    code_set_t cs;
    cs = '0;
    for (int i = 0; i < 5; i++)
      for (int unsigned r = 0; r < MODS[i]; r++) cs[i][r] = RES_W'(code_of(MODS[i], perm, r));
    return cs;
  endfunction

  localparam int N = 3;
  localparam int unsigned TP  [N] = '{5, 3, 8};
  localparam bit          MAC [N] = '{1'b0, 1'b1, 1'b1};
  localparam int unsigned SY  [N] = '{2, 0, 2};
  localparam bit          PM  [N] = '{1'b1, 1'b1, 1'b0};

  int   chk[N], fail[N], n_stall[N], n_wrap[N], n_exact[N], n_neg[N], n_swap[N], n_reload[N];
  logic done[N];

  for (genvar i = 0; i < N; i++) begin : g_cfg
    localparam int unsigned AW = $clog2(TP[i]);
    logic               rst_n, coef_we, in_valid, in_ready, out_valid;
    logic [AW-1:0]      coef_addr;
    logic signed [15:0] coef_in, in_data, out_data;

    rns_fir #(.TAPS(TP[i]), .USE_MAC(MAC[i]), .SYM(sym_mode_e'(SY[i])),
              .CODES(make_codes(PM[i]))) dut (
      .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
      .coef_in(coef_in), .in_valid(in_valid), .in_ready(in_ready),
      .in_data(in_data), .out_valid(out_valid), .out_data(out_data)
    );

    tb_fir_driver #(.TAPS(TP[i]), .SYM(SY[i]), .PERM(PM[i]), .NSAMP(60)) drv (
      .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
      .coef_in(coef_in), .in_valid(in_valid), .in_ready(in_ready),
      .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
      .checks(chk[i]), .failures(fail[i]), .n_stall(n_stall[i]), .n_wrap(n_wrap[i]),
      .n_exact(n_exact[i]), .n_neg(n_neg[i]), .n_swap(n_swap[i]), .n_reload(n_reload[i]),
      .done(done[i])
    );
  end

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(int i, string what, int n);
    checks++;
    $display("config %0d %s: %0d", i, what, n);
    if (n == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < N; i++) if (done[i] !== 1'b1) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fail[i];
      need(i, "exact results", n_exact[i]);
      need(i, "negative results", n_neg[i]);
      need(i, "wrapped results", n_wrap[i]);
      need(i, "input stall cycles", n_stall[i]);
      need(i, "coefficient reloads", n_reload[i]);
      if (SY[i] != 0) need(i, "operand swaps", n_swap[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
