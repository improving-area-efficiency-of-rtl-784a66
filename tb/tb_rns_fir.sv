// tb_rns_fir: end-to-end test of the RNS FIR filter at its default size
// (16 taps, merged multiply-accumulate tables with elaborate operand
// swapping, binary residue codes). Stimulus and reference come from
// tb_fir_driver. Besides the per-output value and latency checks it requires
// that each mechanism happened at least once: exact in-range results,
// negative results, results wrapped modulo the dynamic range, input stalls,
// coefficient reloads and operand swaps in the tables.
module tb_rns_fir;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, coef_we, in_valid, in_ready, out_valid;
  logic [3:0]         coef_addr;
  logic signed [15:0] coef_in, in_data, out_data;

  rns_fir dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_in(coef_in), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data)
  );

  int   chk, fail, n_stall, n_wrap, n_exact, n_neg, n_swap, n_reload;
  logic done;

  tb_fir_driver #(.TAPS(16), .SYM(1), .PERM(0), .NSAMP(60)) drv (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_in(coef_in), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
    .checks(chk), .failures(fail), .n_stall(n_stall), .n_wrap(n_wrap),
    .n_exact(n_exact), .n_neg(n_neg), .n_swap(n_swap), .n_reload(n_reload),
    .done(done)
  );

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  initial begin
    wait (done === 1'b1);
    checks   = chk;
    failures = fail;
    need("exact in-range results", n_exact);
    need("negative results", n_neg);
    need("results wrapped modulo M", n_wrap);
    need("input stall cycles", n_stall);
    need("coefficient reloads", n_reload);
    need("operand swaps in MAC tables", n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
