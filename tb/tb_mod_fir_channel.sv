// tb_mod_fir_channel: self-checking test of the modulo-m FIR channel.
// Runs the default channel (modulus 13, 16 taps, merged multiply-accumulate
// table, elaborate operand swapping, binary code) and, for the other
// structures, a modulus-7 channel with separate multiply and add tables and
// the one-bit scheme under a permuted code, and a modulus-11 MAC channel with
// a plain table. Results and latency are checked in tb_channel_run; back-to-
// back samples must have stalled the input at least once per channel.
module tb_mod_fir_channel;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int   chk [N];
  int   fail[N];
  int   stl [N];
  logic done[N];

  tb_channel_run #(.M(13), .TAPS(16), .USE_MAC(1), .SYM(1), .PERM(0), .NSAMP(60)) u0 (
    .clk(clk), .checks(chk[0]), .failures(fail[0]), .stalls(stl[0]), .done(done[0]));
  tb_channel_run #(.M(7), .TAPS(5), .USE_MAC(0), .SYM(2), .PERM(1), .NSAMP(80)) u1 (
    .clk(clk), .checks(chk[1]), .failures(fail[1]), .stalls(stl[1]), .done(done[1]));
  tb_channel_run #(.M(11), .TAPS(3), .USE_MAC(1), .SYM(0), .PERM(1), .NSAMP(80)) u2 (
    .clk(clk), .checks(chk[2]), .failures(fail[2]), .stalls(stl[2]), .done(done[2]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < N; i++) if (done[i] !== 1'b1) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < N; i++) begin
      checks += chk[i] + 1;
      failures += fail[i];
      if (stl[i] == 0) begin
        failures++;
        $display("channel %0d never stalled", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
