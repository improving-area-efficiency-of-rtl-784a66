// tb_channel_run: drives one mod_fir_channel and checks it against a
// residue-domain reference FIR. Loads random coefficients, then offers
// NSAMP random samples, sometimes back to back (so in_valid is held while the
// channel is busy) and sometimes after idle gaps. Each result must equal
// |sum_k h[k] x[n-k]|_M as a code and must appear TAPS cycles after the
// clock edge that took its sample. Halfway it rewrites one coefficient while
// the channel is idle. Reports through its ports once done is high.
module tb_channel_run
  import rns_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned M       = 13,
  parameter int unsigned TAPS    = 16,
  parameter bit          USE_MAC = 1'b1,
  parameter int unsigned SYM     = 1,
  parameter bit          PERM    = 1'b0,
  parameter int unsigned NSAMP   = 60
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int unsigned W  = width_of(M);
  localparam int unsigned AW = (TAPS > 1) ? $clog2(TAPS) : 1;

  function automatic code_map_t make_map();
    code_map_t c;
    c = '0;
    for (int unsigned r = 0; r < M; r++) c[r] = RES_W'(code_of(M, PERM, r));
    return c;
  endfunction

  function automatic int unsigned decode(int unsigned code);
    for (int unsigned r = 0; r < M; r++) if (code_of(M, PERM, r) == code) return r;
    return 999;
  endfunction

  logic          rst_n, coef_we, in_valid, in_ready, out_valid;
  logic [AW-1:0] coef_addr;
  logic [W-1:0]  coef_data, in_data, out_data;

  mod_fir_channel #(.M(M), .TAPS(TAPS), .USE_MAC(USE_MAC), .SYM(sym_mode_e'(SYM)),
                    .CODE(make_map())) dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_data(coef_data), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_data(out_data)
  );

  int unsigned h [TAPS];
  int unsigned x [TAPS];      // x[k] = sample n-k, residues
  int unsigned exp_q [$];
  longint      t_q [$];
  longint      cycle;

  always @(posedge clk) cycle <= cycle + 1;

  // Output monitor, sampling between clock edges.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("channel M=%0d: unexpected output", M);
      end else begin
        int unsigned e;
        longint t0;
        e = exp_q.pop_front();
        t0 = t_q.pop_front();
        if (decode(int'(out_data)) != e) begin
          failures++;
          $display("channel M=%0d: got residue %0d, expected %0d", M, decode(int'(out_data)), e);
        end
        checks++;
        if (cycle - t0 != longint'(TAPS)) begin
          failures++;
          $display("channel M=%0d: latency %0d, expected %0d", M, cycle - t0, TAPS);
        end
      end
    end
  end

  // Stimulus is applied at falling edges; the channel samples at rising edges.
  initial begin
    checks = 0; failures = 0; stalls = 0; done = 1'b0; cycle = 0;
    rst_n = 1'b0; coef_we = 1'b0; in_valid = 1'b0; coef_addr = '0;
    coef_data = '0; in_data = '0;
    for (int k = 0; k < int'(TAPS); k++) begin h[k] = 0; x[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(TAPS); k++) begin
      int unsigned v;
      v = $urandom_range(M - 1);
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AW'(k); coef_data = W'(code_of(M, PERM, v)); h[k] = v;
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int n = 0; n < int'(NSAMP); n++) begin
      int unsigned v, acc;
      if (n == int'(NSAMP) / 2) begin
        int unsigned k2, v2;
        k2 = $urandom_range(TAPS - 1);
        v2 = $urandom_range(M - 1);
        while (!in_ready) @(negedge clk);
        coef_we = 1'b1; coef_addr = AW'(k2); coef_data = W'(code_of(M, PERM, v2)); h[k2] = v2;
        @(negedge clk);
        coef_we = 1'b0;
      end
      if ($urandom_range(3) == 0) repeat ($urandom_range(4)) @(negedge clk);
      v = (n < 3) ? M - 1 : $urandom_range(M - 1);
      in_valid = 1'b1;
      in_data  = W'(code_of(M, PERM, v));
      while (!in_ready) begin
        stalls++;
        @(negedge clk);
      end
      @(negedge clk);  // taken at the rising edge just passed
      in_valid = 1'b0;
      for (int k = int'(TAPS) - 1; k > 0; k--) x[k] = x[k-1];
      x[0] = v;
      acc = 0;
      for (int k = 0; k < int'(TAPS); k++) acc = (acc + h[k] * x[k]) % M;
      exp_q.push_back(acc);
      t_q.push_back(cycle);
    end
    repeat (TAPS + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("channel M=%0d: %0d results missing", M, exp_q.size());
    end
    done = 1'b1;
  end
endmodule
