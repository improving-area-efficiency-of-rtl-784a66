// tb_fir_driver: stimulus and reference model for one rns_fir instance.
// The filter itself is instantiated by the calling testbench and connected
// through the ports, so the full-size test can leave its parameters alone.
//
// Phases: (1) small coefficients and samples, so every true output lies in
// the dynamic range and must come back exactly, including negative values;
// (2) a coefficient reload with large values, so many outputs wrap modulo
// M = 45045 and must equal the wrapped true sum; (3) full-range random data.
// Samples are offered back to back (in_valid held while the filter is busy)
// and after random gaps. Every output is checked against
// sum_k h[k] x[n-k] reduced into -22522 .. 22522, and its latency against
// TAPS + 1 cycles. The model also counts, per channel, how often the
// operand-swapping detector must have fired (from the residues it sees), so
// the caller can check that every mechanism happened.
module tb_fir_driver
  import tb_ref_pkg::*;
#(
  parameter int unsigned TAPS  = 16,
  parameter int unsigned SYM   = 1,      // 0 none, 1 elaborate, 2 one-bit
  parameter bit          PERM  = 1'b0,
  parameter int unsigned NSAMP = 60,     // samples per phase
  localparam int unsigned AW   = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               coef_we,
  output logic [AW-1:0]      coef_addr,
  output logic signed [15:0] coef_in,
  output logic               in_valid,
  input  logic               in_ready,
  output logic signed [15:0] in_data,
  input  logic               out_valid,
  input  logic signed [15:0] out_data,
  output int                 checks,
  output int                 failures,
  output int                 n_stall,
  output int                 n_wrap,
  output int                 n_exact,
  output int                 n_neg,
  output int                 n_swap,
  output int                 n_reload,
  output logic               done
);
  localparam int MR   = 45045;
  localparam int HALF = 22522;
  localparam int unsigned MODS [5] = '{5, 7, 9, 11, 13};

  longint h [TAPS];
  longint x [TAPS];
  int     exp_q [$];
  bit     wrap_q [$];
  longint t_q [$];
  longint cycle;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int wrap_range(longint v);
    longint r;
    r = v % longint'(MR);
    if (r < 0) r += MR;
    if (r > HALF) r -= MR;
    return int'(r);
  endfunction

  function automatic int unsigned res_of(longint v, int unsigned m);
    longint r;
    r = v % longint'(m);
    if (r < 0) r += m;
    return int'(r);
  endfunction

  // Would the detector swap the coefficient/sample pair of one tap?
  function automatic bit swaps(longint hv, longint xv, int unsigned m);
    int unsigned ca, cb, s;
    ca = code_of(m, PERM, res_of(hv, m));
    cb = code_of(m, PERM, res_of(xv, m));
    s  = ref_sel_bit(m, PERM);
    if (SYM == 1) return ca > cb;
    if (SYM == 2) return ((cb >> s) & 1) == 1;
    return 1'b0;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("rns_fir: unexpected output %0d", out_data);
      end else begin
        int e;
        bit w;
        longint t0;
        e = exp_q.pop_front();
        w = wrap_q.pop_front();
        t0 = t_q.pop_front();
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("rns_fir: got %0d, expected %0d", out_data, e);
        end else begin
          if (w) n_wrap++;
          else   n_exact++;
          if (e < 0) n_neg++;
        end
        checks++;
        if (cycle - t0 != longint'(TAPS) + 1) begin
          failures++;
          if (failures < 10) $display("rns_fir: latency %0d, expected %0d", cycle - t0, TAPS + 1);
        end
      end
    end
  end

  task automatic load_coefs(int lim);
    while (!in_ready) @(negedge clk);
    for (int k = 0; k < int'(TAPS); k++) begin
      int v;
      v = int'($urandom_range(2 * lim)) - lim;
      coef_we = 1'b1; coef_addr = AW'(k); coef_in = 16'(v); h[k] = v;
      @(negedge clk);
    end
    coef_we = 1'b0;
    n_reload++;
  endtask

  task automatic run_samples(int lim);
    for (int n = 0; n < int'(NSAMP); n++) begin
      int v;
      longint acc;
      if ($urandom_range(3) == 0) repeat ($urandom_range(5)) @(negedge clk);
      v = int'($urandom_range(2 * lim)) - lim;
      in_valid = 1'b1;
      in_data  = 16'(v);
      while (!in_ready) begin
        n_stall++;
        @(negedge clk);
      end
      @(negedge clk);  // taken at the rising edge just passed
      in_valid = 1'b0;
      for (int k = int'(TAPS) - 1; k > 0; k--) x[k] = x[k-1];
      x[0] = v;
      acc = 0;
      for (int k = 0; k < int'(TAPS); k++) begin
        acc += h[k] * x[k];
        for (int i = 0; i < 5; i++) if (swaps(h[k], x[k], MODS[i])) n_swap++;
      end
      exp_q.push_back(wrap_range(acc));
      wrap_q.push_back(acc > HALF || acc < -HALF);
      t_q.push_back(cycle);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_stall = 0; n_wrap = 0; n_exact = 0;
    n_neg = 0; n_swap = 0; n_reload = 0; done = 1'b0; cycle = 0;
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_in = '0;
    in_valid = 1'b0; in_data = '0;
    for (int k = 0; k < int'(TAPS); k++) begin h[k] = 0; x[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_coefs(10);
    run_samples(100);
    load_coefs(HALF);
    run_samples(HALF);
    load_coefs(300);
    run_samples(300);
    repeat (TAPS + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("rns_fir: %0d results missing", exp_q.size());
    end
    done = 1'b1;
  end
endmodule
