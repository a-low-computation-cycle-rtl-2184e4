// tb_ridft_recursive_filter -- self-checking test of the shared Goertzel
// filter.
//
// Runs of N/4 random full-scale aggregated tones are fed for random
// coefficient indices n = 0..N/2 and random run modes, sometimes back to back
// (the sine product then shares the first cycle of the next run) and
// sometimes with idle cycles in between. For each run the testbench computes
// in floating point
//   S_lo = sum_k (F_k/4) * W_N^{ n(L-k)},  S_hi = sum_k (F_k/4) * W_N^{-n(L-k)}
// with W_N = exp(-j*2*pi/N), L = N/4, and checks A - jB against S_lo and
// A + jB against S_hi, and that ab_valid comes exactly one cycle after fin
// with the run's n and mode. The tolerance (40 LSB on values up to about
// 46000) covers the floor operations and the coefficient rounding.
module tb_ridft_recursive_filter;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);
  localparam int L  = N / 4;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 40.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  cplx_buf_t f = '0;
  logic load = 1'b0, first = 1'b0, fin = 1'b0;
  logic [IW-1:0] n = '0;
  run_mode_t mode = RUN_LO;
  logic ab_valid;
  cplx_int_t a, b;
  logic [IW-1:0] out_n;
  run_mode_t out_mode;
  int checks = 0, failures = 0;
  real max_err = 0.0;
  int back_to_back = 0;

  always #5 clk = ~clk;

  ridft_recursive_filter dut (
    .clk, .rst_n, .f, .load, .first, .fin, .n, .mode,
    .ab_valid, .a, .b, .out_n, .out_mode);

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // expected results of the run in flight
  real lo_r, lo_i, hi_r, hi_i;
  real x_lo_r, x_lo_i, x_hi_r, x_hi_i;
  int  exp_n;
  run_mode_t exp_mode;
  bit  pending = 0;

  task automatic cmp(input string what, input real got, input real expv);
    real e;
    e = fabs(got - expv);
    if (e > max_err) max_err = e;
    checks++;
    if (e > TOL) begin
      failures++;
      $display("FAIL n=%0d %s got %f exp %f", exp_n, what, got, expv);
    end
  endtask

  // checker: runs in the cycle after fin
  always @(negedge clk) if (rst_n) begin
    if (pending) begin
      int ar, ai, br, bi;
      pending = 0;
      checks++;
      if (!ab_valid || int'(out_n) != exp_n || out_mode != exp_mode) begin
        failures++;
        $display("FAIL ab_valid/tag: valid=%0b n=%0d exp %0d", ab_valid, out_n, exp_n);
      end
      ar = int'(a.re); ai = int'(a.im); br = int'(b.re); bi = int'(b.im);
      cmp("lo.re", real'(ar + bi), x_lo_r);
      cmp("lo.im", real'(ai - br), x_lo_i);
      cmp("hi.re", real'(ar - bi), x_hi_r);
      cmp("hi.im", real'(ai + br), x_hi_i);
    end else begin
      checks++;
      if (ab_valid) begin
        failures++;
        $display("FAIL unexpected ab_valid");
      end
    end
  end

  task automatic do_run(input int nn, input bit full_scale);
    int fr [L], fi [L];
    real ph;
    lo_r = 0.0; lo_i = 0.0; hi_r = 0.0; hi_i = 0.0;
    for (int k = 0; k < L; k++) begin
      if (full_scale) begin
        fr[k] = 8191; fi[k] = -8192;
      end else begin
        fr[k] = int'($urandom_range(16383)) - 8192;
        fi[k] = int'($urandom_range(16383)) - 8192;
      end
      // W_N^{n(L-k)} = cos(ph) - j sin(ph)
      ph = 2.0 * PI * nn * (L - k) / N;
      lo_r += (fr[k] * $cos(ph) + fi[k] * $sin(ph)) / 4.0;
      lo_i += (fi[k] * $cos(ph) - fr[k] * $sin(ph)) / 4.0;
      hi_r += (fr[k] * $cos(ph) - fi[k] * $sin(ph)) / 4.0;
      hi_i += (fi[k] * $cos(ph) + fr[k] * $sin(ph)) / 4.0;
    end
    for (int k = 0; k < L; k++) begin
      load <= 1'b1; first <= (k == 0); fin <= 1'b0;
      n <= IW'(nn);
      f.re <= W_BUF'(fr[k]); f.im <= W_BUF'(fi[k]);
      @(posedge clk);
    end
    load <= 1'b0; first <= 1'b0; fin <= 1'b1;
    mode <= run_mode_t'($urandom_range(2));
    @(posedge clk);
    exp_n = nn;
    exp_mode = mode;
    x_lo_r = lo_r; x_lo_i = lo_i; x_hi_r = hi_r; x_hi_i = hi_i;
    pending = 1;
    fin <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int nn = 0; nn <= N / 2; nn++) do_run(nn, 1'b1);
    for (int i = 0; i < 400; i++) begin
      do_run(int'($urandom_range(N / 2)), 1'b0);
      if ($urandom_range(1) == 0) begin
        repeat ($urandom_range(3) + 1) @(posedge clk);
      end else begin
        back_to_back++;
      end
    end
    repeat (3) @(posedge clk);
    $display("max error %f LSB, back-to-back runs %0d", max_err, back_to_back);
    checks++;
    if (back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
