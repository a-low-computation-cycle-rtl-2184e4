// tb_ridft_top -- end-to-end test of the 64-point input-decimation RIDFT at
// its default parameters.
//
// Each frame draws 64 complex tones, sends them in decimated order
// (X_k, X_{k+16}, X_{k+32}, X_{k+48}, k = 0..15) and collects the samples
// from both output ports. The reference is a direct floating-point inverse
// DFT, x_n = (1/64) sum_k X_k exp(+j*2*pi*k*n/64); every sample must agree
// within 3 LSB of the 14-bit output, arrive exactly once and with the right
// index. Frames cover:
//   * full output (49 runs) with back-to-back tones: 897 cycles from the
//     first tone to the last sample;
//   * eight partial outputs (4 runs): 132 cycles, samples 2,62,4,60,6,58,8,56;
//   * tones with idle cycles in between (input stalls);
//   * a tone offered while the design is busy (in_ready back-pressure);
//   * full-scale tones (largest filter states, wrap-around for n = 0, 32);
//   * single-tone and impulse inputs.
// The testbench counts each mechanism (symmetric pairs on both ports in one
// cycle, single-output runs on either port, partial and full frames, stalls,
// back-pressure) and fails if one never happened.
module tb_ridft_top;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);
  localparam int NR = 3 * N / 4 + 1;
  localparam int RW = $clog2(NR + 1);
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  cplx_in_t in_tone = '0;
  logic [RW-1:0] num_runs = '0;
  logic xa_valid, xb_valid;
  logic [IW-1:0] xa_idx, xb_idx;
  cplx_out_t xa, xb;
  logic busy, done;

  int checks = 0, failures = 0;
  int cyc = 0;
  real max_err = 0.0;

  // mechanism counters
  int n_pair = 0, n_lo_only = 0, n_hi_only = 0;
  int n_full = 0, n_partial = 0, n_stall = 0, n_backpressure = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  ridft_top dut (.*);

  int  xr [N], xi [N];
  real rr [N], ri [N];
  int  got [N];
  int  t_first;
  bit  offer_early;

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  task automatic reference();
    for (int n = 0; n < N; n++) begin
      rr[n] = 0.0; ri[n] = 0.0;
      for (int k = 0; k < N; k++) begin
        real ph;
        ph = 2.0 * PI * real'((k * n) % N) / real'(N);
        rr[n] += real'(xr[k]) * $cos(ph) - real'(xi[k]) * $sin(ph);
        ri[n] += real'(xr[k]) * $sin(ph) + real'(xi[k]) * $cos(ph);
      end
      rr[n] /= real'(N);
      ri[n] /= real'(N);
    end
  endtask

  task automatic check_sample(input int idx, input int gr, input int gi);
    real er, ei;
    checks++;
    got[idx]++;
    er = fabs(real'(gr) - rr[idx]);
    ei = fabs(real'(gi) - ri[idx]);
    if (er > max_err) max_err = er;
    if (ei > max_err) max_err = ei;
    if (er > TOL || ei > TOL)
      fail($sformatf("x_%0d got (%0d,%0d) exp (%f,%f)", idx, gr, gi, rr[idx], ri[idx]));
  endtask

  always @(negedge clk) if (rst_n) begin
    if (xa_valid) check_sample(int'(xa_idx), int'(xa.re), int'(xa.im));
    if (xb_valid) check_sample(int'(xb_idx), int'(xb.re), int'(xb.im));
    if (xa_valid && xb_valid) n_pair++;
    if (xa_valid && !xb_valid) n_lo_only++;
    if (xb_valid && !xa_valid) n_hi_only++;
    if (in_valid && !in_ready) n_backpressure++;
    if (in_valid && in_ready && t_first < 0) t_first = cyc;
  end

  // kind: 0 random, 1 full scale, 2 single tone, 3 impulse (all tones equal)
  task automatic make_tones(input int kind);
    int t;
    t = int'($urandom_range(N - 1));
    for (int k = 0; k < N; k++) begin
      case (kind)
        1: begin xr[k] = (k % 3 == 0) ? -4096 : 4095; xi[k] = (k % 5 == 0) ? 4095 : -4096; end
        2: begin xr[k] = (k == t) ? 4000 : 0; xi[k] = (k == t) ? -3000 : 0; end
        3: begin xr[k] = 1234; xi[k] = -567; end
        default: begin
          xr[k] = int'($urandom_range(8191)) - 4096;
          xi[k] = int'($urandom_range(8191)) - 4096;
        end
      endcase
    end
  endtask

  task automatic frame(input int kind, input int nr, input bit gaps);
    int exp_runs, lat;
    make_tones(kind);
    reference();
    for (int i = 0; i < N; i++) got[i] = 0;
    num_runs <= RW'(nr);
    t_first = -1;
    for (int i = 0; i < N; i++) begin
      int idx;
      idx = (i / 4) + (N / 4) * (i % 4);
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        n_stall++;
        @(posedge clk);
      end
      in_valid   <= 1'b1;
      in_tone.re <= W_IN'(xr[idx]);
      in_tone.im <= W_IN'(xi[idx]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    if (offer_early) begin
      // keep offering a tone for a while during the transform: it must be
      // refused (a wrongly accepted tone would corrupt the next frame)
      in_tone.re <= W_IN'(xr[0]);
      in_tone.im <= W_IN'(xi[0]);
      repeat (100) @(posedge clk);
    end
    in_valid <= 1'b0;
    @(negedge clk);
    while (!done) @(negedge clk);
    #1;
    lat = cyc - t_first;
    exp_runs = (nr == 0 || nr > NR) ? NR : nr;
    if (!gaps) begin
      checks++;
      if (lat != N + 17 * exp_runs)
        fail($sformatf("frame took %0d cycles, expected %0d", lat, N + 17 * exp_runs));
    end
    for (int n = 0; n < N; n++) begin
      bit want;
      if (exp_runs == NR) want = 1;
      else if (exp_runs == 4) want = (n == 2 || n == 62 || n == 4 || n == 60 ||
                                      n == 6 || n == 58 || n == 8 || n == 56);
      else want = got[n] > 0;
      checks++;
      if (got[n] != int'(want)) fail($sformatf("x_%0d delivered %0d times", n, got[n]));
    end
    if (exp_runs == NR) n_full++;
    if (exp_runs == 4) n_partial++;
    $display("frame kind=%0d runs=%0d gaps=%0b: %0d cycles", kind, exp_runs, gaps, lat);
    @(posedge clk);
  endtask

  initial begin
    offer_early = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    frame(0, 0, 1'b0);          // full output
    frame(0, 4, 1'b0);          // eight partial outputs
    frame(1, 0, 1'b0);          // full scale
    frame(2, 0, 1'b0);          // single tone
    frame(3, NR, 1'b0);         // impulse in time (constant tones)
    offer_early = 1;
    frame(0, 0, 1'b1);          // stalls and back-pressure
    offer_early = 0;
    frame(0, 4, 1'b1);
    $display("max error %f LSB", max_err);
    $display("pairs %0d, x_n only %0d, x_{N-n} only %0d, full %0d, partial %0d, stalls %0d, back-pressure %0d",
             n_pair, n_lo_only, n_hi_only, n_full, n_partial, n_stall, n_backpressure);
    checks++; if (n_pair == 0)         fail("no symmetric pair");
    checks++; if (n_lo_only == 0)      fail("no x_n-only run");
    checks++; if (n_hi_only == 0)      fail("no x_{N-n}-only run");
    checks++; if (n_full == 0)         fail("no full-output frame");
    checks++; if (n_partial == 0)      fail("no partial-output frame");
    checks++; if (n_stall == 0)        fail("no input stall");
    checks++; if (n_backpressure == 0) fail("no back-pressure");
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
