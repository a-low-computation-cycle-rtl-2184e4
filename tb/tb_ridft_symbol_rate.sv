// tb_ridft_symbol_rate -- beamforming-tracking workload at OFDM symbol rate.
//
// A new 64-tone frame starts every 144 clock cycles, which is one 3.6 us
// OFDM symbol (short guard interval) at a 40 MHz clock. The design runs in
// eight-sample mode (num_runs = 4). For each of 20 symbols the testbench
// checks that
//   * every tone is accepted in the cycle it is offered (no back-pressure);
//   * the eight samples x_2, x_62, x_4, x_60, x_6, x_58, x_8, x_56 arrive,
//     each once, within 3 LSB of a floating-point IDFT;
//   * done comes 132 cycles after the first tone, before the next symbol.
module tb_ridft_symbol_rate;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);
  localparam int NR = 3 * N / 4 + 1;
  localparam int RW = $clog2(NR + 1);
  localparam int SYMBOL = 144;
  localparam int NSYM = 20;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 3.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  cplx_in_t in_tone = '0;
  logic [RW-1:0] num_runs = RW'(4);
  logic xa_valid, xb_valid;
  logic [IW-1:0] xa_idx, xb_idx;
  cplx_out_t xa, xb;
  logic busy, done;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  ridft_top dut (.*);

  int  xr [N], xi [N];
  real rr [N], ri [N];
  int  got [N];
  int  t_start, t_done;

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  task automatic sample(input int idx, input int gr, input int gi);
    checks++;
    got[idx]++;
    if (fabs(real'(gr) - rr[idx]) > TOL || fabs(real'(gi) - ri[idx]) > TOL)
      fail($sformatf("x_%0d got (%0d,%0d) exp (%f,%f)", idx, gr, gi, rr[idx], ri[idx]));
  endtask

  always @(negedge clk) if (rst_n) begin
    if (xa_valid) sample(int'(xa_idx), int'(xa.re), int'(xa.im));
    if (xb_valid) sample(int'(xb_idx), int'(xb.re), int'(xb.im));
    if (in_valid) begin
      checks++;
      if (!in_ready) fail("tone refused at symbol rate");
    end
    if (done) t_done = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N; k++) begin
        xr[k] = int'($urandom_range(8191)) - 4096;
        xi[k] = int'($urandom_range(8191)) - 4096;
        got[k] = 0;
      end
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
      t_done = -1;
      @(negedge clk);
      t_start = cyc;
      for (int i = 0; i < N; i++) begin
        int idx;
        idx = (i / 4) + (N / 4) * (i % 4);
        in_valid   = 1'b1;
        in_tone.re = W_IN'(xr[idx]);
        in_tone.im = W_IN'(xi[idx]);
        @(negedge clk);
      end
      in_valid = 1'b0;
      while (cyc < t_start + SYMBOL - 1) @(negedge clk);
      #1;
      checks++;
      if (t_done - t_start != 132)
        fail($sformatf("symbol %0d: done after %0d cycles, expected 132", s, t_done - t_start));
      for (int n = 0; n < N; n++) begin
        bit want;
        want = (n == 2 || n == 62 || n == 4 || n == 60 || n == 6 || n == 58 || n == 8 || n == 56);
        checks++;
        if (got[n] != int'(want)) fail($sformatf("symbol %0d: x_%0d delivered %0d times", s, n, got[n]));
      end
    end
    $display("%0d symbols of %0d cycles processed", NSYM, SYMBOL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * SYMBOL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
