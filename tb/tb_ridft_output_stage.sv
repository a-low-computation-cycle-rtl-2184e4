// tb_ridft_output_stage -- self-checking test of the output twiddles.
//
// Random A and B values with random n and run mode are applied; the
// testbench forms x_n = j^n (A - jB) and x_{N-n} = j^{N-n} (A + jB) with a
// general complex integer product (quarter-turn table), rounds them as
// floor((x + 4) / 8) and checks ports a and b one cycle later, including
// which port fires for each run mode and the sample indices.
module tb_ridft_output_stage;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_int_t a = '0, b = '0;
  logic [IW-1:0] n = '0;
  run_mode_t mode = RUN_LO;
  logic xa_valid, xb_valid;
  logic [IW-1:0] xa_idx, xb_idx;
  cplx_out_t xa, xb;
  int checks = 0, failures = 0;

  localparam int CR [4] = '{1, 0, -1, 0};
  localparam int CI [4] = '{0, 1, 0, -1};

  always #5 clk = ~clk;

  ridft_output_stage dut (
    .clk, .rst_n, .in_valid, .a, .b, .n, .mode,
    .xa_valid, .xa_idx, .xa, .xb_valid, .xb_idx, .xb);

  function automatic int rnd8(int x);
    return int'($floor((real'(x) + 4.0) / 8.0));
  endfunction

  // (pr + j pi) = (xr + j xi) * j^q
  task automatic cmul(input int xr, input int xi, input int q, output int pr, output int pi);
    pr = xr * CR[q % 4] - xi * CI[q % 4];
    pi = xr * CI[q % 4] + xi * CR[q % 4];
  endtask

  initial begin
    int ar, ai, br, bi, nn, lr, li, hr, hi, tr, ti;
    run_mode_t md;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      ar = int'($urandom_range(65535)) - 32768;
      ai = int'($urandom_range(65535)) - 32768;
      br = int'($urandom_range(65535)) - 32768;
      bi = int'($urandom_range(65535)) - 32768;
      nn = int'($urandom_range(N / 2));
      md = run_mode_t'($urandom_range(2));
      // A - jB = A + B*(-j) ; A + jB = A + B*j
      cmul(br, bi, 3, tr, ti); lr = ar + tr; li = ai + ti;
      cmul(br, bi, 1, tr, ti); hr = ar + tr; hi = ai + ti;
      cmul(lr, li, nn, lr, li);
      cmul(hr, hi, N - nn, hr, hi);
      @(negedge clk);
      in_valid = 1'b1;
      a.re = W_INT'(ar); a.im = W_INT'(ai); b.re = W_INT'(br); b.im = W_INT'(bi);
      n = IW'(nn); mode = md;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (xa_valid != (md != RUN_HI) || xb_valid != (md != RUN_LO)) begin
        failures++;
        $display("FAIL valid mode=%0d a=%0b b=%0b", md, xa_valid, xb_valid);
      end
      if (md != RUN_HI) begin
        checks++;
        if (int'(xa_idx) != nn || int'(xa.re) != rnd8(lr) || int'(xa.im) != rnd8(li)) begin
          failures++;
          $display("FAIL x_%0d got (%0d,%0d) exp (%0d,%0d)", nn, int'(xa.re), int'(xa.im), rnd8(lr), rnd8(li));
        end
      end
      if (md != RUN_LO) begin
        checks++;
        if (int'(xb_idx) != (N - nn) % N || int'(xb.re) != rnd8(hr) || int'(xb.im) != rnd8(hi)) begin
          failures++;
          $display("FAIL x_%0d got (%0d,%0d) exp (%0d,%0d)", N - nn, int'(xb.re), int'(xb.im), rnd8(hr), rnd8(hi));
        end
      end
      @(negedge clk);
      checks++;
      if (xa_valid || xb_valid) begin
        failures++;
        $display("FAIL valid held too long");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
