// tb_ridft_pre_processor -- self-checking test of the decimation-by-4 kernel.
//
// Four instances (groups P = 0..3) see the same random tone stream, four
// beats per group with random idle cycles in between. The expected aggregated
// tone is computed here with ordinary complex integer arithmetic:
//   F_P = floor( sum_m X_m * (cos(pi/2*m*P) + j sin(pi/2*m*P)) / 2 )
// and compared with each instance's f one cycle after the m = 3 beat.
// Corner cases with full-scale inputs are included.
module tb_ridft_pre_processor;
  import ridft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] m = '0;
  cplx_in_t x = '0;
  logic [3:0] fv;
  cplx_buf_t f [4];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar p = 0; p < 4; p++) begin : g
    ridft_pre_processor #(.P(p)) dut (
      .clk, .rst_n, .in_valid, .m, .x, .f_valid(fv[p]), .f(f[p]));
  end

  // quarter-turn table: j^q = (CR[q], CI[q])
  localparam int CR [4] = '{1, 0, -1, 0};
  localparam int CI [4] = '{0, 1, 0, -1};

  int xr [4], xi [4];
  int er [4], ei [4];

  task automatic run_group(input int mode);
    int sr, si;
    for (int mm = 0; mm < 4; mm++) begin
      if (mode == 1) begin
        xr[mm] = (mm % 2) ? 4095 : -4096; xi[mm] = -4096;
      end else if (mode == 2) begin
        xr[mm] = -4096; xi[mm] = 4095;
      end else begin
        xr[mm] = int'($urandom_range(8191)) - 4096;
        xi[mm] = int'($urandom_range(8191)) - 4096;
      end
    end
    for (int p = 0; p < 4; p++) begin
      sr = 0; si = 0;
      for (int mm = 0; mm < 4; mm++) begin
        sr += xr[mm] * CR[(mm * p) % 4] - xi[mm] * CI[(mm * p) % 4];
        si += xr[mm] * CI[(mm * p) % 4] + xi[mm] * CR[(mm * p) % 4];
      end
      er[p] = sr >>> 1;
      ei[p] = si >>> 1;
    end
    for (int mm = 0; mm < 4; mm++) begin
      // optional idle cycles between beats
      while ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      m        <= 2'(mm);
      x.re     <= W_IN'(xr[mm]);
      x.im     <= W_IN'(xi[mm]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    #1;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (!fv[p] || int'(f[p].re) != er[p] || int'(f[p].im) != ei[p]) begin
        failures++;
        $display("FAIL P=%0d valid=%0b got (%0d,%0d) exp (%0d,%0d)",
                 p, fv[p], f[p].re, f[p].im, er[p], ei[p]);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (fv != 4'b0000) begin
      failures++;
      $display("FAIL f_valid longer than one cycle");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_group(1);
    run_group(2);
    for (int i = 0; i < 300; i++) run_group(0);
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
