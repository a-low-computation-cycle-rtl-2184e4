// tb_ridft_twf_mult -- self-checking test of the shared twiddle multiplier.
//
// For every coefficient index 0..N/2 and both cos and sin selections, random
// complex 19-bit operands are multiplied and compared with the product
// computed here in floating point, c = cos/sin(2*pi*idx/N). The allowed error
// is 1 LSB of rounding plus |v| * 2^-17 for the rounding of the Q2.16
// constant. Exact cases are also
// checked: idx 0 (cos = 1, sin = 0) and idx N/4 (cos = 0, sin = 1).
module tb_ridft_twf_mult;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);
  localparam real PI = 3.14159265358979323846;

  cplx_int_t v = '0, p;
  logic [IW-1:0] idx = '0;
  logic sel_sin = 1'b0;
  int checks = 0, failures = 0;

  ridft_twf_mult dut (.v, .idx, .sel_sin, .p);

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic check(input int vr, input int vi, input int i, input bit s);
    real c, er, ei, tr, ti;
    int  pr, pi;
    v.re = W_INT'(vr); v.im = W_INT'(vi); idx = IW'(i); sel_sin = s;
    #1;
    c  = s ? $sin(2.0 * PI * i / N) : $cos(2.0 * PI * i / N);
    er = c * vr;
    ei = c * vi;
    pr = int'(p.re);
    pi = int'(p.im);
    tr = 1.0 + fabs(real'(vr)) / 131072.0;
    ti = 1.0 + fabs(real'(vi)) / 131072.0;
    checks++;
    if (fabs(real'(pr) - er) > tr || fabs(real'(pi) - ei) > ti) begin
      failures++;
      $display("FAIL idx=%0d sin=%0b v=(%0d,%0d) got (%0d,%0d) exp (%f,%f)",
               i, s, vr, vi, pr, pi, er, ei);
    end
  endtask

  initial begin
    for (int i = 0; i <= N / 2; i++)
      for (int s = 0; s < 2; s++) begin
        check(262143, -262143, i, 1'(s));
        for (int t = 0; t < 40; t++)
          check(int'($urandom_range(524287)) - 262144,
                int'($urandom_range(524287)) - 262144, i, 1'(s));
      end
    // exact values
    v.re = 19'sd12345; v.im = -19'sd777; idx = '0; sel_sin = 1'b0; #1;
    checks++; if (p.re != 19'sd12345 || p.im != -19'sd777) begin failures++; $display("FAIL cos(0)"); end
    sel_sin = 1'b1; #1;
    checks++; if (p.re != 0 || p.im != 0) begin failures++; $display("FAIL sin(0)"); end
    idx = IW'(N / 4); #1;
    checks++; if (p.re != 19'sd12345 || p.im != -19'sd777) begin failures++; $display("FAIL sin(pi/2)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
