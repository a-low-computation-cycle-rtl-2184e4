// ridft_pkg -- shared constants, types and constant functions of the
// input-decimation RIDFT.
//
// The transform is x_n = sum_k X_k * W_N^{-kn}, W_N = exp(-j*2*pi/N), computed
// with decimation by M = 4: four "aggregated tones" F_{p,k} (p = n mod 4,
// k = 0..N/4-1) feed one second-order recursive filter per output run.
//
// Wordlengths are those of the published design: 13-bit input,
// 14-bit aggregated tones in the decimation buffer, 19-bit recursive-filter
// state and 14-bit output, each for the real and for the imaginary part.
// The twiddle coefficient format (18-bit signed, 16 fraction bits) and the
// scaling between the stages are this design's own choices: the pre-processor
// halves, the filter input is divided by 4 and the output stage divides by 8,
// so the result carries the 1/64 = 1/N normalisation of an inverse DFT.
//
// run_sched() fixes the order of the 3N/4+1 filter runs: first the N/4-1
// symmetric pairs (x_n, x_{N-n} for even n), then x_0 and x_{N/2}, then the
// odd n one output at a time. The first four runs therefore give the eight
// partial outputs used for fast weight updating.
package ridft_pkg;

  localparam int N_DEF  = 64;  // IDFT points
  localparam int M_DEC  = 4;   // decimation factor
  localparam int W_IN   = 13;  // input word, per real/imag part
  localparam int W_BUF  = 14;  // aggregated tone / decimation-buffer word
  localparam int W_INT  = 19;  // recursive-filter internal word
  localparam int W_OUT  = 14;  // output word
  localparam int W_COEF = 18;  // twiddle constant, signed
  localparam int C_FRAC = 16;  // fraction bits of the twiddle constant

  localparam int PRE_SHIFT = 1; // pre-processor output = sum >>> 1
  localparam int FLT_SHIFT = 2; // filter input = F >>> 2
  localparam int OUT_SHIFT = 3; // output = round(x >>> 3)

  typedef struct packed {
    logic signed [W_IN-1:0] re;
    logic signed [W_IN-1:0] im;
  } cplx_in_t;

  typedef struct packed {
    logic signed [W_BUF-1:0] re;
    logic signed [W_BUF-1:0] im;
  } cplx_buf_t;

  typedef struct packed {
    logic signed [W_INT-1:0] re;
    logic signed [W_INT-1:0] im;
  } cplx_int_t;

  typedef struct packed {
    logic signed [W_OUT-1:0] re;
    logic signed [W_OUT-1:0] im;
  } cplx_out_t;

  // Which outputs a filter run produces.
  //   RUN_LO   : x_n only           (n = 0, N/2, and odd n)
  //   RUN_HI   : x_{N-n} only       (odd n, aggregated tones of group (N-n) mod 4)
  //   RUN_PAIR : x_n and x_{N-n}    (even n, F_{N-n,k} = F_{n,k})
  typedef enum logic [1:0] {
    RUN_LO   = 2'd0,
    RUN_HI   = 2'd1,
    RUN_PAIR = 2'd2
  } run_mode_t;

  typedef struct packed {
    logic [15:0] n;    // coefficient index, 0..N/2
    logic [1:0]  grp;  // aggregated-tone group read from the buffer
    run_mode_t   mode;
  } run_t;

  // Number of filter runs for all N outputs: 3N/4 + 1.
  function automatic int runs_total(int n_pt);
    return 3 * n_pt / 4 + 1;
  endfunction

  // Schedule of filter run r for an n_pt-point transform.
  function automatic run_t run_sched(int n_pt, int r);
    run_t s;
    int   pairs;
    int   j;
    int   n;
    pairs = n_pt / 4 - 1;
    if (r < pairs) begin
      n      = 2 * (r + 1);
      s.n    = 16'(n);
      s.grp  = 2'(n % 4);
      s.mode = RUN_PAIR;
    end else if (r == pairs) begin
      s.n    = 16'd0;
      s.grp  = 2'd0;
      s.mode = RUN_LO;
    end else if (r == pairs + 1) begin
      s.n    = 16'(n_pt / 2);
      s.grp  = 2'((n_pt / 2) % 4);
      s.mode = RUN_LO;
    end else begin
      j = r - pairs - 2;
      n = 2 * (j / 2) + 1;
      s.n = 16'(n);
      if (j % 2 == 0) begin
        s.grp  = 2'(n % 4);
        s.mode = RUN_LO;
      end else begin
        s.grp  = 2'((n_pt - n) % 4);
        s.mode = RUN_HI;
      end
    end
    return s;
  endfunction

  // Hard-wired twiddle constants in Q2.16: round(cos/sin(2*pi*n/N) * 2^16).
  function automatic logic signed [W_COEF-1:0] twf_cos(int n_pt, int n);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * real'(n) / real'(n_pt)) * real'(1 << C_FRAC);
    return W_COEF'($rtoi(v + ((v < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic logic signed [W_COEF-1:0] twf_sin(int n_pt, int n);
    real v;
    v = $sin(2.0 * 3.14159265358979323846 * real'(n) / real'(n_pt)) * real'(1 << C_FRAC);
    return W_COEF'($rtoi(v + ((v < 0.0) ? -0.5 : 0.5)));
  endfunction

  // Multiply a complex value by j^q (q = 0..3): no multiplier, only swaps
  // and negations.
  function automatic cplx_int_t rot_j(cplx_int_t a, logic [1:0] q);
    cplx_int_t r;
    unique case (q)
      2'd0: begin r.re =  a.re; r.im =  a.im; end
      2'd1: begin r.re = -a.im; r.im =  a.re; end
      2'd2: begin r.re = -a.re; r.im = -a.im; end
      default: begin r.re =  a.im; r.im = -a.re; end
    endcase
    return r;
  endfunction

endpackage
