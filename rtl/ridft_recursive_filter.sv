// ridft_recursive_filter -- second-order recursive (Goertzel) filter shared
// by x_n and x_{N-n}.
//
// For one run with coefficient index n (c = cos(2*pi*n/N), s = sin(2*pi*n/N))
// and aggregated tones F_0..F_{L-1}, L = N/4, it iterates
//   v_k = F_k/4 + 2*c*v_{k-1} - v_{k-2},   v_{-1} = v_{-2} = 0
// and then forms
//   A = c*v_{L-1} - v_{L-2},   B = s*v_{L-1}
// so that S_n = W_N^n v - v' = A - jB and S_{N-n} = W_N^{-n} v - v' = A + jB.
// The feedback path (2*c*v, the "<<1" of the published block diagram) is shared by
// both outputs; the feed-forward cos term reuses the same multiplication.
//
// One multiplier (ridft_twf_mult) serves everything: c*v_{k-1} during the
// L tone cycles, c*v_{L-1} in the extra cycle "fin", and s*v_{L-1} in the
// cycle after fin. That last cycle is the first cycle of the next run, whose
// multiplication is not needed because its feedback is zero, so a run costs
// L+1 = N/4+1 cycles. How the multiplier is time-shared is this design's
// choice; the published design states only that one multiplier serves both terms.
//
// Command timing (driven by the controller), one run:
//   cycle 0      : load=1 first=1   v_1 <= F_0/4, v_2 <= 0
//   cycle 1..L-1 : load=1           v update
//   cycle L      : fin=1            A registered; n and mode kept for B
//   next cycle   : (anything but load without first) B = s*v_{L-1}; ab_valid=1
// a, b, out_n and out_mode are valid while ab_valid is high (combinational
// B, registered A). Internal arithmetic wraps modulo 2^19; with the input
// scaling above the state cannot overflow except for n = 0 and n = N/2,
// where c = +-1 is exact and the wrap cancels in A.
module ridft_recursive_filter
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cplx_buf_t     f,        // aggregated tone for this cycle
  input  logic          load,
  input  logic          first,
  input  logic          fin,
  input  logic [IW-1:0] n,        // coefficient index of the current run
  input  run_mode_t     mode,     // sampled with fin, returned with A/B
  output logic          ab_valid,
  output cplx_int_t     a,
  output cplx_int_t     b,
  output logic [IW-1:0] out_n,
  output run_mode_t     out_mode
);

  cplx_int_t     v1, v2;        // v_{k-1}, v_{k-2}
  cplx_int_t     prod;          // multiplier output
  cplx_int_t     fx;            // F / 4, sign-extended
  cplx_int_t     vnew;
  cplx_int_t     a_q;
  logic          sin_pend;
  logic [IW-1:0] n_pend;
  run_mode_t     mode_pend;

  ridft_twf_mult #(.N(N), .IW(IW)) u_mult (
    .v       (v1),
    .idx     (sin_pend ? n_pend : n),
    .sel_sin (sin_pend),
    .p       (prod)
  );

  always_comb begin
    fx.re = W_INT'(f.re) >>> FLT_SHIFT;
    fx.im = W_INT'(f.im) >>> FLT_SHIFT;
    if (first) begin
      vnew = fx;
    end else begin
      vnew.re = fx.re + (prod.re <<< 1) - v2.re;
      vnew.im = fx.im + (prod.im <<< 1) - v2.im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= '0;
      v2        <= '0;
      a_q       <= '0;
      sin_pend  <= 1'b0;
      n_pend    <= '0;
      mode_pend <= RUN_LO;
    end else begin
      sin_pend <= fin;
      if (load) begin
        v1 <= vnew;
        v2 <= first ? '0 : v1;
      end
      if (fin) begin
        a_q.re    <= prod.re - v2.re;
        a_q.im    <= prod.im - v2.im;
        n_pend    <= n;
        mode_pend <= mode;
      end
    end
  end

  assign ab_valid = sin_pend;
  assign a        = a_q;
  assign b        = prod;
  assign out_n    = n_pend;
  assign out_mode = mode_pend;

  // The sine slot borrows the multiplier: it may only coincide with an idle
  // cycle or with the first cycle of a run.
  a_mult_shared : assert property (@(posedge clk) disable iff (!rst_n)
    sin_pend |-> !(load && !first) && !fin);
  a_fin_alone : assert property (@(posedge clk) disable iff (!rst_n)
    fin |-> !load);

endmodule
