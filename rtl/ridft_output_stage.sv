// ridft_output_stage -- output twiddles W_4^{-n} and W_4^{-(N-n)}.
//
// From the filter results A and B of one run it forms
//   x_n     = j^{n mod 4}     * (A - jB)
//   x_{N-n} = j^{(N-n) mod 4} * (A + jB)
// Both factors are +-1 or +-j, so the stage holds no multiplier: only
// additions, swaps and negations. Each result is scaled to the 14-bit output
// word by rounding (x + 4) >>> 3; together with the earlier stages this gives
// x_n = (1/N) * sum_k X_k W_N^{-kn} for N = 64 (scaling is this design's
// choice).
//
// Run mode selects which port fires: RUN_LO -> port a (x_n), RUN_HI -> port b
// (x_{N-n}), RUN_PAIR -> both in the same cycle. Outputs are registered: they
// appear one cycle after in_valid, with their sample index.
module ridft_output_stage
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_int_t     a,
  input  cplx_int_t     b,
  input  logic [IW-1:0] n,
  input  run_mode_t     mode,
  output logic          xa_valid,
  output logic [IW-1:0] xa_idx,
  output cplx_out_t     xa,
  output logic          xb_valid,
  output logic [IW-1:0] xb_idx,
  output cplx_out_t     xb
);

  cplx_int_t     lo, hi, lo_r, hi_r;
  logic [IW-1:0] n_hi;

  function automatic logic signed [W_OUT-1:0] scale(logic signed [W_INT-1:0] x);
    logic signed [W_INT:0] t;
    t = (W_INT+1)'(x) + (W_INT+1)'(1 <<< (OUT_SHIFT - 1));
    return W_OUT'(t >>> OUT_SHIFT);
  endfunction

  always_comb begin
    lo.re = a.re + b.im;
    lo.im = a.im - b.re;
    hi.re = a.re - b.im;
    hi.im = a.im + b.re;
    n_hi  = IW'(N) - n;
    lo_r  = rot_j(lo, n[1:0]);
    hi_r  = rot_j(hi, n_hi[1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xa_valid <= 1'b0;
      xb_valid <= 1'b0;
      xa_idx   <= '0;
      xb_idx   <= '0;
      xa       <= '0;
      xb       <= '0;
    end else begin
      xa_valid <= in_valid && (mode != RUN_HI);
      xb_valid <= in_valid && (mode != RUN_LO);
      if (in_valid) begin
        xa_idx <= n;
        xb_idx <= n_hi;
        xa.re  <= scale(lo_r.re);
        xa.im  <= scale(lo_r.im);
        xb.re  <= scale(hi_r.re);
        xb.im  <= scale(hi_r.im);
      end
    end
  end

endmodule
