// ridft_twf_mult -- the one multiplier of the recursive filter.
//
// p = c * v, with c = cos(2*pi*idx/N) when sel_sin = 0 and
// c = sin(2*pi*idx/N) when sel_sin = 1, idx = 0..N/2, for both the real and
// the imaginary part of v. The constants are hard-wired: they are computed
// at elaboration (Q2.16, rounded) into two small constant tables, so no
// coefficient memory exists and synthesis sees a multiplier whose second
// operand comes from fixed constants. The published design uses a constant
// multiplier merged with the twiddle factors; this table-plus-multiplier
// form is the simplest equivalent and is this design's choice.
//
// Purely combinational. The product is rounded (half up) by C_FRAC bits back
// to the 19-bit filter word; |c| <= 1, so the result fits whenever v does.
module ridft_twf_mult
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = $clog2(N)
) (
  input  cplx_int_t     v,
  input  logic [IW-1:0] idx,
  input  logic          sel_sin,
  output cplx_int_t     p
);

  localparam int NC = N / 2 + 1;
  localparam int WP = W_INT + W_COEF;
  localparam logic signed [WP-1:0] HALF = WP'(1) <<< (C_FRAC - 1);

  typedef logic signed [W_COEF-1:0] coef_tab_t [NC];

  function automatic coef_tab_t make_tab(bit use_sin);
    coef_tab_t t;
    for (int i = 0; i < NC; i++)
      t[i] = use_sin ? twf_sin(N, i) : twf_cos(N, i);
    return t;
  endfunction

  localparam coef_tab_t COS_TAB = make_tab(1'b0);
  localparam coef_tab_t SIN_TAB = make_tab(1'b1);

  logic signed [W_COEF-1:0] c;
  logic signed [WP-1:0]     pr, pi;

  always_comb begin
    c = '0;
    if (int'(idx) < NC) c = sel_sin ? SIN_TAB[idx] : COS_TAB[idx];
    pr = WP'(v.re) * WP'(c);
    pi = WP'(v.im) * WP'(c);
    p.re = W_INT'((pr + HALF) >>> C_FRAC);
    p.im = W_INT'((pi + HALF) >>> C_FRAC);
  end

endmodule
