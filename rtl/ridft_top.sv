// ridft_top -- N-point input-decimation recursive inverse DFT (N = 64, M = 4).
//
// Computes x_n = (1/N) * sum_{k=0}^{N-1} X_k * exp(+j*2*pi*k*n/N) for the
// frequency-domain tones X_k (e.g. the subcarrier decision errors of an OFDM
// receiver) without storing the input:
//   1. four pre-processors fold the N tones into 4 x N/4 aggregated tones
//      F_{p,k} (p = n mod 4) as the tones stream in;
//   2. the SEL multiplexer writes them into the N-word decimation buffer;
//   3. one second-order recursive filter, with a single shared twiddle
//      multiplier, runs N/4+1 cycles per run and yields x_n and x_{N-n}
//      together for even n (F_{N-n,k} = F_{n,k}), one output otherwise;
//   4. the output stage applies W_4^{-n}, W_4^{-(N-n)} (+-1, +-j).
//
// Interface: tones enter with in_valid/in_ready, one per cycle, in decimated
// order (X_k, X_{k+16}, X_{k+32}, X_{k+48} for k = 0..15 when N = 64),
// 13-bit real and imaginary parts. Outputs leave on two ports, a (x_n) and
// b (x_{N-n}), each with valid and sample index, 14-bit parts; both fire in
// the same cycle for a symmetric pair. num_runs chooses full output (0 or 49:
// all 64 samples, 897 cycles from first tone to last sample) or partial
// output (4 runs: x_2, x_62, x_4, x_60, x_6, x_58, x_8, x_56 in 132 cycles).
// done pulses with the last samples of a frame; in_ready is low from the last
// tone of a frame until then.
module ridft_top
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = $clog2(N),
  parameter int NR = 3 * N / 4 + 1,
  parameter int RW = $clog2(NR + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cplx_in_t      in_tone,
  input  logic [RW-1:0] num_runs,
  output logic          xa_valid,
  output logic [IW-1:0] xa_idx,
  output cplx_out_t     xa,
  output logic          xb_valid,
  output logic [IW-1:0] xb_idx,
  output cplx_out_t     xb,
  output logic          busy,
  output logic          done
);

  logic          pp_valid;
  logic [1:0]    pp_m;
  logic [3:0]    pp_fvalid;
  cplx_buf_t     pp_f [4];
  logic          buf_we;
  logic [1:0]    buf_sel;
  logic [IW-1:0] buf_waddr, buf_raddr;
  cplx_buf_t     buf_wdata, buf_rdata;
  logic          flt_load, flt_first, flt_fin;
  logic [IW-1:0] flt_n;
  run_mode_t     flt_mode;
  logic          ab_valid;
  cplx_int_t     ab_a, ab_b;
  logic [IW-1:0] ab_n;
  run_mode_t     ab_mode;

  ridft_controller #(.N(N), .IW(IW), .NR(NR), .RW(RW)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .num_runs,
    .pp_valid, .pp_m,
    .pp_fvalid (pp_fvalid[0]),
    .buf_we, .buf_sel, .buf_waddr, .buf_raddr,
    .flt_load, .flt_first, .flt_fin, .flt_n, .flt_mode,
    .busy, .done
  );

  for (genvar p = 0; p < 4; p++) begin : g_pp
    ridft_pre_processor #(.P(p)) u_pp (
      .clk, .rst_n,
      .in_valid (pp_valid),
      .m        (pp_m),
      .x        (in_tone),
      .f_valid  (pp_fvalid[p]),
      .f        (pp_f[p])
    );
  end

  // SEL multiplexer in front of the decimation buffer
  assign buf_wdata = pp_f[buf_sel];

  ridft_decim_buffer #(.N(N), .AW(IW)) u_buf (
    .clk,
    .we    (buf_we),
    .waddr (buf_waddr),
    .wdata (buf_wdata),
    .raddr (buf_raddr),
    .rdata (buf_rdata)
  );

  ridft_recursive_filter #(.N(N), .IW(IW)) u_flt (
    .clk, .rst_n,
    .f        (buf_rdata),
    .load     (flt_load),
    .first    (flt_first),
    .fin      (flt_fin),
    .n        (flt_n),
    .mode     (flt_mode),
    .ab_valid (ab_valid),
    .a        (ab_a),
    .b        (ab_b),
    .out_n    (ab_n),
    .out_mode (ab_mode)
  );

  ridft_output_stage #(.N(N), .IW(IW)) u_out (
    .clk, .rst_n,
    .in_valid (ab_valid),
    .a        (ab_a),
    .b        (ab_b),
    .n        (ab_n),
    .mode     (ab_mode),
    .xa_valid, .xa_idx, .xa,
    .xb_valid, .xb_idx, .xb
  );

endmodule
