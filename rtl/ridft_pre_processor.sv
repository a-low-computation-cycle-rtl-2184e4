// ridft_pre_processor -- one decimation-by-4 kernel (group P = n mod 4).
//
// Forms the aggregated tone
//   F_{P,k} = X_k + X_{k+N/4}*j^P + X_{k+N/2}*(-1)^P + X_{k+3N/4}*(-j)^P
// i.e. the m-th decimated tone (m = 0..3) is rotated by j^{(m*P) mod 4} and
// summed in an accumulator register (the adder with z^-1 feedback of the
// published architecture). The rotations are +-1/+-j, so there is no
// multiplier, only swaps and negations.
//
// Interface: the four tones of one k arrive as consecutive valid beats with
// term index m = 0,1,2,3 (decimated input order, this design's choice).
// On the m = 3 beat the complete sum, halved to the 14-bit buffer word
// (sum >>> 1, floor), is registered into f and f_valid pulses for one cycle
// in the next cycle. f holds its value until the next group completes, so
// the SEL multiplexer can copy it into the buffer over the following cycles.
// The halving makes the 15-bit worst-case sum fit 14 bits without overflow;
// the published design gives the 14-bit width but not the scaling.
module ridft_pre_processor
  import ridft_pkg::*;
#(
  parameter int P = 0   // group index 0..3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic [1:0] m,        // term index within the group
  input  cplx_in_t  x,
  output logic      f_valid,
  output cplx_buf_t f
);

  localparam int WS = W_IN + 2;   // four-term sum

  logic signed [WS-1:0] acc_re, acc_im;
  logic signed [WS-1:0] rot_re, rot_im;
  logic signed [WS-1:0] sum_re, sum_im;
  logic [1:0]           q;

  // rotation j^{(m*P) mod 4}
  always_comb begin
    q = 2'((int'(m) * P) % 4);
    unique case (q)
      2'd0: begin rot_re =  WS'(x.re); rot_im =  WS'(x.im); end
      2'd1: begin rot_re = -WS'(x.im); rot_im =  WS'(x.re); end
      2'd2: begin rot_re = -WS'(x.re); rot_im = -WS'(x.im); end
      default: begin rot_re =  WS'(x.im); rot_im = -WS'(x.re); end
    endcase
    sum_re = ((m == 2'd0) ? '0 : acc_re) + rot_re;
    sum_im = ((m == 2'd0) ? '0 : acc_im) + rot_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re  <= '0;
      acc_im  <= '0;
      f       <= '0;
      f_valid <= 1'b0;
    end else begin
      f_valid <= 1'b0;
      if (in_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
        if (m == 2'd3) begin
          f.re    <= W_BUF'(sum_re >>> PRE_SHIFT);
          f.im    <= W_BUF'(sum_im >>> PRE_SHIFT);
          f_valid <= 1'b1;
        end
      end
    end
  end

endmodule
