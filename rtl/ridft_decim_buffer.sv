// ridft_decim_buffer -- decimation buffer holding the N aggregated tones.
//
// N words of 2 x 14 bits (M groups of N/M tones; N = 64 gives 64 x 28 bits).
// Address = {group p, tone index k}. One synchronous write port, fed by the
// SEL multiplexer from the four pre-processors, and one asynchronous read
// port for the recursive filter, which consumes one tone per cycle.
// A register file with a combinational read is this design's choice; the
// published design gives only the buffer's size and purpose. Contents are not reset:
// every word is written before the filter reads it.
module ridft_decim_buffer
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_buf_t     wdata,
  input  logic [AW-1:0] raddr,
  output cplx_buf_t     rdata
);

  cplx_buf_t mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
