// tb_ridft_decim_buffer -- self-checking test of the decimation buffer.
//
// Fills all N words with random tones while a shadow array in the testbench
// records them, then reads back every address (combinational read, checked in
// the same cycle), overwrites random words, and checks that a write becomes
// visible at the next clock edge and not before.
module tb_ridft_decim_buffer;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  cplx_buf_t wdata = '0, rdata;
  cplx_buf_t shadow [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ridft_decim_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic cplx_buf_t rnd();
    cplx_buf_t v;
    v.re = W_BUF'($urandom);
    v.im = W_BUF'($urandom);
    return v;
  endfunction

  task automatic check_all();
    for (int a = 0; a < N; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    check_all();
    for (int i = 0; i < 500; i++) begin
      int a;
      a = int'($urandom_range(N - 1));
      we = 1'b1; waddr = AW'(a); wdata = rnd();
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL write visible before the clock edge, addr %0d", a);
      end
      shadow[a] = wdata;
      @(negedge clk);
      we = 1'b0;
      #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL addr %0d after write got %h exp %h", a, rdata, shadow[a]);
      end
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
