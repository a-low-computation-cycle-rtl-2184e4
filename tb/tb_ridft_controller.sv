// tb_ridft_controller -- self-checking test of the RIDFT sequencer.
//
// The testbench plays the pre-processors (a completion pulse one cycle after
// every fourth accepted tone) and watches the controller's buffer and filter
// commands. Per frame it checks:
//  * every buffer address {sel, k} is written exactly once, with sel on the
//    multiplexer select, and before the filter reads it;
//  * each run has N/4 load cycles reading {grp, k} for k = 0..N/4-1 in order,
//    first only on k = 0, then one fin cycle;
//  * the run's group matches its index (n mod 4 for x_n, (N-n) mod 4 for
//    x_{N-n}), pairs only for even n other than 0 and N/2;
//  * the outputs the runs produce cover all N samples exactly once (full
//    output) or x_2, x_62, x_4, x_60, x_6, x_58, x_8, x_56 (num_runs = 4);
//  * done comes N + 17*runs cycles after the first tone when tones arrive
//    back to back (897 and 132 for N = 64), and in_ready stays low from the
//    last tone until done.
module tb_ridft_controller;
  import ridft_pkg::*;

  localparam int N  = N_DEF;
  localparam int IW = $clog2(N);
  localparam int L  = N / 4;
  localparam int NR = 3 * N / 4 + 1;
  localparam int RW = $clog2(NR + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic [RW-1:0] num_runs = '0;
  logic pp_valid;
  logic [1:0] pp_m;
  logic pp_fvalid = 1'b0;
  logic buf_we;
  logic [1:0] buf_sel;
  logic [IW-1:0] buf_waddr, buf_raddr;
  logic flt_load, flt_first, flt_fin;
  logic [IW-1:0] flt_n;
  run_mode_t flt_mode;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ridft_controller dut (.*);

  // pre-processor model: completion one cycle after each m = 3 beat
  always_ff @(posedge clk) pp_fvalid <= pp_valid && (pp_m == 2'd3);

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // per-frame bookkeeping
  int  wr_cnt [N];
  int  wr_cyc [N];
  int  out_cnt [N];
  int  runs_seen;
  int  k_exp;          // next expected tone index of the current run
  int  run_n, run_grp;
  run_mode_t run_mode;
  bit  fin_seen;

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  task automatic clear_frame();
    for (int i = 0; i < N; i++) begin
      wr_cnt[i] = 0; wr_cyc[i] = -1; out_cnt[i] = 0;
    end
    runs_seen = 0;
    k_exp = 0;
  endtask

  int t_first = -1;

  always @(negedge clk) if (rst_n) begin
    if (in_valid && in_ready && t_first < 0) t_first = cyc;
    if (buf_we) begin
      checks++;
      if (buf_waddr[IW-1:IW-2] != buf_sel) fail("write address group differs from SEL");
      wr_cnt[buf_waddr]++;
      wr_cyc[buf_waddr] = cyc;
    end
    if (flt_load) begin
      checks++;
      if (flt_first != (k_exp == 0)) fail("first flag misplaced");
      if (k_exp == 0) begin
        run_n = int'(flt_n); run_grp = int'(buf_raddr[IW-1:IW-2]); run_mode = flt_mode;
      end
      if (int'(buf_raddr) != run_grp * L + k_exp) fail($sformatf("read address %0d, expected %0d", buf_raddr, run_grp * L + k_exp));
      if (int'(flt_n) != run_n) fail("n changed inside a run");
      if (wr_cyc[buf_raddr] < 0 || wr_cyc[buf_raddr] >= cyc) fail("read before write");
      k_exp++;
      if (k_exp > L) fail("run too long");
    end
    if (flt_fin) begin
      checks++;
      if (k_exp != L) fail("fin after wrong number of tones");
      if (int'(flt_n) != run_n || flt_mode != run_mode) fail("fin tag differs");
      k_exp = 0;
      runs_seen++;
      case (run_mode)
        RUN_LO: begin
          if (run_grp != run_n % 4) fail("group of x_n");
          out_cnt[run_n]++;
        end
        RUN_HI: begin
          if (run_grp != (N - run_n) % 4) fail("group of x_{N-n}");
          out_cnt[(N - run_n) % N]++;
        end
        default: begin
          if (run_n % 2 != 0 || run_n == 0 || run_n == N / 2) fail("pair for odd n");
          if (run_grp != run_n % 4) fail("group of pair");
          out_cnt[run_n]++;
          out_cnt[N - run_n]++;
        end
      endcase
    end
  end

  // one frame; gaps = random idle cycles between tones
  task automatic frame(input int nr, input bit gaps, output int latency);
    clear_frame();
    num_runs <= RW'(nr);
    t_first = -1;
    for (int i = 0; i < N; i++) begin
      if (gaps) while ($urandom_range(2) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    while (!done) begin
      @(negedge clk);
      checks++;
      if (in_ready && !done) fail("in_ready while computing");
    end
    latency = cyc - t_first;
    @(posedge clk);
  endtask

  int lat, exp_runs;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // full output, back to back
    frame(0, 1'b0, lat);
    checks++;
    if (lat != N + 17 * NR) fail($sformatf("full-output latency %0d, expected %0d", lat, N + 17 * NR));
    $display("full output: %0d cycles", lat);
    checks++;
    if (runs_seen != NR) fail("run count");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (wr_cnt[i] != 1) fail($sformatf("address %0d written %0d times", i, wr_cnt[i]));
      checks++;
      if (out_cnt[i] != 1) fail($sformatf("x_%0d produced %0d times", i, out_cnt[i]));
    end

    // eight partial outputs
    frame(4, 1'b0, lat);
    checks++;
    if (lat != N + 17 * 4) fail($sformatf("8-output latency %0d, expected %0d", lat, N + 68));
    $display("partial output: %0d cycles", lat);
    for (int i = 0; i < N; i++) begin
      bit want;
      want = (i == 2 || i == 62 || i == 4 || i == 60 || i == 6 || i == 58 || i == 8 || i == 56);
      checks++;
      if (out_cnt[i] != int'(want)) fail($sformatf("partial: x_%0d produced %0d times", i, out_cnt[i]));
    end

    // random run counts with gaps in the input
    for (int f = 0; f < 6; f++) begin
      exp_runs = int'($urandom_range(NR - 1)) + 1;
      frame(exp_runs, 1'b1, lat);
      checks++;
      if (runs_seen != exp_runs) fail("run count with gaps");
      for (int i = 0; i < N; i++) begin
        checks++;
        if (wr_cnt[i] != 1) fail("write count with gaps");
      end
    end

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
