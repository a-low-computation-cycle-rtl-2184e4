// ridft_controller -- sequencing of the input-decimation RIDFT.
//
// Three activities:
//  * Input: in the LOAD state one tone is accepted per valid cycle
//    (in_valid && in_ready), in decimated order X_k, X_{k+N/4}, X_{k+N/2},
//    X_{k+3N/4} for k = 0..N/4-1. pp_m gives the term index m to the four
//    pre-processors.
//  * SEL writes: when the pre-processors complete a group (pp_fvalid), the
//    four aggregated tones F_{0..3,k} are copied into the decimation buffer in
//    the next four cycles through the SEL multiplexer (sel = 0,1,2,3,
//    address {sel, k}); that is done before the pre-processors can finish the
//    next group.
//  * Filter runs: on the cycle the last tone is accepted, run 0 starts. Each
//    run has N/4 tone cycles (load, buffer address {grp, k}) and one fin
//    cycle; runs follow back to back in the order of run_sched(), a small
//    combinational decode of the run counter.
//    After the last run one DRAIN cycle lets the filter finish its sine
//    product; then the controller returns to LOAD.
//
// num_runs (sampled when run 0 starts) chooses how many runs are made:
// 3N/4+1 = 49 for all N outputs (0 or anything larger also means all), 4 for
// the eight partial outputs. With back-to-back input the last outputs leave
// the output stage N + 17*num_runs cycles after the first tone was accepted:
// 897 cycles (22.4 us at 40 MHz) for all outputs, 132 cycles (3.3 us) for
// eight. done pulses in that same cycle. The cycle counts follow the
// published design; the state machine, the input order and the run order are this
// design's choices.
module ridft_controller
  import ridft_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = $clog2(N),
  parameter int NR = 3 * N / 4 + 1,       // runs for all outputs
  parameter int RW = $clog2(NR + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // tone input handshake
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [RW-1:0] num_runs,
  // pre-processors
  output logic          pp_valid,
  output logic [1:0]    pp_m,
  input  logic          pp_fvalid,
  // decimation buffer
  output logic          buf_we,
  output logic [1:0]    buf_sel,
  output logic [IW-1:0] buf_waddr,
  output logic [IW-1:0] buf_raddr,
  // recursive filter
  output logic          flt_load,
  output logic          flt_first,
  output logic          flt_fin,
  output logic [IW-1:0] flt_n,
  output run_mode_t     flt_mode,
  // status
  output logic          busy,
  output logic          done
);

  localparam int L  = N / 4;
  localparam int KW = IW - 2;             // tone index k within a group
  localparam int PW = $clog2(L + 1);      // phase 0..L

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_DRAIN} state_t;

  state_t        state;
  logic [IW-1:0] icnt;
  logic [KW-1:0] k_last;
  logic [1:0]    wsel;
  logic          wbusy;
  logic [PW-1:0] ph;
  logic [RW-1:0] r, r_last;
  logic          accept, launch;
  logic [RW-1:0] r_cur;
  logic [PW-1:0] ph_cur;
  logic [1:0]    wsel_cur;
  run_t          run;

  assign in_ready = (state == S_LOAD);
  assign accept   = in_valid && in_ready;
  assign launch   = accept && (icnt == IW'(N - 1));
  assign pp_valid = accept;
  assign pp_m     = icnt[1:0];
  assign busy     = (state != S_LOAD) || (icnt != '0);

  // SEL multiplexer writes
  assign wsel_cur  = pp_fvalid ? 2'd0 : wsel;
  assign buf_we    = pp_fvalid || wbusy;
  assign buf_sel   = wsel_cur;
  assign buf_waddr = {wsel_cur, k_last};

  // filter commands
  always_comb begin
    r_cur  = (state == S_RUN) ? r : '0;
    ph_cur = (state == S_RUN) ? ph : '0;
    run    = run_sched(N, int'(r_cur));
    flt_load  = launch || ((state == S_RUN) && (ph < PW'(L)));
    flt_first = launch || ((state == S_RUN) && (ph == '0));
    flt_fin   = (state == S_RUN) && (ph == PW'(L));
    flt_n     = IW'(run.n);
    flt_mode  = run.mode;
    buf_raddr = {run.grp, KW'(ph_cur)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      icnt   <= '0;
      k_last <= '0;
      wsel   <= '0;
      wbusy  <= 1'b0;
      ph     <= '0;
      r      <= '0;
      r_last <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;

      if (accept) begin
        icnt <= icnt + 1'b1;
        if (icnt[1:0] == 2'd3) k_last <= icnt[IW-1:2];
      end

      if (buf_we) begin
        wsel  <= wsel_cur + 2'd1;
        wbusy <= (wsel_cur != 2'd3);
      end

      unique case (state)
        S_LOAD: begin
          if (launch) begin
            state  <= S_RUN;
            ph     <= PW'(1);
            r      <= '0;
            r_last <= ((num_runs == '0) || (int'(num_runs) > NR)) ? RW'(NR - 1)
                                                                  : num_runs - 1'b1;
          end
        end
        S_RUN: begin
          if (ph == PW'(L)) begin
            ph <= '0;
            if (r == r_last) state <= S_DRAIN;
            else             r     <= r + 1'b1;
          end else begin
            ph <= ph + 1'b1;
          end
        end
        default: begin
          state <= S_LOAD;
          done  <= 1'b1;
        end
      endcase
    end
  end

  a_no_write_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    pp_fvalid |-> !wbusy);

endmodule
