# Input-decimation recursive IDFT (64-point, decimation by 4)

This is a small streaming inverse DFT for OFDM receivers. It turns 64
frequency-domain tones `X_k` into time samples

    x_n = (1/64) * sum_{k=0}^{63} X_k * exp(+j*2*pi*k*n/64)

with one multiplier and no input memory. The intended use is beamforming
tracking in an IEEE 802.11n (20 MHz) receiver. There, the per-subcarrier
decision error must be brought back to the time domain within one OFDM symbol
(3.6 us with the short guard interval) so the beamforming weights can be
updated.

A plain recursive (Goertzel) IDFT needs N filter steps per output sample. This
design first *decimates the input*. It folds the 64 tones into four groups of
16 "aggregated tones", so each output needs only 16 steps. It then uses a
symmetry that yields two outputs from one filter pass for most even indices.
The architecture, cycle counts and wordlengths follow the published
input-decimation RIDFT design ("A Low-Computation-Cycle Design of
Input-Decimation Technique for RIDFT Algorithm"). The fixed-point scaling,
the interface, the sequencing and how the multiplier is time-shared are this
implementation's own choices. They are listed under "Departures and
choices" below.

## The algorithm

Write `W = exp(-j*2*pi/N)`, `N = 64`, `L = N/4 = 16`.

**Input decimation.** Split the sum over k into four quarters, k, k+L, k+2L
and k+3L. The twiddle `W^{-n*L*m}` of quarter m is `j^{n*m}`, so it depends
only on `p = n mod 4`:

    F_{p,k} = X_k + j^p X_{k+L} + (-1)^p X_{k+2L} + (-j)^p X_{k+3L}
    x_n     = sum_{k=0}^{L-1} F_{n mod 4, k} * W^{-kn}

The 64 tones become 4 x 16 aggregated tones. Building them takes only
additions, sign changes and real/imaginary swaps.

**Recursion.** Apply Horner's rule to the 16-term sum. With
`S_k = (S_{k-1} + F_k) * W^n` and `S_{-1} = 0`, the result is
`x_n = j^n * S_{L-1}`, because `W^{-nL} = j^n`. The first-order recursion
needs a complex coefficient. Its second-order (Goertzel) form needs only the
real constant `c = cos(2*pi*n/N)` in the loop:

    v_k = F_k + 2c*v_{k-1} - v_{k-2}                  (L steps)
    S   = W^{+n} v_{L-1} - v_{L-2} = A - jB           for x_n
    S'  = W^{-n} v_{L-1} - v_{L-2} = A + jB           for x_{N-n}
    A   = c*v_{L-1} - v_{L-2},   B = s*v_{L-1},   s = sin(2*pi*n/N)

**Symmetry.** The feedback loop is the same for n and N-n. Also, for even n
other than 0 and N/2, `(N-n) mod 4 = n mod 4`. So x_n and x_{N-n} read the
same aggregated tones and come out of a single pass, one on each output
port. Odd n need a second pass for x_{N-n} with the tones of group
`(N-n) mod 4`.

All 64 outputs take 15 pair passes, x_0, x_32, and 2 x 16 passes for the odd
indices: 49 passes in total, which is 3N/4 + 1.

## Architecture

    in_tone --+--> pre-processor p=0 --+
              +--> pre-processor p=1 --+--> SEL mux --> decimation buffer (64 x 2x14b)
              +--> pre-processor p=2 --+                      |
              +--> pre-processor p=3 --+                      v  F_{g,k}
                                               recursive filter (Goertzel,
                                               1 shared cos/sin multiplier)
                                                              | A, B
                                                              v
                                               output stage (x j^n, x j^{N-n})
                                                  |                 |
                                              xa = x_n        xb = x_{N-n}
    controller: input count, SEL writes, run schedule, filter commands

| module | role |
|---|---|
| `ridft_pkg` | widths, complex struct types, run modes, twiddle constants, run schedule |
| `ridft_pre_processor` | one decimation kernel: rotate by `j^{(m*p) mod 4}` and accumulate 4 tones |
| `ridft_decim_buffer` | 64-word register file, one write port (through SEL), one combinational read port |
| `ridft_twf_mult` | the only multiplier: complex state times hard-wired cos or sin constant |
| `ridft_recursive_filter` | Goertzel state `v_{k-1}, v_{k-2}`, the A register, the sine slot |
| `ridft_output_stage` | `A -+ jB`, rotation by `j^n` / `j^{N-n}`, rounding to 14 bits |
| `ridft_controller` | frame state machine (LOAD, RUN, DRAIN), SEL sequencer, run counter |
| `ridft_top` | wiring of all of the above |

## Timing: how one multiplier serves the whole filter

This part of the design is the hardest to see from the code.

A pass over one n has N/4 + 1 = 17 cycles:

| pass cycle | buffer read | multiplier computes | state update |
|---|---|---|---|
| 0 | F_{g,0} | s*v_{L-1} **of the previous pass** | v_1 <= F_0/4, v_2 <= 0 |
| 1..15 | F_{g,k} | c*v_{k-1} | v_1 <= F_k/4 + 2(c*v_1) - v_2 |
| 16 (fin) | - | c*v_{L-1} | A <= c*v_1 - v_2 (v_1 held) |

In cycle 0 of a pass the feedback term is zero, so the multiplier is free. It
finishes the previous pass there by computing the sine product B. A and B
then go to the output stage, which registers x_n and/or x_{N-n} one cycle
later. Because of this overlap, passes follow each other with no gap. After
the last pass, the controller spends one DRAIN cycle on the final sine
product.

The feedback path is one multiplier, a doubling (a wire shift), one adder
and one subtractor: T_m + 2T_a.

Frame timing, with one tone accepted per clock:

* The tones are accepted in cycles 0..63.
* Pass 0 starts in cycle 63, the same cycle as the last tone. It can: the
  aggregated tones of group g and index k are in the buffer by cycle
  4k + 7, and pass 0 reads them at cycle 63 + k.
* The last samples leave the output stage at cycle **64 + 17 * passes**:
  * **897 cycles** for all 64 samples (22.4 us at 40 MHz);
  * **132 cycles** for the four-pass partial output (3.3 us), which fits the
    3.6 us OFDM symbol.

The pre-processors finish a group of four tones every four accepted tones.
The SEL multiplexer then copies the four aggregated tones into the buffer in
the next four cycles, before the pre-processors can finish the next group.

## Number formats and accuracy

Each part is two's complement. The widths apply to both the real and the
imaginary part:

| point | width | scaling |
|---|---|---|
| input tone | 13 | X |
| aggregated tone / buffer | 14 | floor(sum / 2) |
| filter state | 19 | buffer word / 4 (floor); wraps modulo 2^19 |
| twiddle constants | 18 | Q2.16, rounded; product rounded half up |
| output | 14 | round(x / 8) |

The total scale is 1/64, so the outputs are the normalised IDFT.

With full-scale inputs the filter state reaches about 2^17.8 for every n
except 0 and 32. For those two, c = +-1 is exact, so any wrap-around cancels
in A. The outputs therefore never overflow.

In the end-to-end test, against a floating-point IDFT with random,
full-scale, single-tone and constant inputs, the largest error seen was
1.8 LSB of the 14-bit output. The testbench allows 3 LSB.

## Interface (`ridft_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | tone handshake; a tone is taken when both are high |
| `in_tone` | in | 2x13 (`cplx_in_t`) | tone, in decimated order (see below) |
| `num_runs` | in | 6 | passes per frame: 0 or 49 = all 64 samples; 4 = eight samples; 1..48 = that many passes |
| `xa_valid`, `xa_idx`, `xa` | out | 1, 6, 2x14 | sample x_n |
| `xb_valid`, `xb_idx`, `xb` | out | 1, 6, 2x14 | sample x_{N-n} (fires together with `xa` for a pair) |
| `busy` | out | 1 | a frame is being loaded or computed |
| `done` | out | 1 | one-cycle pulse with the last samples of a frame |

**Input order.** The four tones of one k must arrive together. Send
`X_0, X_16, X_32, X_48, X_1, X_17, X_33, X_49, ..., X_15, X_31, X_47, X_63`.
`in_valid` may drop between tones.

From the cycle the 64th tone is taken until `done`, `in_ready` is low. A
tone offered then is refused and stays pending.

**Output order.** Pairs for n = 2, 4, ..., 30 come first, on both ports at
once. Then x_0 and x_32 arrive on port a. Then, for odd n = 1, 3, ..., 31,
x_n arrives on port a, followed by x_{64-n} on port b. With `num_runs = 4`
the samples are x_2/x_62, x_4/x_60, x_6/x_58 and x_8/x_56.

`num_runs` is sampled when the 64th tone is accepted.

## Parameters

The modules take `N` (default 64) and widths derived from it. The word
widths and shifts are package constants. The controller and pass schedule are
written for any N that is a multiple of 16, but only N = 64 has been
simulated. The stage shifts, and therefore the 1/N normalisation and the
overflow margin, are set for N = 64. Check the filter range before changing
N.

## Departures and choices

Taken from the published design:

* decimation by 4;
* four pre-processors feeding one buffer through a 4:1 SEL multiplexer;
* an N-word buffer;
* a second-order recursive filter that shares its feedback path between x_n
  and x_{N-n};
* one multiplier for both the cos and the sin products;
* an output stage with no multiplier;
* the 13/14/19/14-bit wordlengths;
* the cycle counts: (3N/4+1)(N/4+1)+N = 897 for all outputs, and 132 for
  eight outputs.

This implementation's own choices:

* **Scaling and rounding.** The published design gives only the widths, not
  the shifts between stages.
* **Twiddle multiplier.** The published design merges the twiddle constants
  into a constant (shift-and-add) multiplier. Here the constants are
  computed at elaboration into a small hard-wired table that feeds an
  ordinary multiplier. The function is the same, but area and power will
  differ.
* **"One multiplier"** is read as one complex-by-real multiplier, which is
  two real products per cycle. That agrees with the published count of real
  multiplications, two per computation cycle.
* **Sine-slot overlap.** The sine product is taken in the first cycle of the
  next pass, and A is held in a register. The published figure places its
  retiming registers differently; the critical path is the same.
* **Interface.** The input order, the valid/ready handshake, the two output
  ports with indices, the pass order, and which eight samples the partial
  mode gives.
* **Not modelled.** Adder counts per block (the published design quotes 8 in
  the pre-processing and 10 in the filter). Also not modelled: area, power
  and the layout of the published 0.18 um implementation.
* **Assumed input rate.** The design assumes one tone per clock at the input.
  If tones arrive more slowly (for example at the 20 MHz sample rate), the
  load phase lengthens accordingly.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<n>`. To build and run one with
Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ridft_top \
        -y rtl -y tb +libext+.sv rtl/ridft_pkg.sv tb/tb_ridft_top.sv
    ./obj_dir/Vtb_ridft_top

| testbench | what it checks |
|---|---|
| `tb_ridft_pre_processor` | all four groups against integer complex arithmetic, with random gaps |
| `tb_ridft_decim_buffer` | write/read of every address, write visible after the clock edge |
| `tb_ridft_twf_mult` | every constant, cos and sin, against floating point |
| `tb_ridft_recursive_filter` | random passes for every n, back-to-back and with gaps, against a direct sum |
| `tb_ridft_output_stage` | rotation, rounding, port selection per mode |
| `tb_ridft_controller` | buffer write/read order, pass schedule, sample coverage, 897/132-cycle latency |
| `tb_ridft_top` | end to end at default parameters against a floating-point IDFT. Covers full and partial output, stalls, back-pressure, full-scale inputs, and counts pairs and single passes |
| `tb_ridft_symbol_rate` | eight-sample mode with a new 64-tone frame every 144 cycles (3.6 us at 40 MHz) |
