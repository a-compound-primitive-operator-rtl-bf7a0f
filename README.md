# Sub-band video filter bank with a compound primitive operator multiply-accumulate

This is synthesizable SystemVerilog for a reconfigurable sub-band filter bank for
video. It splits a stream of 12-bit samples into eight sub-bands (analysis) or
merges eight sub-bands back into one stream (synthesis). It runs at one sample per
clock in both directions. One pass filters along one dimension. A pass along the rows
followed by a pass along the columns gives a 64-band decomposition of an image.

Two ideas keep the hardware small:

* **Data multiplexed QMF (DMQMF).** A two-channel quadrature mirror filter
  normally needs a low-pass and a high-pass filter, each followed by decimation by
  two. Half of each filter's outputs are thrown away. Here one full-rate FIR
  computes only the kept samples: its coefficients switch between the LP and HP
  vectors, so its output is the two bands interleaved at the input rate.
* **Compound primitive operator multiply-accumulate.** The FIR has no
  multipliers. The coefficient magnitudes of all eight filters (four modes × LP/HP)
  sit in one shared shift-and-add graph. A 3-bit filter code only switches which
  graph inputs receive data and which are grounded.

## The data multiplexed QMF stage (`dmqmf_stage`)

Every stage is a symmetric FIR with up to 15 taps (centre plus 7 each side). Its
delay elements each hold D samples, so the taps are `x[n]` and `x[n ± mD]`,
m = 1..7:

    y[n] = c[0]·x[n] + Σ_{m=1..7} c[m]·(x[n+mD] + x[n-mD])

**Coefficient selector.** Output n uses the LP vector when `floor(n/D)` is even and
the HP vector when it is odd. With D = 1, 2, 4 in three cascaded stages, the stream
takes these band orders:

| after stage | D | order of one period |
|---|---|---|
| 1 | 1 | L, H |
| 2 | 2 | LL, HL, LH, HH |
| 3 | 4 | LLL, HLL, LHL, HHL, LLH, HLH, LHH, HHH |

With D = 2, the taps of a stage only reach samples of the same band of the stage
before. That is why the same structure works at every level.

**Synthesis uses the same rule.** In synthesis the input stream holds interleaved
bands, and the output must be the sum of the two interpolated bands. Each synthesis
vector is arranged so that taps which land on low-band samples carry synthesis
low-pass coefficients. Taps that land on high-band samples carry high-pass ones. The
"LP" synthesis vector is used when the centre sample is a low-band sample, and the
"HP" vector when it is a high-band sample. That is the same `floor(n/D) mod 2` rule
as in analysis. A synthesis bank runs the stages with D = 4, 2, 1, which undoes the
last split first.

**Position label.** Each sample carries a 3-bit label: its distance from the start of
the line, modulo 8. The bank input sets the label from a counter that `in_sync`
clears. Each stage's selector reads the label of its centre sample. Each output
sample inherits that label, so every stage agrees on which position is which. This
also holds for the filters' response just before the line start, which synthesis
needs for exact reconstruction there.

**Scaling.** The coefficients have a DC gain of 2^14 (Q14). The 28-bit sum is
divided by 2^14 in analysis and by 2^13 in synthesis. The extra factor of two is the
gain that interpolation by two needs. The result is rounded half up and saturated to
12 bits, so every stage passes on 12-bit samples.

**Pipeline of one stage** (the latency is `7·D + 5` clocks from the edge that takes in
sample n to the edge that outputs result n):

    delay line ──> folding adders ──> vertex switches ──> digit planes ──> plane sum ──> round/saturate
     (7·D edges)       reg 1               reg 2              reg 3           reg 4          reg 5

## The multiplier-free graph (`pof_control`, `compound_pof`)

**Input vertices.** Tap m of the eight filters uses only a handful of distinct
coefficient magnitudes. Each distinct non-zero magnitude of each tap is one graph
input vertex: 4 + 4 + 3 + 3 + 2 + 1 + 1 + 1 = **19 vertices**. For any one filter,
each tap uses at most one of its vertices. That vertex is switched to the folded
sample `x_m`, and all the tap's other vertices are switched to ground. If the
filter's coefficient is negative, the vertex input is also bit-inverted. `pof_control`
derives the 19 switch enables and 19 inversion controls from the 3-bit code. It does
so by comparing the constant coefficient table with the constant vertex table, which
reduces to a small decoder.

**Inversion and its correction.** A bitwise inverter gives `~x = -x - 1`, so each
inverted vertex contributes its magnitude once too little. For each filter,
`pof_control` also outputs `corr`, the sum of the magnitudes of that filter's negative
coefficients. The last graph stage adds it back, which makes the result exact. Only 14
of the 19 vertices are negative in any filter: at taps 0, 2, 3, 4, 6 and 7. Only those
14 need inverters (14 × 13 bits).

| tap m | vertex magnitudes |
|---|---|
| 0 | 9728, 9122, 10240, 9558 |
| 1 | 4608, 4703, 4096, 4267 |
| 2 | 1024, 664, 683 |
| 3 | 512, 659, 171 |
| 4 | 256, 218 |
| 5 | 62 |
| 6 | 19 |
| 7 | 10 |

**Graph.** Each vertex magnitude is written in canonical signed-digit form. For each
power of two k, one adder tree ("digit plane" `P_k`) adds or subtracts every vertex
that has a digit at 2^k. The result is `Σ_k P_k·2^k`. The planes are shared by all
19 vertices, so an adder serves every filter that uses it. This is the graph's
reuse across filters. The graph is this design's own construction. It is not an
optimised minimum graph.

**Pipeline and word length.** There are three register stages: after the vertex
switches, after the digit planes, and after the final sum. The folded samples are 13
bits. The largest `|c[0]| + … + |c[7]|` is 16442 (the HP vector of horizontal
synthesis). That gives 15 bits of growth, so the sum needs 28 bits. Partial sums may
wrap in 28-bit two's complement, but the final sum is always exact.

## Coefficients

The eight vectors, in order of the 3-bit filter code `{mode, hp}`:

| code | filter | c[0] | c[1] | c[2] | c[3] | c[4] | c[5] | c[6] | c[7] |
|---|---|---|---|---|---|---|---|---|---|
| 0 | LP, horizontal analysis | 9728 | 4608 | -1024 | -512 | 256 | 0 | 0 | 0 |
| 1 | HP, horizontal analysis | -9122 | 4703 | 664 | -659 | -218 | 62 | 19 | -10 |
| 2 | LP, vertical analysis | 10240 | 4096 | -1024 | 0 | 0 | 0 | 0 | 0 |
| 3 | HP, vertical analysis | -9558 | 4267 | 683 | -171 | 0 | 0 | 0 | 0 |
| 4 | LP, vertical synthesis | 9558 | 4096 | -683 | 0 | 0 | 0 | 0 | 0 |
| 5 | HP, vertical synthesis | -10240 | 4267 | 1024 | -171 | 0 | 0 | 0 | 0 |
| 6 | LP, horizontal synthesis | 9122 | 4608 | -664 | -512 | 218 | 0 | -19 | 0 |
| 7 | HP, horizontal synthesis | -9728 | 4703 | 1024 | -659 | -256 | 62 | 0 | -10 |

Each synthesis vector combines two analysis vectors. It takes the even taps of one
and the odd taps of the other, with signs alternated. To change the filters, edit
`COEF` in `rtl/sbf_pkg.sv` and rebuild the vertex table `VERT_TAP`/`VERT_MAG` from
the distinct magnitudes of each tap. `pof_control` and the graph follow
automatically. `tb/sbf_ref_pkg.sv` holds a separate copy of the table for the
testbenches.

## Top level (`subband_filter_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one sample per clock |
| `rst_n` | in | 1 | asynchronous, active low; clears all state |
| `mode` | in | 2 | 0 horizontal analysis, 1 vertical analysis, 2 vertical synthesis, 3 horizontal synthesis |
| `in_sync` | in | 1 | first sample of a line |
| `in_data` | in | 12 | signed sample, or interleaved sub-band sample in synthesis |
| `out_sync` | out | 1 | result at the position of the `in_sync` sample |
| `out_data` | out | 12 | signed result |

* In analysis the three stages run with D = 1, 2, 4; in synthesis with D = 4, 2, 1.
  Each stage's delay line holds 57 samples, enough for D = 4, and a multiplexer per
  tap selects D.
* Latency: `out_sync` follows `in_sync` by **66 clocks**. That is 7·(1+2+4) + 3·5 = 64
  in the stages, plus one edge at each of the two hand-overs between stages.
* No handshake: a sample enters and a result leaves on every clock. Change `mode`
  only between lines; the stages switch at once.
* Lines are filtered as one continuous stream, with no special handling at line
  edges. Blanking of at least 50 zero samples between lines keeps them apart. The
  reach of the three stages is 7·(1+2+4) = 49 samples each side.
* Vertical filtering assumes that external line or field stores present each column
  as a sample stream. The bank holds no line memory.

## Where this design departs from its source, or adds to it

The following follow the source design: the DMQMF principle and selector timing, D =
1, 2, 4, the coefficient vectors, folding adders, 12/13/28-bit word lengths, input
vertices switched between `x_m` and ground by a 3-bit code, input data inversion, and
a three-stage multiply-accumulate pipeline. The following are this design's own
choices:

* **The graph itself.** The digit-plane structure replaces an optimised minimum
  graph, so its adder count is not minimal.
* **The inversion correction `corr`.** Plain inverters leave an offset of one
  magnitude per inverted vertex. This design cancels it exactly with a per-filter
  constant added in the last graph stage. The source does not say how it handled
  the offset.
* **Output scaling, rounding and saturation.** The source only says the internal
  word may grow to 28 bits before the MSBs are cut.
* **Run-time D and the reversed synthesis order.** The source says only that each
  cascaded stage uses "an appropriate" D. Here every stage can take any D up to 4, so
  the same three stages can serve both analysis (1, 2, 4) and synthesis (4, 2, 1).
  The cost is a 57-word delay line in every stage, not 15, 29 and 57.
* **Sync, position label and reset.** The source describes no interface. The
  one-sample-per-clock stream with a line sync, the position label that drives the
  selectors, and the asynchronous reset are all this design's own.
* **No edge extension at line boundaries.** The source does not describe how line
  ends are treated. The bank filters one continuous stream, so lines must be kept
  apart by blanking (see the top-level notes above).
* **Vertical filtering** assumes that the columns arrive as a sample stream from
  external stores.
* **Not included.** The codec around the bank (quantiser, entropy coder, field and
  line stores, rate control) is not part of this RTL. Neither is gate-level delay
  balancing: the number of pipeline stages is fixed, not derived from adder timing.

## Files

| file | content |
|---|---|
| `rtl/sbf_pkg.sv` | word lengths, mode enum, stream struct, coefficient and vertex tables, CSD function |
| `rtl/dmqmf_delay_line.sv` | tapped delay line with run-time D |
| `rtl/fold_adders.sv` | symmetric-pair adders, registered |
| `rtl/pof_control.sv` | filter code → vertex switches, inversions and correction constant |
| `rtl/compound_pof.sv` | multiplier-free multiply-accumulate, 3 pipeline stages |
| `rtl/dmqmf_stage.sv` | one DMQMF stage |
| `rtl/subband_filter_top.sv` | three-stage bank |
| `tb/sbf_ref_pkg.sv` | reference model with ordinary multiplications |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_subband_2d` |

## Verification

Each testbench compares against values computed independently of the RTL and prints
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.

* `tb_dmqmf_delay_line`: every tap against a history of written words, for D = 1, 2, 4.
* `tb_fold_adders`: sums on random and extreme inputs.
* `tb_pof_control`: for all eight codes, the enabled vertices of each tap add up to
  exactly the table coefficient, with at most one vertex per tap. `corr` equals the
  sum of the negative coefficients' magnitudes, and exactly 14 vertices are ever
  inverted.
* `tb_compound_pof`: the graph against a direct weighted sum for random enables,
  inversions, correction term and data; latency 3.
* `tb_dmqmf_stage`: all four modes × all three D, bit-exact against the reference
  model; latency 7·D + 5.
* `tb_subband_filter_top`: full size. It runs horizontal analysis, then horizontal
  synthesis, on a 512-sample line, then the same for vertical, then horizontal
  again. Every pass is bit-exact against the model. The synthesis output
  reconstructs the input to within 8 LSB (6 seen; the only error is the rounding in
  six stages). It also checks the 66-clock latency, that every mode and mode switch
  occurs, and that all eight band positions are exercised.
* `tb_subband_2d`: a 64-band decomposition and reconstruction of a 32 × 32 image.
  The testbench plays the part of the external stores that transpose between the row
  and column passes. The four passes are horizontal analysis, vertical analysis,
  vertical synthesis and horizontal synthesis. Each is bit-exact against the model,
  and each of the 64 band positions must carry data. The image must come back to
  within 24 LSB; 12 to 17 were seen. That error comes from twelve rounding steps, and
  from the vertical filter pair, whose 15-bit coefficients reconstruct nearly but not
  exactly perfectly.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/sbf_pkg.sv tb/sbf_ref_pkg.sv tb/tb_subband_filter_top.sv \
      --top-module tb_subband_filter_top
    ./obj_dir/Vtb_subband_filter_top

Verilator finds the other modules in `rtl/` by file name through `-Irtl`.
