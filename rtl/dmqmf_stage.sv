// dmqmf_stage: one data multiplexed quadrature mirror filter stage.
//
// A two-channel QMF followed by decimation by two throws away half of each
// filter's outputs. Decimating the low-pass and high-pass channels out of
// phase lets a single full-rate FIR compute only the samples that are kept:
// its coefficient selector S switches between the LP and HP vectors every D
// samples, so the output stream carries the two sub-bands interleaved at the
// input rate. With D = 1, 2, 4 in successive stages the stream becomes
// (L,H,...), (LL,HL,LH,HH,...), (LLL,HLL,LHL,HHL,LLH,HLH,LHH,HHH,...).
// In synthesis the same FIR merges two interleaved bands: each coefficient
// vector then holds the low-pass synthesis taps at the positions that meet
// low-band samples and the high-pass taps elsewhere, so the addition of the
// two interpolated bands happens inside the filter.
//
// Datapath: delay line (taps x[n], x[n +/- mD]) -> folding adders (1 clock)
// -> compound primitive operator multiply-accumulate (3 clocks) -> rounding
// and saturation to 12 bits (1 clock). The filter code {mode, S} travels
// with the data.
//
// Selector S: every sample carries a position label p (its distance from
// the start of the line, modulo 8). S is bit dsel of the centre sample's
// label, i.e. S = floor(p / D) mod 2. S = 0 selects the LP vector of the
// mode, S = 1 the HP vector. The same rule serves analysis and synthesis.
// Each output sample takes the label and sync flag of its centre sample, so
// the next stage sees the same positions.
//
// Timing: one sample per clock in, one per clock out. The output for centre
// sample n leaves HALF*D + 5 clocks after sample n entered; s_out.sync marks
// the output of the sample that entered with s_in.sync.
//
// Output scaling (this design's own): the accumulator is divided by 2^14 in
// analysis and by 2^13 in synthesis (the x2 gain of interpolation), rounded
// half up and saturated to 12 bits. The position label, the sync flag and the
// run-time dsel are also this design's own; the selector rule, D per stage,
// the folding adders and the coefficient vectors follow the source design.
module dmqmf_stage
  import sbf_pkg::*;
#(
  parameter int unsigned DSEL_MAX = 2   // the stage supports D = 1 .. 2**DSEL_MAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic [1:0] dsel,     // D = 2**dsel
  input  stream_t    s_in,
  output stream_t    s_out
);

  localparam int unsigned POF_LAT = 3;

  // ---- delay line ----
  stream_t centre_w;
  stream_t ahead_w  [HALF+1];
  stream_t behind_w [HALF+1];

  dmqmf_delay_line #(
    .W        ($bits(stream_t)),
    .HALF     (HALF),
    .DSEL_MAX (DSEL_MAX)
  ) u_line (
    .clk    (clk),
    .rst_n  (rst_n),
    .dsel   (dsel),
    .d_in   (s_in),
    .centre (centre_w),
    .ahead  (ahead_w),
    .behind (behind_w)
  );

  // ---- coefficient selector S ----
  logic sel;

  always_comb sel = centre_w.phase[dsel];

  // ---- folding adders ----
  sample_t ahead_s  [HALF+1];
  sample_t behind_s [HALF+1];
  fold_t   fold_w   [NTAP];

  always_comb begin
    for (int m = 0; m <= HALF; m++) begin
      ahead_s[m]  = ahead_w[m].data;
      behind_s[m] = behind_w[m].data;
    end
  end

  fold_adders #(.NH(HALF)) u_fold (
    .clk      (clk),
    .rst_n    (rst_n),
    .centre   (centre_w.data),
    .ahead    (ahead_s),
    .behind   (behind_s),
    .fold_out (fold_w)
  );

  // filter code, sync, label and mode aligned with the fold register
  typedef struct packed {
    logic               sync;
    logic [PHASE_W-1:0] phase;
    logic               synth;
  } tag_t;

  fid_t fid_q;
  tag_t tag_p [POF_LAT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fid_q <= '0;
      for (int i = 0; i <= POF_LAT; i++) tag_p[i] <= '0;
    end else begin
      fid_q    <= {mode, sel};
      tag_p[0] <= '{sync: centre_w.sync, phase: centre_w.phase, synth: is_synthesis(mode)};
      for (int i = 1; i <= POF_LAT; i++) tag_p[i] <= tag_p[i-1];
    end
  end

  // ---- control unit and compound primitive operator MAC ----
  logic [NVERT-1:0] vert_en, vert_inv;
  corr_t            corr;
  acc_t             acc;

  pof_control u_ctrl (
    .fid      (fid_q),
    .vert_en  (vert_en),
    .vert_inv (vert_inv),
    .corr     (corr)
  );

  compound_pof u_pof (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     (fold_w),
    .vert_en  (vert_en),
    .vert_inv (vert_inv),
    .corr     (corr),
    .acc      (acc)
  );

  // ---- rounding, MSB saturation, output register ----
  localparam acc_t SMAX = acc_t'((1 << (SAMPLE_W - 1)) - 1);
  localparam acc_t SMIN = -acc_t'(1 << (SAMPLE_W - 1));

  acc_t    scaled;
  sample_t y_d;

  always_comb begin
    if (tag_p[POF_LAT].synth)
      scaled = (acc + acc_t'(1 << (FRAC_S - 1))) >>> FRAC_S;
    else
      scaled = (acc + acc_t'(1 << (FRAC_A - 1))) >>> FRAC_A;
    if (scaled > SMAX)      y_d = sample_t'(SMAX);
    else if (scaled < SMIN) y_d = sample_t'(SMIN);
    else                    y_d = sample_t'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_out <= '0;
    else        s_out <= '{sync: tag_p[POF_LAT].sync, phase: tag_p[POF_LAT].phase, data: y_d};
  end

  // dsel must name a D the delay line and the position label support
  a_dsel_range : assert property (@(posedge clk) dsel <= 2'(DSEL_MAX) && DSEL_MAX < PHASE_W);

endmodule
