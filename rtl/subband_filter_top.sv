// subband_filter_top: three-stage sub-band filter bank.
//
// Three DMQMF stages in cascade split one sample stream into eight
// sub-bands (analysis) or merge eight back into one (synthesis), at a
// constant rate of one sample per clock throughout. In analysis the stages
// use inter-tap delays D = 1, 2, 4 in that order; in synthesis the order is
// reversed (D = 4, 2, 1) so that the last split is the first undone. The
// mode input picks one of four filter pairs: horizontal analysis (HA),
// vertical analysis (VA), vertical synthesis (VS) and horizontal synthesis
// (HS); analysis modes 0 and 1, synthesis modes 2 and 3.
//
// The bank filters the stream it is given. A 64-band image decomposition
// is two passes: rows in HA mode, then columns in VA mode, with the
// transposition done by frame or line stores outside this block; synthesis
// runs VS then HS.
//
// Interface: in_data carries one 12-bit sample per clock and in_sync flags
// the first sample of each line. A position counter, cleared by in_sync and
// otherwise counting modulo 8, labels every sample; the label travels with
// the sample through all stages and sets each stage's coefficient selector,
// so the sub-band order of the output is fixed relative to the line start.
// out_data/out_sync carry the result; out_sync flags the output sample at
// the position of the input sample that carried in_sync. mode should
// only change while the bank is idle or between lines; the stages see a new
// mode immediately. Latency from sync in to sync out: 66 clocks counted from
// the edge that takes in the sync sample, i.e. 7*D + 5 in each stage
// (7*(1+2+4) + 3*5 = 64) plus one edge at each of the two stage-to-stage
// hand-overs.
//
// The three-stage cascade and the D of each stage follow the source design.
// Re-using the same three stages in reverse order for synthesis, the sync
// flag, the position label and the 12-bit interface between stages are this design's own.
module subband_filter_top
  import sbf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          mode,       // 0 HA, 1 VA, 2 VS, 3 HS
  input  logic                in_sync,
  input  logic [SAMPLE_W-1:0] in_data,
  output logic                out_sync,
  output logic [SAMPLE_W-1:0] out_data
);

  mode_e              mode_m;
  logic               synth;
  logic [PHASE_W-1:0] pos_q, pos_d;
  stream_t            link [NSTAGE+1];

  // position counter: 0 on the sync sample, +1 per sample after it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos_q <= '0;
    else        pos_q <= pos_d + 1'b1;
  end

  always_comb begin
    mode_m  = mode_e'(mode);
    synth   = is_synthesis(mode_m);
    pos_d   = in_sync ? '0 : pos_q;
    link[0] = '{sync: in_sync, phase: pos_d, data: sample_t'(in_data)};
  end

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    logic [1:0] dsel;
    assign dsel = synth ? 2'(NSTAGE - 1 - s) : 2'(s);

    dmqmf_stage #(.DSEL_MAX(NSTAGE - 1)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .mode  (mode_m),
      .dsel  (dsel),
      .s_in  (link[s]),
      .s_out (link[s+1])
    );
  end

  assign out_sync = link[NSTAGE].sync;
  assign out_data = link[NSTAGE].data;

endmodule
