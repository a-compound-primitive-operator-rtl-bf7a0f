// sbf_pkg: types, word lengths and coefficient tables shared by the sub-band
// filter bank.
//
// The filter bank is built from data multiplexed QMF (DMQMF) stages. Each
// stage is a single symmetric FIR of up to 15 taps (half length M = 7) whose
// coefficient set alternates between a low-pass and a high-pass vector, so
// that one full-rate filter produces both decimated sub-bands. Four modes
// (horizontal/vertical analysis, vertical/horizontal synthesis) each hold a
// LP and a HP vector, giving eight vectors addressed by a 3-bit filter
// identifier code {mode, hp}.
//
// Following the source design: the eight coefficient vectors (15-bit signed,
// DC gain 2^14 for the analysis low-pass), the 12-bit input samples, the
// 13-bit word after the folding adders and the 28-bit internal accumulator.
// This design's own choices: the mode encoding, the order of the 19 graph
// input vertices and the canonical signed digit (CSD) helper used to build
// the multiplier-free graph.
package sbf_pkg;

  // word lengths
  localparam int unsigned SAMPLE_W = 12;   // input / output sample width
  localparam int unsigned FOLD_W   = 13;   // after the folding addition
  localparam int unsigned ACC_W    = 28;   // internal graph width
  localparam int unsigned HALF     = 7;    // M: taps each side of centre
  localparam int unsigned NTAP     = HALF + 1;  // distinct coefficients c[0..M]
  localparam int unsigned NFILT    = 8;    // LP/HP x four modes
  localparam int unsigned NVERT    = 19;   // graph input vertices
  localparam int unsigned CSD_W    = 16;   // digits per coefficient magnitude
  localparam int unsigned FRAC_A   = 14;   // output shift in analysis
  localparam int unsigned FRAC_S   = 13;   // output shift in synthesis (x2 interpolation gain)
  localparam int unsigned NSTAGE   = 3;    // stages per bank: D = 1, 2, 4
  localparam int unsigned PHASE_W  = NSTAGE; // position label, modulo 2**NSTAGE

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [FOLD_W-1:0]   fold_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic [15:0]                corr_t;   // inversion correction, < 2^15

  // filtering modes
  typedef enum logic [1:0] {
    MODE_HA = 2'd0,   // horizontal analysis
    MODE_VA = 2'd1,   // vertical analysis
    MODE_VS = 2'd2,   // vertical synthesis
    MODE_HS = 2'd3    // horizontal synthesis
  } mode_e;

  // 3-bit filter identifier code: {mode, hp}
  typedef logic [2:0] fid_t;

  function automatic logic is_synthesis(mode_e m);
    return m inside {MODE_VS, MODE_HS};
  endfunction

  // One sample of a stream, with its start marker and its position label:
  // the sample's distance from the line's first sample, modulo 8. Every
  // stage's coefficient selector reads the label of its centre sample.
  typedef struct packed {
    logic               sync;    // first sample of a line
    logic [PHASE_W-1:0] phase;   // position modulo 2**NSTAGE
    sample_t            data;
  } stream_t;

  // Coefficient vectors c[0..7], indexed by the filter identifier code:
  // 0 LP AH, 1 HP AH, 2 LP AV, 3 HP AV, 4 LP SV, 5 HP SV, 6 LP SH, 7 HP SH
  // (low/high pass; horizontal/vertical analysis/synthesis).
  typedef int coef_tab_t [NFILT][NTAP];
  localparam coef_tab_t COEF = '{
    '{  9728,  4608, -1024,  -512,   256,    0,    0,    0 },
    '{ -9122,  4703,   664,  -659,  -218,   62,   19,  -10 },
    '{ 10240,  4096, -1024,     0,     0,    0,    0,    0 },
    '{ -9558,  4267,   683,  -171,     0,    0,    0,    0 },
    '{  9558,  4096,  -683,     0,     0,    0,    0,    0 },
    '{-10240,  4267,  1024,  -171,     0,    0,    0,    0 },
    '{  9122,  4608,  -664,  -512,   218,    0,  -19,    0 },
    '{ -9728,  4703,  1024,  -659,  -256,   62,    0,  -10 }
  };

  // Graph input vertices: one per distinct non-zero coefficient magnitude
  // of each tap m over the eight vectors. A vertex is fed either by x_m or
  // by ground.
  typedef int vert_tab_t [NVERT];
  localparam vert_tab_t VERT_TAP = '{
    0, 0, 0, 0,  1, 1, 1, 1,  2, 2, 2,  3, 3, 3,  4, 4,  5,  6,  7 };
  localparam vert_tab_t VERT_MAG = '{
    9728, 9122, 10240, 9558,  4608, 4703, 4096, 4267,  1024, 664, 683,
    512, 659, 171,  256, 218,  62,  19,  10 };

  // Positive and negative digit masks of the CSD form of a magnitude.
  typedef struct packed {
    logic [CSD_W-1:0] pos;
    logic [CSD_W-1:0] neg;
  } csd_t;

  function automatic csd_t csd(int mag);
    csd_t r;
    int   v;
    r = '0;
    v = mag;
    for (int k = 0; k < CSD_W; k++) begin
      if (v % 2 != 0) begin
        if (v % 4 == 3) begin
          r.neg[k] = 1'b1;
          v = v + 1;
        end else begin
          r.pos[k] = 1'b1;
          v = v - 1;
        end
      end
      v = v / 2;
    end
    return r;
  endfunction

endpackage
