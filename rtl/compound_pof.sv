// compound_pof: multiplier-free multiply-accumulate for all eight filters.
//
// Computes acc = sum_m c_f[m] * x_m for the filter f chosen by the control
// unit, with no multipliers. The coefficient magnitudes of all eight filters
// are held by a single shared shift-and-add graph:
//
//   stage A  input vertices: vertex v is fed by its tap's folded sample x_m,
//            bit-inverted if its coefficient is negative, or by ground
//            (vert_en / vert_inv from pof_control). 13-bit result.
//   stage B  digit planes: every vertex magnitude is written in canonical
//            signed digit form; plane k adds or subtracts every vertex whose
//            magnitude has a digit at 2^k. The planes are shared by all
//            vertices, which is where the graph reuses adders across filters.
//   stage C  weighted sum: acc = sum_k P_k * 2^k + corr, 28 bits wide.
//
// Input data inversion: a bitwise inverter gives ~x = -x - 1, i.e. the
// negated sample less one. Over all inverted vertices of the selected filter
// this leaves the sum short by the sum of their magnitudes; pof_control
// supplies that sum as corr (a constant per filter) and stage C adds it
// back, so the result is exact. Only the 14 vertices whose coefficient is
// negative in at least one filter ever see vert_inv = 1, so only they need
// inverters.
//
// Each stage ends in a register, so acc follows x_m / vert_en by three
// clocks. Intermediate sums may wrap in 28-bit two's complement; the final
// sum always fits, because only one vertex per tap is active and
// |c[0]| + ... + |c[7]| <= 16442 for every filter.
//
// Following the source design: a graph realisation of the multiplier
// array covering all eight filters, input vertex switching, input data
// inversion, three pipeline stages and a 28-bit internal word. The graph's
// structure itself (digit planes) and the correction term are this design's
// own.
module compound_pof
  import sbf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  fold_t            x_in [NTAP],   // folded samples x_0..x_7
  input  logic [NVERT-1:0] vert_en,
  input  logic [NVERT-1:0] vert_inv,
  input  corr_t            corr,          // sum of |c| over inverted vertices
  output acc_t             acc
);

  localparam int unsigned PL_W = FOLD_W + 5;   // up to 19 terms a plane

  typedef fold_t vin_t;
  typedef logic signed [PL_W-1:0]  plane_t;
  typedef logic [NVERT-1:0][CSD_W-1:0] dmask_t;

  function automatic dmask_t digit_mask(logic want_neg);
    dmask_t r;
    for (int v = 0; v < NVERT; v++) begin
      csd_t d;
      d    = csd(VERT_MAG[v]);
      r[v] = want_neg ? d.neg : d.pos;
    end
    return r;
  endfunction

  localparam dmask_t DPOS = digit_mask(1'b0);
  localparam dmask_t DNEG = digit_mask(1'b1);

  // ---- stage A: input vertex switches and data inversion ----
  vin_t vin_d [NVERT];
  vin_t vin_q [NVERT];

  always_comb begin
    for (int v = 0; v < NVERT; v++) begin
      if (!vert_en[v])      vin_d[v] = '0;
      else if (vert_inv[v]) vin_d[v] = ~x_in[VERT_TAP[v]];
      else                  vin_d[v] = x_in[VERT_TAP[v]];
    end
  end

  // ---- stage B: digit-plane adders ----
  plane_t plane_d [CSD_W];
  plane_t plane_q [CSD_W];

  always_comb begin
    for (int k = 0; k < CSD_W; k++) begin
      plane_d[k] = '0;
      for (int v = 0; v < NVERT; v++) begin
        if (DPOS[v][k]) plane_d[k] = plane_d[k] + plane_t'(vin_q[v]);
        if (DNEG[v][k]) plane_d[k] = plane_d[k] - plane_t'(vin_q[v]);
      end
    end
  end

  // ---- stage C: shifted sum of the planes plus the inversion correction ----
  acc_t  acc_d;
  corr_t corr_a, corr_b;

  always_comb begin
    acc_d = acc_t'(corr_b);
    for (int k = 0; k < CSD_W; k++)
      acc_d = acc_d + (acc_t'(plane_q[k]) <<< k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVERT; v++) vin_q[v] <= '0;
      corr_a <= '0;
      corr_b <= '0;
      for (int k = 0; k < CSD_W; k++) plane_q[k] <= '0;
      acc <= '0;
    end else begin
      for (int v = 0; v < NVERT; v++) vin_q[v] <= vin_d[v];
      corr_a <= corr;
      corr_b <= corr_a;
      for (int k = 0; k < CSD_W; k++) plane_q[k] <= plane_d[k];
      acc <= acc_d;
    end
  end

endmodule
