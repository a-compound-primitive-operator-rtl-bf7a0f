// fold_adders: folding addition of a symmetric FIR.
//
// Because the coefficients are symmetric about the centre, the two samples
// that share a coefficient are added before weighting:
//   x_0[n] = x[n],   x_m[n] = x[n+mD] + x[n-mD]   (m = 1..NH).
// Each 12-bit pair gives a 13-bit sum, so nothing is lost. The sums are
// registered: one clock from the taps to fold_out.
//
// The folding addition and the 13-bit word after it follow the source design;
// the output register is this design's own pipeline choice.
module fold_adders
  import sbf_pkg::*;
#(
  parameter int unsigned NH = sbf_pkg::HALF   // taps each side of centre
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t centre,
  input  sample_t ahead    [NH+1],   // x[n+mD], index 0 unused
  input  sample_t behind   [NH+1],   // x[n-mD], index 0 unused
  output fold_t   fold_out [NH+1]
);

  fold_t sum [NH+1];

  always_comb begin
    sum[0] = fold_t'(centre);
    for (int m = 1; m <= NH; m++)
      sum[m] = fold_t'(ahead[m]) + fold_t'(behind[m]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m <= NH; m++) fold_out[m] <= '0;
    end else begin
      for (int m = 0; m <= NH; m++) fold_out[m] <= sum[m];
    end
  end

endmodule
