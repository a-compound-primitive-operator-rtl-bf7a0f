// tb_subband_2d: 64-band decomposition and reconstruction of a small image
// through the three-stage bank, at its default size.
//
// The testbench plays the external stores: it arranges the data as lines and
// transposes between passes. Each line is sent as a segment of P = PRE + n +
// POST samples with in_sync at offset PRE; PRE and POST (56 each) exceed the
// 49-sample reach of the bank, so the responses of neighbouring lines never
// meet, and the segment period is a multiple of 8, so position labels run on
// without a jump. Four passes:
//   HA on the rows -> VA on the columns of the result (64 bands)
//   -> VS on the columns -> HS on the rows (reconstruction).
// Every pass is compared bit-exactly with the reference model over the
// whole stream, every one of the 8 x 8 band positions must carry non-zero
// data, and the reconstructed image must match the original to within TOL.
// The error comes from rounding in twelve stage passes and from the
// vertical filter pair, whose 15-bit coefficients reconstruct only nearly
// perfectly.
module tb_subband_2d;
  import sbf_ref_pkg::*;

  localparam int IW = 32, IH = 32;         // image size
  localparam int PRE = 56, POST = 56;
  localparam int P = PRE + IW + POST;      // segment period (IH == IW)
  localparam int LAT = 66;
  localparam int TOL = 24;   // twelve roundings; up to 17 seen

  logic        clk = 0, rst_n = 0;
  logic [1:0]  mode = 0;
  logic        in_sync = 0, out_sync;
  logic [11:0] in_data = '0, out_data;
  int          checks = 0, failures = 0;

  subband_filter_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Stream x through the bank in mode md, sync at every segment offset PRE;
  // y[i] is the result for position i. Also checks y against the model.
  task automatic pass(int md, seq_t x, output seq_t y);
    seq_t r;
    int   n, first_sync;
    n = x.size();
    y = new[n];
    @(negedge clk);
    rst_n   = 0;
    mode    = 2'(md);
    in_sync = 0;
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    first_sync = -1;
    for (int i = 0; i < n + LAT + 2; i++) begin
      if (i > 0) begin
        int p;
        p = i - 1 - LAT;              // position of the result now at the output
        if (p >= 0 && p < n) y[p] = int'($signed(out_data));
        if (out_sync && first_sync < 0) first_sync = i - 1;
      end
      in_sync = (i < n) && (i % P == PRE);
      in_data = (i < n) ? 12'(x[i]) : '0;
      @(negedge clk);
    end
    checks++;
    if (first_sync != PRE + LAT) fail($sformatf("mode %0d first out_sync at %0d, expected %0d", md, first_sync, PRE + LAT));
    r = x;
    if (md < 2) for (int s = 0; s < 3; s++)  r = ref_stage(r, 1 << s, md);
    else        for (int s = 2; s >= 0; s--) r = ref_stage(r, 1 << s, md);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (y[i] != r[i]) fail($sformatf("mode %0d position %0d got %0d expected %0d", md, i, y[i], r[i]));
    end
  endtask

  initial begin
    int   img [IH][IW];
    seq_t s, a, b, v, h;
    int   band_hits [8][8];
    int   max_err, bands_seen;

    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) img[r][c] = $urandom_range(800) - 400;

    // rows, horizontal analysis: extended rows of P samples
    s = new[IH * P];
    foreach (s[i]) s[i] = 0;
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) s[r * P + PRE + c] = img[r][c];
    pass(0, s, a);                                  // a[r*P + c'] = A[r][c']

    // columns of A, vertical analysis: P columns, each an extended column
    s = new[P * P];
    foreach (s[i]) s[i] = 0;
    for (int c = 0; c < P; c++)
      for (int r = 0; r < IH; r++) s[c * P + PRE + r] = a[r * P + c];
    pass(1, s, b);                                  // b[c'*P + r'] = B[r'][c']

    // every one of the 64 band positions carries data
    foreach (band_hits[i, j]) band_hits[i][j] = 0;
    for (int c = PRE; c < PRE + IW; c++)
      for (int r = PRE; r < PRE + IH; r++)
        if (b[c * P + r] != 0) band_hits[(r - PRE) % 8][(c - PRE) % 8]++;
    bands_seen = 0;
    foreach (band_hits[i, j]) begin
      checks++;
      if (band_hits[i][j] == 0) fail($sformatf("band (%0d,%0d) empty", i, j));
      else bands_seen++;
    end

    // vertical synthesis of the band image, column by column
    pass(2, b, v);                                  // v[c'*P + r'] = A'[r'][c']

    // horizontal synthesis of the rows
    s = new[IH * P];
    foreach (s[i]) s[i] = 0;
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < P; c++) s[r * P + c] = v[c * P + PRE + r];
    pass(3, s, h);

    max_err = 0;
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        int e;
        e = h[r * P + PRE + c] - img[r][c];
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL) fail($sformatf("pixel (%0d,%0d) got %0d expected %0d", r, c, h[r * P + PRE + c], img[r][c]));
      end
    $display("bands with data: %0d of 64; max reconstruction error %0d", bands_seen, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
