// tb_subband_filter_top: end-to-end test of the three-stage filter bank at
// its default (and only) size.
//
// For each dimension (horizontal: HA then HS; vertical: VA then VS):
//   1. analysis: after PRE zeros, a line of N random samples, sync on the
//      first, then zeros,
//      goes through the bank; the interleaved 8-band output is compared
//      sample by sample with three reference stages (D = 1, 2, 4);
//   2. synthesis: that band stream is sent back through the bank in the
//      matching synthesis mode (D = 4, 2, 1), including the outputs that
//      precede the sync (the filters' response ahead of the line start),
//      with sync at the same position, and compared with the
//      reference model, and the result must reconstruct the original line
//      to within a few LSBs (the only error is the rounding of each stage).
// The latency from sync in to sync out must be 7*(1+2+4) + 3*5 + 2 = 66 clocks
// after the capturing edge. Counted mechanisms, each of which must occur:
// the four modes, analysis-to-synthesis and horizontal-to-vertical mode
// switches, and output samples in each of the eight band positions
// (LLL .. HHH) that are non-zero.
module tb_subband_filter_top;
  import sbf_ref_pkg::*;

  localparam int N = 512, PAD = 192, LEN = N + PAD, PRE = 64, LAT = 66;
  localparam int TOL = 8;   // six roundings; up to 6 LSB seen

  logic        clk = 0, rst_n = 0;
  logic [1:0]  mode = 0;
  logic        in_sync = 0, out_sync;
  logic [11:0] in_data = '0, out_data;
  int          checks = 0, failures = 0;
  int          mode_runs [4];
  int          band_hits [8];
  int          switches_as = 0, switches_hv = 0;
  int          last_mode = -1;
  int          max_err = 0;

  subband_filter_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Send x (PRE + LEN samples) through the bank in mode md, with in_sync on
  // sample PRE. Return the PRE + LEN output samples aligned the same way
  // (out_sync on index PRE).
  task automatic pass(int md, seq_t x, output seq_t y);
    int out_log [$];
    int t_out;
    y = new[PRE + LEN];
    if (last_mode >= 0) begin
      if ((last_mode >= 2) != (md >= 2)) switches_as++;
      if ((last_mode == 0 || last_mode == 3) != (md == 0 || md == 3)) switches_hv++;
    end
    last_mode = md;
    mode_runs[md]++;
    @(negedge clk);
    rst_n   = 0;
    mode    = 2'(md);
    in_sync = 0;
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t_out = -1;
    for (int i = 0; i < PRE + LEN + LAT + 10; i++) begin
      if (i > 0) begin
        // output of the edge that took in sample i-1
        out_log.push_back(int'($signed(out_data)));
        if (out_sync && t_out < 0) t_out = i - 1;
      end
      in_sync = (i == PRE);
      in_data = (i < PRE + LEN) ? 12'(x[i]) : '0;
      @(negedge clk);
    end
    checks++;
    if (t_out - PRE != LAT) fail($sformatf("mode %0d latency %0d expected %0d", md, t_out - PRE, LAT));
    for (int n = 0; n < PRE + LEN; n++)
      y[n] = (t_out - PRE + n < out_log.size()) ? out_log[t_out - PRE + n] : 0;
  endtask

  task automatic dimension(int ana, int syn);
    seq_t x, ya, ys, ra, rs;
    x = new[PRE + LEN];
    for (int i = 0; i < PRE + LEN; i++)
      x[i] = (i >= PRE && i < PRE + N) ? ($urandom_range(900) - 450) : 0;

    // analysis
    ra = x;
    for (int s = 0; s < 3; s++) ra = ref_stage(ra, 1 << s, ana);
    pass(ana, x, ya);
    for (int n = 0; n < PRE + N + 64; n++) begin
      checks++;
      if (ya[n] != ra[n]) fail($sformatf("analysis mode %0d n=%0d got %0d exp %0d", ana, n - PRE, ya[n], ra[n]));
      if (n >= PRE && n < PRE + N && ya[n] != 0) band_hits[n % 8]++;
    end

    // synthesis of the analysed stream
    rs = ya;
    for (int s = 2; s >= 0; s--) rs = ref_stage(rs, 1 << s, syn);
    pass(syn, ya, ys);
    for (int n = 0; n < PRE + N + 64; n++) begin
      checks++;
      if (ys[n] != rs[n]) fail($sformatf("synthesis mode %0d n=%0d got %0d exp %0d", syn, n - PRE, ys[n], rs[n]));
    end
    for (int n = PRE; n < PRE + N; n++) begin
      int e;
      e = ys[n] - x[n];
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL) fail($sformatf("reconstruction mode %0d n=%0d got %0d input %0d", syn, n - PRE, ys[n], x[n]));
    end
  endtask

  initial begin
    dimension(0, 3);   // HA then HS
    dimension(1, 2);   // VA then VS
    dimension(0, 3);   // back to horizontal
    $display("modes run HA=%0d VA=%0d VS=%0d HS=%0d; analysis/synthesis switches=%0d; h/v switches=%0d; max reconstruction error=%0d",
             mode_runs[0], mode_runs[1], mode_runs[2], mode_runs[3], switches_as, switches_hv, max_err);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_runs[m] == 0) fail($sformatf("mode %0d never run", m));
    end
    checks++;
    if (switches_as == 0) fail("no analysis/synthesis switch");
    checks++;
    if (switches_hv == 0) fail("no horizontal/vertical switch");
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (band_hits[b] == 0) fail($sformatf("band position %0d never non-zero", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
