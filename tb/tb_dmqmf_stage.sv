// tb_dmqmf_stage: runs one DMQMF stage in every mode (HA, VA, VS, HS) and
// with every inter-tap delay (D = 1, 2, 4) and compares its output stream
// with the multiplying reference model.
//
// For each configuration the stage is reset, a line of N random samples is
// sent with sync on the first, followed by zeros. The output is collected
// from the clock that carries out.sync and compared sample by sample with
// ref_stage() over the zero-extended line; the LP/HP alternation every D
// samples, driven by the position label carried with each sample, is part
// of what is compared. The clock count from in.sync to
// out.sync must be 7*D + 5 clocks after the edge that takes in the first
// sample (7*D + 6 counted from the clock the sample is driven).
module tb_dmqmf_stage;
  import sbf_pkg::*;
  import sbf_ref_pkg::*;

  localparam int N = 96, PAD = 64, LEN = N + PAD;

  logic       clk = 0, rst_n = 0;
  mode_e      mode = MODE_HA;
  logic [1:0] dsel = 0;
  stream_t    s_in, s_out;
  int         checks = 0, failures = 0;

  dmqmf_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int md, int ds);
    seq_t x, y;
    int   got [LEN];
    int   t_in, t_out, ngot, cyc;
    x = new[LEN];
    for (int i = 0; i < LEN; i++)
      x[i] = (i < N) ? ($urandom_range(1600) - 800) : 0;
    y = ref_stage(x, 1 << ds, md);

    rst_n = 0;
    s_in  = '0;
    mode  = mode_e'(md);
    dsel  = 2'(ds);
    repeat (2) @(negedge clk);
    rst_n = 1;
    ngot = 0; t_out = -1; t_in = 0; cyc = 0;
    for (int i = 0; i < LEN + 100; i++) begin
      @(negedge clk);
      // output of the previous clock edge
      if (s_out.sync && t_out < 0 && i > 1) t_out = cyc;
      if (t_out >= 0 && ngot < LEN) begin got[ngot] = int'(s_out.data); ngot++; end
      s_in.sync  = (i == 0);
      s_in.phase = 3'(i);
      s_in.data = (i < LEN) ? sample_t'(x[i]) : '0;
      if (i == 0) t_in = cyc;
      cyc++;
    end
    checks++;
    if (t_out - t_in != 7 * (1 << ds) + 6) begin
      failures++;
      $display("FAIL mode=%0d D=%0d latency %0d expected %0d", md, 1 << ds, t_out - t_in,
               7 * (1 << ds) + 6);
    end
    for (int n = 0; n < N + 32; n++) begin
      checks++;
      if (got[n] != y[n]) begin
        failures++;
        if (failures < 20) $display("FAIL mode=%0d D=%0d n=%0d got %0d expected %0d",
                                    md, 1 << ds, n, got[n], y[n]);
      end
    end
  endtask

  initial begin
    s_in = '0;
    for (int md = 0; md < 4; md++)
      for (int ds = 0; ds < 3; ds++) run(md, ds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
