// tb_dmqmf_delay_line: checks the tapped delay line against a history of
// the words written, for every inter-tap delay D = 1, 2, 4.
//
// Random words are shifted in, one per clock; after each clock the centre
// and the 2*HALF side taps are compared with the words that entered HALF*D,
// (HALF-m)*D and (HALF+m)*D clocks earlier. dsel is changed every 200
// clocks. A watchdog ends the run with a failure if it hangs.
module tb_dmqmf_delay_line;
  localparam int W = 13, HALF = 7, DSEL_MAX = 2;
  localparam int LEN = 2 * HALF * (1 << DSEL_MAX) + 1;

  logic         clk = 0, rst_n = 0;
  logic [1:0]   dsel = 0;
  logic [W-1:0] d_in = '0;
  logic [W-1:0] centre, ahead [HALF+1], behind [HALF+1];
  int           checks = 0, failures = 0;
  logic [W-1:0] hist [$];          // hist[0] = newest word

  dmqmf_delay_line #(.W(W), .HALF(HALF), .DSEL_MAX(DSEL_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s dsel=%0d got %h exp %h", what, dsel, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < LEN; i++) hist.push_front('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int d;
      @(negedge clk);
      dsel = 2'((t / 200) % 3);
      d_in = W'($urandom);
      @(posedge clk);
      hist.push_front(d_in);
      void'(hist.pop_back());
      #1;
      d = 1 << dsel;
      check(centre, hist[HALF * d], "centre");
      for (int m = 1; m <= HALF; m++) begin
        check(ahead[m],  hist[(HALF - m) * d], "ahead");
        check(behind[m], hist[(HALF + m) * d], "behind");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
