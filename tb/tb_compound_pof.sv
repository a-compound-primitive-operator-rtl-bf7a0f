// tb_compound_pof: checks the multiplier-free graph against a direct
// weighted sum. Each clock it applies random folded samples x_0..x_7
// (extreme values included) and a random pattern of vertex enables and
// inversions, and three clocks later compares acc with
//   sum_v en_v * (+/-) |c_v| * x_tap(v)   (mod 2^28).
// The latency of exactly three clocks is checked with it.
module tb_compound_pof;
  import sbf_pkg::*;

  logic             clk = 0, rst_n = 0;
  fold_t            x_in [NTAP];
  logic [NVERT-1:0] vert_en = '0, vert_inv = '0;
  corr_t            corr = '0;
  acc_t             acc;
  int               checks = 0, failures = 0;
  acc_t             expq [$];

  compound_pof dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic acc_t expected();
    longint s;
    s = longint'(corr);
    for (int v = 0; v < NVERT; v++)
      if (vert_en[v])
        s += longint'(VERT_MAG[v])
             * (vert_inv[v] ? -longint'(x_in[VERT_TAP[v]]) - 1 : longint'(x_in[VERT_TAP[v]]));
    return acc_t'(s);
  endfunction

  initial begin
    for (int m = 0; m < NTAP; m++) x_in[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int m = 0; m < NTAP; m++)
        case (t % 5)
          0:       x_in[m] = fold_t'(-4096);
          1:       x_in[m] = fold_t'(4094);
          default: x_in[m] = fold_t'($urandom);
        endcase
      vert_en  = NVERT'($urandom);
      vert_inv = NVERT'($urandom);
      corr     = corr_t'($urandom);
      expq.push_back(expected());
      if (expq.size() > 3) begin
        acc_t e;
        e = expq.pop_front();
        checks++;
        if (acc !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d acc %0d expected %0d", t, acc, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
