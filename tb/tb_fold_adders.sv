// tb_fold_adders: checks x_0 = x[n] and x_m = x[n+mD] + x[n-mD] on random
// 12-bit inputs, including the extreme values, one clock after they are
// applied.
module tb_fold_adders;
  import sbf_pkg::*;

  logic    clk = 0, rst_n = 0;
  sample_t centre;
  sample_t ahead [HALF+1], behind [HALF+1];
  fold_t   fold_out [HALF+1];
  int      checks = 0, failures = 0;

  fold_adders dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [HALF+1];
    centre = '0;
    for (int m = 0; m <= HALF; m++) begin ahead[m] = '0; behind[m] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int m = 0; m <= HALF; m++) begin
        case (t % 4)
          0:       begin ahead[m] = -12'sd2048; behind[m] = -12'sd2048; end
          1:       begin ahead[m] = 12'sd2047;  behind[m] = 12'sd2047;  end
          default: begin ahead[m] = sample_t'($urandom); behind[m] = sample_t'($urandom); end
        endcase
      end
      centre = sample_t'($urandom);
      exp[0] = int'(centre);
      for (int m = 1; m <= HALF; m++) exp[m] = int'(ahead[m]) + int'(behind[m]);
      @(posedge clk);
      #1;
      for (int m = 0; m <= HALF; m++) begin
        checks++;
        if (int'(fold_out[m]) != exp[m]) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d got %0d exp %0d", m, fold_out[m], exp[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
