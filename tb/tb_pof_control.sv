// tb_pof_control: checks the vertex switch and inversion decode for all
// eight filter identifier codes. For each code and each tap m, the signed
// sum of the magnitudes of the enabled vertices of tap m must equal that
// filter's coefficient c[m] (taken from the reference table), at most one
// vertex per tap may be enabled, a disabled vertex must not be marked
// inverted, and corr must equal the sum of the magnitudes of the negative
// coefficients. Over all codes exactly 14 vertices are ever inverted.
module tb_pof_control;
  import sbf_pkg::*;
  import sbf_ref_pkg::*;

  fid_t             fid;
  logic [NVERT-1:0] vert_en, vert_inv, inv_any;
  corr_t            corr;
  int               checks = 0, failures = 0;

  pof_control dut (.*);

  initial begin
    #100000;
    failures++;
    checks++;
    if ($countones(inv_any) != 14) begin
      failures++;
      $display("FAIL %0d vertices inverted in some filter, expected 14", $countones(inv_any));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inv_any = '0;
    for (int f = 0; f < 8; f++) begin
      int neg;
      fid = fid_t'(f);
      #1;
      inv_any |= vert_inv;
      neg = 0;
      for (int m = 0; m < 8; m++) if (REF_COEF[f][m] < 0) neg -= REF_COEF[f][m];
      checks++;
      if (int'(corr) != neg) begin
        failures++;
        $display("FAIL fid=%0d corr %0d expected %0d", f, corr, neg);
      end
      for (int m = 0; m < 8; m++) begin
        int sum, cnt;
        sum = 0;
        cnt = 0;
        for (int v = 0; v < NVERT; v++)
          if (VERT_TAP[v] == m && vert_en[v]) begin
            sum += vert_inv[v] ? -VERT_MAG[v] : VERT_MAG[v];
            cnt++;
          end
        checks++;
        if (sum != REF_COEF[f][m] || cnt > 1) begin
          failures++;
          $display("FAIL fid=%0d m=%0d coefficient %0d expected %0d (%0d vertices)",
                   f, m, sum, REF_COEF[f][m], cnt);
        end
      end
      checks++;
      if ((vert_inv & ~vert_en) != '0) begin
        failures++;
        $display("FAIL fid=%0d inversion on a grounded vertex", f);
      end
    end
    checks++;
    if ($countones(inv_any) != 14) begin
      failures++;
      $display("FAIL %0d vertices inverted in some filter, expected 14", $countones(inv_any));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
