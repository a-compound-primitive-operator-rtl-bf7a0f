// sbf_ref_pkg: reference model of the sub-band filter bank for the
// testbenches, written with ordinary multiplications and kept apart from
// the RTL's tables.
//
// REF_COEF repeats the eight coefficient vectors c[0..7] in the order of the
// filter identifier code (LP AH, HP AH, LP AV, HP AV, LP SV, HP SV, LP SH,
// HP SH). ref_stage() filters a whole sequence the way one DMQMF stage does:
// for centre position n the vector is LP when floor(n/D) is even and HP
// otherwise, samples outside the sequence are zero, and the sum is divided
// by 2^14 (analysis) or 2^13 (synthesis), rounded half up and saturated to
// 12 bits.
package sbf_ref_pkg;

  localparam int REF_COEF [8][8] = '{
    '{  9728,  4608, -1024,  -512,   256,    0,    0,    0 },
    '{ -9122,  4703,   664,  -659,  -218,   62,   19,  -10 },
    '{ 10240,  4096, -1024,     0,     0,    0,    0,    0 },
    '{ -9558,  4267,   683,  -171,     0,    0,    0,    0 },
    '{  9558,  4096,  -683,     0,     0,    0,    0,    0 },
    '{-10240,  4267,  1024,  -171,     0,    0,    0,    0 },
    '{  9122,  4608,  -664,  -512,   218,    0,  -19,    0 },
    '{ -9728,  4703,  1024,  -659,  -256,   62,    0,  -10 }
  };

  typedef int seq_t [];

  function automatic int sat12(longint v);
    if (v > 2047)  return 2047;
    if (v < -2048) return -2048;
    return int'(v);
  endfunction

  // unscaled inner product for centre n of x with filter f
  function automatic longint ref_acc(seq_t x, int n, int d, int f);
    longint acc;
    int     len;
    len = x.size();
    acc = longint'(REF_COEF[f][0]) * x[n];
    for (int m = 1; m < 8; m++) begin
      longint a, b;
      a = (n + m * d < len) ? x[n + m * d] : 0;
      b = (n - m * d >= 0)  ? x[n - m * d] : 0;
      acc += longint'(REF_COEF[f][m]) * (a + b);
    end
    return acc;
  endfunction

  // mode: 0 HA, 1 VA, 2 VS, 3 HS
  function automatic seq_t ref_stage(seq_t x, int d, int mode);
    seq_t y;
    int   sh;
    y  = new[x.size()];
    sh = (mode >= 2) ? 13 : 14;
    for (int n = 0; n < x.size(); n++) begin
      int f;
      f    = 2 * mode + ((n / d) % 2);
      y[n] = sat12((ref_acc(x, n, d, f) + (64'sd1 <<< (sh - 1))) >>> sh);
    end
    return y;
  endfunction

endpackage
