// fir_pkg -- shared constants and elaboration-time helpers for the
// transpose-form block FIR filters.
//
// Defaults: block size L = 4 and filter length N = 16 are the worked example of
// the architecture; 4-bit samples and coefficients match the reference
// simulation of the design. Both the number format (two's complement) and the
// coefficient tables are this implementation's choices: the tables below are
// deterministic placeholders of a symmetric (linear-phase) shape with mixed
// signs, meant to be replaced by real channel filters through the modules'
// ROM_FLAT / H_FLAT parameters.
//
// Also provided: the canonical-signed-digit (non-adjacent form) digit function
// used to turn a constant multiplication into shifts and adds/subtracts.
package fir_pkg;

  localparam int DEF_L        = 4;
  localparam int DEF_N        = 16;
  localparam int DEF_X_W      = 4;
  localparam int DEF_H_W      = 4;
  localparam int DEF_NUM_FILT = 4;

  // Upper bound on the width of a flattened coefficient table.
  localparam int MAX_FLAT = 8192;

  // Placeholder coefficient i of filter f, for an n-tap filter with h_w-bit
  // coefficients:  with t = min(i, n-1-i),
  //   h = ((5*(f+1)*(t+1) + 3*f) mod 2^h_w) - 2^(h_w-1)
  function automatic int default_coef(int f, int i, int n, int h_w);
    int t;
    int span;
    t    = (i < n - 1 - i) ? i : n - 1 - i;
    span = 1 << h_w;
    return ((5 * (f + 1) * (t + 1) + 3 * f) % span) - (span >> 1);
  endfunction

  // Table of nf filters of n coefficients, flattened: coefficient i of filter
  // f occupies bits [(f*n+i)*h_w +: h_w].
  function automatic logic [MAX_FLAT-1:0] default_table(int nf, int n, int h_w);
    logic [MAX_FLAT-1:0] t;
    int v;
    t = '0;
    for (int f = 0; f < nf; f++) begin
      for (int i = 0; i < n; i++) begin
        v = default_coef(f, i, n, h_w);
        for (int b = 0; b < h_w; b++) t[(f * n + i) * h_w + b] = v[b];
      end
    end
    return t;
  endfunction

  // Digit b (-1, 0 or +1) of the non-adjacent form of the signed constant c.
  function automatic int csd_digit(longint c, int b);
    longint v;
    int d;
    v = c;
    d = 0;
    for (int i = 0; i <= b; i++) begin
      if (v[0]) d = 2 - int'(v & 64'sd3);
      else      d = 0;
      v = (v - longint'(d)) >>> 1;
    end
    return d;
  endfunction

endpackage
