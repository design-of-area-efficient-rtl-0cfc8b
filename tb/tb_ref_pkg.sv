// tb_ref_pkg -- reference helpers shared by the testbenches.
//
// ref_coef() restates the placeholder coefficient formula of the design
// independently of the RTL package:
//   t = min(i, n-1-i),  h = ((5*(f+1)*(t+1) + 3*f) mod 2^h_w) - 2^(h_w-1).
// sext() sign-extends a w-bit field to an int.
package tb_ref_pkg;

  function automatic int ref_coef(int f, int i, int n, int h_w);
    int t, v;
    t = i;
    if (n - 1 - i < t) t = n - 1 - i;
    v = 5 * (f + 1) * (t + 1) + 3 * f;
    v = v - (v / (2 ** h_w)) * (2 ** h_w);
    return v - 2 ** (h_w - 1);
  endfunction

  function automatic int sext(longint v, int w);
    longint m;
    m = longint'(1) << w;
    v = v & (m - 1);
    if (v >= (m >> 1)) v = v - m;
    return int'(v);
  endfunction

endpackage
