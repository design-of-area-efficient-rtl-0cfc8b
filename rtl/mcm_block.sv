// mcm_block -- multiple-constant-multiplication block for one input sample.
//
// In the MCM-based fixed filter each of the 2L-1 distinct samples
// x(kL-S), S = 0 .. 2L-2, of the input matrix gets one MCM block. Sample
// x(kL-S) appears in row l = S-j, column j of S0_k for every j with
// 0 <= j <= L-1 and 0 <= S-j <= L-1, and there it meets the coefficients
// h(j + mL) of all M weight vectors. The block forms each of these products
// exactly once, prod[j][m] = x * h(j+mL), and the adder network reuses it in
// every inner product that needs it (the sharing across rows and columns of
// the coefficient matrix). Positions (j) that do not pair with this sample
// are driven to zero and are not connected to anything by the adder network.
//
// No multiplier is built. Every constant is split at elaboration into
// sign * odd part * 2^shift. Constants of the block that share an odd part
// share one shift-and-add/subtract network for x * (odd part), derived from
// its canonical-signed-digit (non-adjacent) form; the others are that result
// shifted and, for negative constants, negated. Deeper sub-expression sharing
// (partial sums reused between different odd parts, as a dedicated MCM
// optimiser would find) is not attempted; that is this implementation's
// simplification.
// Combinational. Coefficient i lives at H_FLAT[i*H_W +: H_W].
module mcm_block #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_X_W,
  parameter int H_W = fir_pkg::DEF_H_W,
  parameter int S   = 0,
  parameter logic [N*H_W-1:0] H_FLAT = (N*H_W)'(fir_pkg::default_table(1, N, H_W)),
  localparam int M   = N / L,
  localparam int P_W = X_W + H_W
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [P_W-1:0] prod [L][M]
);

  localparam int ND = H_W + 1;  // digits of a non-adjacent form of an H_W-bit value

  function automatic int coef(int idx);
    logic signed [H_W-1:0] v;
    v = H_FLAT[idx*H_W +: H_W];
    return int'(v);
  endfunction

  function automatic bit pairs(int j);
    return (j <= S) && (S - j < L);
  endfunction

  // |c| with its trailing zeros removed (0 for c = 0), and the shift removed.
  function automatic int odd_part(int c);
    int a;
    a = (c < 0) ? -c : c;
    if (a == 0) return 0;
    while (a % 2 == 0) a = a / 2;
    return a;
  endfunction

  function automatic int tz(int c);
    int a, n;
    a = (c < 0) ? -c : c;
    n = 0;
    if (a == 0) return 0;
    while (a % 2 == 0) begin a = a / 2; n++; end
    return n;
  endfunction

  // First product of this block, in (j, m) order, whose constant has the
  // same odd part as h(j+mL): its odd multiple of x is shared.
  function automatic int rep(int j, int m);
    int o;
    o = odd_part(coef(j + m*L));
    for (int jj = 0; jj < L; jj++)
      for (int mm = 0; mm < M; mm++)
        if (pairs(jj) && odd_part(coef(jj + mm*L)) == o) return jj*M + mm;
    return j*M + m;
  endfunction

  logic signed [P_W-1:0] xe;
  assign xe = P_W'(x);

  // fund[j][m]: x times the odd part of h(j+mL), built only where (j, m) is
  // the representative of its odd part; zero elsewhere.
  logic signed [P_W-1:0] fund [L][M];

  for (genvar j = 0; j < L; j++) begin : g_col
    for (genvar m = 0; m < M; m++) begin : g_coef
      localparam int HC = coef(j + m*L);
      localparam int O  = odd_part(HC);
      localparam int SH = tz(HC);
      localparam int R  = rep(j, m);
      if (pairs(j) && O != 0 && R == j*M + m) begin : g_fund
        logic signed [P_W-1:0] term [ND];
        for (genvar b = 0; b < ND; b++) begin : g_digit
          localparam int D = fir_pkg::csd_digit(longint'(O), b);
          if (D > 0)      begin : g_add assign term[b] =   xe <<< b;  end
          else if (D < 0) begin : g_sub assign term[b] = -(xe <<< b); end
          else            begin : g_nil assign term[b] = '0;          end
        end
        always_comb begin
          fund[j][m] = '0;
          for (int b = 0; b < ND; b++) fund[j][m] = fund[j][m] + term[b];
        end
      end else begin : g_nofund
        assign fund[j][m] = '0;
      end

      if (pairs(j) && O != 0) begin : g_used
        if (HC < 0) begin : g_neg
          assign prod[j][m] = -(fund[R / M][R % M] <<< SH);
        end else begin : g_pos
          assign prod[j][m] = fund[R / M][R % M] <<< SH;
        end
      end else begin : g_unused
        assign prod[j][m] = '0;
      end
    end
  end

endmodule
