// mcm_adder_net -- adder network of the MCM-based fixed block filter.
//
// Collects the sample-coefficient products of the 2L-1 MCM blocks into the
// L*M inner products of the fixed filter,
//   r[m][l] = sum_{j=0}^{L-1} x(kL-l-j) * h(j+mL),
// where prod[s][j][m] = x(kL-s) * h(j+mL) comes from the MCM block of sample
// s = l+j. Each inner product is a log2(L)-deep adder tree. Combinational;
// full-precision results of X_W + H_W + clog2(L) bits, laid out like the
// partial results of the inner-product units so the same pipeline adder unit
// can follow.
module mcm_adder_net #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_X_W,
  parameter int H_W = fir_pkg::DEF_H_W,
  localparam int M   = N / L,
  localparam int P_W = X_W + H_W,
  localparam int R_W = P_W + $clog2(L)
) (
  input  logic signed [P_W-1:0] prod [2*L-1][L][M],
  output logic signed [R_W-1:0] r    [M][L]
);

  for (genvar m = 0; m < M; m++) begin : g_m
    for (genvar l = 0; l < L; l++) begin : g_l
      logic signed [P_W-1:0] ops [L];
      for (genvar j = 0; j < L; j++) begin : g_j
        assign ops[j] = prod[l+j][j][m];
      end
      adder_tree #(.N_IN(L), .IN_W(P_W), .OUT_W(R_W)) u_tree (
        .a  (ops),
        .sum(r[m][l])
      );
    end
  end

endmodule
