// block_ipu -- inner-product unit.
//
// L inner-product cells share one short weight vector c_m; cell l takes row l
// of S0_k and produces r[l] = r^m(kL-l), so the unit computes the block of L
// partial filter outputs r^m_k = S0_k * c_m. Combinational. In the filter one
// unit exists per weight vector (M = N/L units); this implementation numbers
// the units by the weight vector they use.
module block_ipu #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_X_W,
  parameter int H_W = fir_pkg::DEF_H_W,
  localparam int R_W = X_W + H_W + $clog2(L)
) (
  input  logic signed [X_W-1:0] rows [L][L],
  input  logic signed [H_W-1:0] c    [L],
  output logic signed [R_W-1:0] r    [L]
);

  for (genvar l = 0; l < L; l++) begin : g_ipc
    block_ipc #(.L(L), .X_W(X_W), .H_W(H_W)) u_ipc (
      .row(rows[l]),
      .c  (c),
      .r  (r[l])
    );
  end

endmodule
