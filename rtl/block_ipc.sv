// block_ipc -- L-point inner-product cell.
//
// Computes r = sum_j row[j] * c[j] for one row of the input matrix S0_k and
// one short weight vector c_m = {h(mL), ..., h(mL+L-1)}. L signed multipliers
// feed a carry-save adder tree (csa_tree): for L = 4, two levels of full
// adders and one carry-propagate adder. Together with the adder of the
// pipeline adder unit this gives the filter's clock period of one multiplier,
// about log2(L) full-adder delays and the adder delays.
// Purely combinational; the result is kept at full precision,
// X_W + H_W + clog2(L) bits. Signed two's-complement operands are this
// implementation's choice.
module block_ipc #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_X_W,
  parameter int H_W = fir_pkg::DEF_H_W,
  localparam int P_W = X_W + H_W,
  localparam int R_W = P_W + $clog2(L)
) (
  input  logic signed [X_W-1:0] row [L],
  input  logic signed [H_W-1:0] c   [L],
  output logic signed [R_W-1:0] r
);

  logic signed [P_W-1:0] prod [L];

  always_comb begin
    for (int j = 0; j < L; j++) prod[j] = P_W'(row[j]) * P_W'(c[j]);
  end

  // Carry-save reduction of the L products.
  csa_tree #(.N_IN(L), .IN_W(P_W), .OUT_W(R_W)) u_tree (
    .a  (prod),
    .sum(r)
  );

endmodule
