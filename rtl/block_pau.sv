// block_pau -- pipeline adder unit: the block-level transpose-form chain.
//
// Adds the M blocks of partial results r^m (one per weight vector c_m) with
// the block delays of the transpose form,
//   y_k = r^0_k + z^-1( r^1_k + z^-1( r^2_k + ... + z^-1 r^{M-1}_k ) ),
// i.e. y_k = sum_m r^m_{k-m}. Each z^-1 is a register of L words. Stage m
// m holds acc[m] <= r^m + acc[m+1] (no acc[M] term for the last stage), so exactly one
// adder lies between any input and a register.
//
// Timing: r is sampled when in_valid is high; the output block is registered,
// so y/out_valid appear one clock after the block of r they complete. Nothing
// moves while in_valid is low. Synchronous active-high reset clears the chain.
// The valid strobe, the output register and reset are this implementation's
// choices. Y_W defaults to full precision for an N = M*L tap filter.
module block_pau #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int M   = fir_pkg::DEF_N / fir_pkg::DEF_L,
  parameter int R_W = fir_pkg::DEF_X_W + fir_pkg::DEF_H_W + $clog2(fir_pkg::DEF_L),
  parameter int Y_W = R_W + $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [R_W-1:0] r [M][L],
  output logic signed [Y_W-1:0] y [L],
  output logic                  out_valid
);

  // acc[0] is the output register; acc[m], m >= 1, are the block delays.
  logic signed [Y_W-1:0] acc   [M][L];
  logic signed [Y_W-1:0] acc_d [M][L];

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int l = 0; l < L; l++) begin
        acc_d[m][l] = Y_W'(r[m][l]);
        if (m < M - 1) acc_d[m][l] = acc_d[m][l] + acc[m+1][l];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) acc[m][l] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) acc <= acc_d;
    end
  end

  // Stage 0 is the output register.
  always_comb begin
    for (int l = 0; l < L; l++) y[l] = acc[0][l];
  end

endmodule
