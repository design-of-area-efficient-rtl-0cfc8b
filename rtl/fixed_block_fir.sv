// fixed_block_fir -- MCM-based transpose-form block FIR filter with fixed
// coefficients.
//
// Same block formulation as the reconfigurable filter (one block of L samples
// in, one block of L outputs out per clock, N = M*L taps), but the
// coefficients are constants, so there is no coefficient store and no general
// multiplier. The register unit supplies the 2L-1 distinct samples
// x(kL) .. x(kL-2L+2); one MCM block per sample forms that sample's products
// with its coefficient group by shifts and adds; the adder network sums them
// into the inner products r[m][l]; the pipeline adder unit adds the M partial
// blocks through transpose-form block delays:
//   y_k = sum_m r^m_{k-m},  r^m_k[l] = sum_j x(kL-l-j) h(j+mL).
//
// Interface and timing as rfir_block: x_blk[l] = x(kL-l), y_blk[l] = y(kL-l),
// output registered one clock after its input block, in_valid low freezes the
// state, synchronous active-high reset. Coefficient i is H_FLAT[i*H_W +: H_W]
// (two's complement); the default is placeholder filter 0 of fir_pkg.
module fixed_block_fir #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_X_W,
  parameter int H_W = fir_pkg::DEF_H_W,
  parameter logic [N*H_W-1:0] H_FLAT = (N*H_W)'(fir_pkg::default_table(1, N, H_W)),
  localparam int M   = N / L,
  localparam int P_W = X_W + H_W,
  localparam int R_W = P_W + $clog2(L),
  localparam int Y_W = X_W + H_W + $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_blk [L]
);

  logic signed [X_W-1:0] samp [2*L-1];
  logic signed [X_W-1:0] rows [L][L];
  logic signed [P_W-1:0] prod [2*L-1][L][M];
  logic signed [R_W-1:0] r    [M][L];

  block_ru #(.L(L), .X_W(X_W)) u_ru (
    .clk     (clk),
    .rst     (rst),
    .in_valid(in_valid),
    .x_blk   (x_blk),
    .samp    (samp),
    .rows    (rows)
  );

  for (genvar s = 0; s < 2*L-1; s++) begin : g_mcm
    mcm_block #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .S(s), .H_FLAT(H_FLAT)) u_mcm (
      .x   (samp[s]),
      .prod(prod[s])
    );
  end

  mcm_adder_net #(.L(L), .N(N), .X_W(X_W), .H_W(H_W)) u_net (
    .prod(prod),
    .r   (r)
  );

  block_pau #(.L(L), .M(M), .R_W(R_W), .Y_W(Y_W)) u_pau (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .r        (r),
    .y        (y_blk),
    .out_valid(out_valid)
  );

endmodule
