// rfir_block -- reconfigurable transpose-form block FIR filter.
//
// One block of L input samples enters and one block of L outputs leaves per
// clock cycle, for an N-tap filter chosen at run time from NUM_FILT stored
// filters. With N = M*L the filter output block is
//   y_k = sum_{m=0}^{M-1} S0_{k-m} * c_m,
// where S0_k is the L x L input matrix built by the register unit (RU) and
// c_m = {h(mL) .. h(mL+L-1)}. The coefficient selection unit (CSU) delivers
// all c_m for the selected filter; M inner-product units (IPUs) form
// r^m_k = S0_k * c_m in parallel, and the pipeline adder unit (PAU) adds them
// through block delays in transpose form. The critical path is one multiplier,
// a log2(L)-deep adder tree and one adder.
//
// Interface: x_blk[l] = x(kL-l) (element 0 newest), y_blk[l] = y(kL-l).
// Timing: y_blk/out_valid are registered, one clock after the input block.
// sel is registered in the CSU, so blocks entering from the clock after a
// change of sel are multiplied with the new filter; products already in the
// block delays finish with the old one, so the M-1 output blocks following a
// switch mix both filters (the transpose form is not flushed). in_valid low
// freezes the filter state. The valid strobe, reset and latency are this
// implementation's choices; the structure follows the architecture.
module rfir_block #(
  parameter int L        = fir_pkg::DEF_L,
  parameter int N        = fir_pkg::DEF_N,
  parameter int X_W      = fir_pkg::DEF_X_W,
  parameter int H_W      = fir_pkg::DEF_H_W,
  parameter int NUM_FILT = fir_pkg::DEF_NUM_FILT,
  parameter logic [NUM_FILT*N*H_W-1:0] ROM_FLAT =
      (NUM_FILT*N*H_W)'(fir_pkg::default_table(NUM_FILT, N, H_W)),
  localparam int M     = N / L,
  localparam int R_W   = X_W + H_W + $clog2(L),
  localparam int Y_W   = X_W + H_W + $clog2(N),
  localparam int SEL_W = (NUM_FILT > 1) ? $clog2(NUM_FILT) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [SEL_W-1:0]      sel,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_blk [L]
);

  logic signed [H_W-1:0] coef [M][L];
  logic signed [X_W-1:0] samp [2*L-1];
  logic signed [X_W-1:0] rows [L][L];
  logic signed [R_W-1:0] r    [M][L];

  block_csu #(.L(L), .N(N), .H_W(H_W), .NUM_FILT(NUM_FILT), .ROM_FLAT(ROM_FLAT)) u_csu (
    .clk (clk),
    .rst (rst),
    .sel (sel),
    .coef(coef)
  );

  block_ru #(.L(L), .X_W(X_W)) u_ru (
    .clk     (clk),
    .rst     (rst),
    .in_valid(in_valid),
    .x_blk   (x_blk),
    .samp    (samp),
    .rows    (rows)
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    block_ipu #(.L(L), .X_W(X_W), .H_W(H_W)) u_ipu (
      .rows(rows),
      .c   (coef[m]),
      .r   (r[m])
    );
  end

  block_pau #(.L(L), .M(M), .R_W(R_W), .Y_W(Y_W)) u_pau (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_valid),
    .r        (r),
    .y        (y_blk),
    .out_valid(out_valid)
  );

endmodule
