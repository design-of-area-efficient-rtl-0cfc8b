// block_csu -- coefficient selection unit of the reconfigurable filter.
//
// A read-only table holds the N coefficients of each of NUM_FILT channel
// filters, one table entry per tap (N look-up tables of NUM_FILT words each).
// The channel select sel addresses all N tables at once, so a complete
// coefficient set is delivered in one clock cycle; it is presented as M = N/L
// short weight vectors, coef[m][j] = h(mL + j).
//
// Timing: the read is registered; a change of sel reaches coef at the next
// clock edge. Synchronous active-high reset selects filter 0.
// The table contents are this implementation's placeholders (fir_pkg), given
// in ROM_FLAT with coefficient i of filter f at bits [(f*N+i)*H_W +: H_W];
// the number of filters is likewise a choice.
module block_csu #(
  parameter int L        = fir_pkg::DEF_L,
  parameter int N        = fir_pkg::DEF_N,
  parameter int H_W      = fir_pkg::DEF_H_W,
  parameter int NUM_FILT = fir_pkg::DEF_NUM_FILT,
  parameter logic [NUM_FILT*N*H_W-1:0] ROM_FLAT =
      (NUM_FILT*N*H_W)'(fir_pkg::default_table(NUM_FILT, N, H_W)),
  localparam int M     = N / L,
  localparam int SEL_W = (NUM_FILT > 1) ? $clog2(NUM_FILT) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [SEL_W-1:0]      sel,
  output logic signed [H_W-1:0] coef [M][L]
);

  logic signed [H_W-1:0] rom [NUM_FILT][N];

  always_comb begin
    for (int f = 0; f < NUM_FILT; f++)
      for (int i = 0; i < N; i++) rom[f][i] = ROM_FLAT[(f*N+i)*H_W +: H_W];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++) coef[m][j] <= rom[0][m*L+j];
    end else begin
      for (int m = 0; m < M; m++)
        for (int j = 0; j < L; j++) coef[m][j] <= rom[sel][m*L+j];
    end
  end

  // A select beyond the stored filters has no table entry.
  assert property (@(posedge clk) disable iff (rst) int'(sel) < NUM_FILT)
    else $error("block_csu: filter select %0d out of range", sel);

endmodule
