// block_ru -- register unit of the transpose-form block FIR filter.
//
// Every valid cycle the unit receives one block of L new samples
// x_k = {x(kL), x(kL-1), ..., x(kL-L+1)} (element 0 is the newest) and presents
// the L rows of the input matrix S0_k: row l is
//   { x(kL-l), x(kL-l-1), ..., x(kL-l-L+1) }.
// These rows reach back L-1 samples into the previous block, so the unit keeps
// the L-1 newest samples of the last valid block in registers; everything else
// is wiring. It also exposes the 2L-1 distinct samples x(kL) .. x(kL-2L+2),
// which the MCM-based fixed filter uses (one MCM block per sample).
//
// Timing: rows/samp are combinational in x_blk and the stored samples; the
// stored samples update at the clock edge when in_valid is high, so gaps in
// the input stream do not disturb the history. Synchronous active-high reset
// clears the history to zero. Register organisation, the valid strobe and the
// reset are this implementation's choices; the function is the architecture's.
module block_ru #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_X_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         in_valid,
  input  logic signed [X_W-1:0]        x_blk [L],
  output logic signed [X_W-1:0]        samp  [2*L-1],
  output logic signed [X_W-1:0]        rows  [L][L]
);

  // prev[i] = x(kL-L-i), the newest L-1 samples of the previous block.
  logic signed [X_W-1:0] prev [L-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < L - 1; i++) prev[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < L - 1; i++) prev[i] <= x_blk[i];
    end
  end

  always_comb begin
    for (int s = 0; s < 2 * L - 1; s++)
      samp[s] = (s < L) ? x_blk[s] : prev[s - L];
  end

  always_comb begin
    for (int l = 0; l < L; l++)
      for (int j = 0; j < L; j++)
        rows[l][j] = samp[l + j];
  end

endmodule
