// block_fir_top -- the two transpose-form block FIR structures side by side.
//
// u_rfir is the reconfigurable filter (coefficient selection unit, register
// unit, M inner-product units, pipeline adder unit): its channel filter is
// chosen at run time with rfir_sel. u_fixed is the low-complexity filter for
// one fixed coefficient set (register unit, MCM blocks, adder network,
// pipeline adder unit). The two are alternatives for different applications;
// they share clock and reset only and each has its own data ports. Both take
// a block of L samples and return a block of L outputs per clock, with a
// registered output one clock after the input block; see rfir_block and
// fixed_block_fir for the block ordering and the valid strobes.
// By default the fixed filter holds the same coefficients as filter 0 of the
// reconfigurable one.
module block_fir_top #(
  parameter int L        = fir_pkg::DEF_L,
  parameter int N        = fir_pkg::DEF_N,
  parameter int X_W      = fir_pkg::DEF_X_W,
  parameter int H_W      = fir_pkg::DEF_H_W,
  parameter int NUM_FILT = fir_pkg::DEF_NUM_FILT,
  localparam int Y_W   = X_W + H_W + $clog2(N),
  localparam int SEL_W = (NUM_FILT > 1) ? $clog2(NUM_FILT) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // reconfigurable filter
  input  logic [SEL_W-1:0]      rfir_sel,
  input  logic                  rfir_in_valid,
  input  logic signed [X_W-1:0] rfir_x_blk [L],
  output logic                  rfir_out_valid,
  output logic signed [Y_W-1:0] rfir_y_blk [L],
  // fixed-coefficient filter
  input  logic                  fixed_in_valid,
  input  logic signed [X_W-1:0] fixed_x_blk [L],
  output logic                  fixed_out_valid,
  output logic signed [Y_W-1:0] fixed_y_blk [L]
);

  rfir_block #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .NUM_FILT(NUM_FILT)) u_rfir (
    .clk      (clk),
    .rst      (rst),
    .sel      (rfir_sel),
    .in_valid (rfir_in_valid),
    .x_blk    (rfir_x_blk),
    .out_valid(rfir_out_valid),
    .y_blk    (rfir_y_blk)
  );

  fixed_block_fir #(.L(L), .N(N), .X_W(X_W), .H_W(H_W)) u_fixed (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fixed_in_valid),
    .x_blk    (fixed_x_blk),
    .out_valid(fixed_out_valid),
    .y_blk    (fixed_y_blk)
  );

endmodule
