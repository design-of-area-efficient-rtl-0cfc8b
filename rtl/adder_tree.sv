// adder_tree -- balanced combinational adder tree of N_IN signed operands.
//
// Operands are sign-extended to OUT_W and summed pairwise level by level, so
// the depth is ceil(log2(N_IN)) adders. Used by the inner-product cells and by
// the adder network of the MCM-based filter. OUT_W must be wide enough for
// the full sum (IN_W + clog2(N_IN) bits or more); the sum wraps otherwise.
module adder_tree #(
  parameter int N_IN  = 4,
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + $clog2(N_IN)
) (
  input  logic signed [IN_W-1:0]  a [N_IN],
  output logic signed [OUT_W-1:0] sum
);

  localparam int LEVELS = (N_IN > 1) ? $clog2(N_IN) : 0;
  localparam int WIDTH  = 1 << LEVELS;

  // node[lv][i]: level lv holds WIDTH >> lv partial sums.
  logic signed [OUT_W-1:0] node [LEVELS+1][WIDTH];

  always_comb begin
    for (int lv = 0; lv <= LEVELS; lv++)
      for (int i = 0; i < WIDTH; i++) node[lv][i] = '0;
    for (int i = 0; i < N_IN; i++) node[0][i] = OUT_W'(a[i]);
    for (int lv = 1; lv <= LEVELS; lv++)
      for (int i = 0; i < (WIDTH >> lv); i++)
        node[lv][i] = node[lv-1][2*i] + node[lv-1][2*i+1];
  end

  assign sum = node[LEVELS][0];

endmodule
