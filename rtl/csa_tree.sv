// csa_tree -- carry-save (Wallace-style) adder tree of N_IN signed operands.
//
// Operands are sign-extended to OUT_W. Each level replaces every group of
// three operands by a sum word and a carry word (one full adder per bit, no
// carry propagation); operands left over pass to the next level. When two
// words remain, one carry-propagate adder produces the result. For N_IN = 4
// this is two full-adder levels and one adder, the log2(L) full-adder delays
// of an inner-product cell. The arithmetic is modulo 2^OUT_W, so OUT_W must
// hold the full sum (IN_W + clog2(N_IN) bits or more). Combinational.
module csa_tree #(
  parameter int N_IN  = 4,
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + $clog2(N_IN)
) (
  input  logic signed [IN_W-1:0]  a [N_IN],
  output logic signed [OUT_W-1:0] sum
);

  // Operands left after lv levels.
  function automatic int count(int lv);
    int n;
    n = N_IN;
    for (int i = 0; i < lv; i++) n = n - n / 3;
    return n;
  endfunction

  function automatic int levels();
    int n, k;
    n = N_IN;
    k = 0;
    while (n > 2) begin
      n = n - n / 3;
      k++;
    end
    return k;
  endfunction

  localparam int LV = levels();

  logic signed [OUT_W-1:0] op [LV+1][N_IN];

  always_comb begin
    for (int lv = 0; lv <= LV; lv++)
      for (int i = 0; i < N_IN; i++) op[lv][i] = '0;
    for (int i = 0; i < N_IN; i++) op[0][i] = OUT_W'(a[i]);
    for (int lv = 1; lv <= LV; lv++) begin
      int n, g;
      n = count(lv - 1);
      g = n / 3;
      for (int t = 0; t < g; t++) begin
        op[lv][2*t]   = op[lv-1][3*t] ^ op[lv-1][3*t+1] ^ op[lv-1][3*t+2];
        op[lv][2*t+1] = ((op[lv-1][3*t]   & op[lv-1][3*t+1]) |
                         (op[lv-1][3*t]   & op[lv-1][3*t+2]) |
                         (op[lv-1][3*t+1] & op[lv-1][3*t+2])) <<< 1;
      end
      for (int r = 3 * g; r < n; r++) op[lv][2*g + (r - 3*g)] = op[lv-1][r];
    end
  end

  // Final carry-propagate addition of the two remaining words.
  always_comb begin
    sum = op[LV][0];
    if (count(LV) > 1) sum = sum + op[LV][1];
  end

endmodule
