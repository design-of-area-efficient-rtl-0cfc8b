// tb_block_ipu -- self-checking testbench of the inner-product unit.
//
// Random S0 matrices and weight vectors; each of the L outputs is compared
// with the integer dot product of its row and the weight vector.
module tb_block_ipu;
  localparam int L   = 4;
  localparam int X_W = 4;
  localparam int H_W = 4;
  localparam int R_W = X_W + H_W + $clog2(L);

  logic signed [X_W-1:0] rows [L][L];
  logic signed [H_W-1:0] c    [L];
  logic signed [R_W-1:0] r    [L];

  int checks = 0, failures = 0;

  block_ipu #(.L(L), .X_W(X_W), .H_W(H_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int l = 0; l < L; l++)
        for (int j = 0; j < L; j++) rows[l][j] = X_W'($urandom);
      for (int j = 0; j < L; j++) c[j] = H_W'($urandom);
      #1;
      for (int l = 0; l < L; l++) begin
        int e;
        e = 0;
        for (int j = 0; j < L; j++) e += int'(rows[l][j]) * int'(c[j]);
        checks++;
        if (int'(r[l]) != e) begin
          failures++;
          if (failures < 10) $display("r[%0d] = %0d, expected %0d", l, r[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
