// tb_mcm_adder_net -- self-checking testbench of the MCM adder network.
//
// Random product arrays; every r[m][l] is compared with
// sum_j prod[l+j][j][m] computed in the testbench.
module tb_mcm_adder_net;
  localparam int L   = 4;
  localparam int N   = 16;
  localparam int X_W = 4;
  localparam int H_W = 4;
  localparam int M   = N / L;
  localparam int P_W = X_W + H_W;
  localparam int R_W = P_W + $clog2(L);

  logic signed [P_W-1:0] prod [2*L-1][L][M];
  logic signed [R_W-1:0] r    [M][L];

  int checks = 0, failures = 0;

  mcm_adder_net #(.L(L), .N(N), .X_W(X_W), .H_W(H_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int s = 0; s < 2*L-1; s++)
        for (int j = 0; j < L; j++)
          for (int m = 0; m < M; m++) prod[s][j][m] = P_W'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          int e;
          e = 0;
          for (int j = 0; j < L; j++) e += int'(prod[l+j][j][m]);
          checks++;
          if (int'(r[m][l]) != e) begin
            failures++;
            if (failures < 10) $display("r[%0d][%0d] = %0d, expected %0d", m, l, r[m][l], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
