// tb_mcm_block -- self-checking testbench of the MCM blocks.
//
// Instantiates one MCM block per sample position S = 0 .. 2L-2 with a
// coefficient set that covers the full signed range (-8 .. 7 for 4 bits),
// drives every possible sample value and checks each product x*h(j+mL)
// where sample S pairs with column j, and zero elsewhere.
module tb_mcm_block;
  localparam int L   = 4;
  localparam int N   = 16;
  localparam int X_W = 4;
  localparam int H_W = 4;
  localparam int M   = N / L;
  localparam int P_W = X_W + H_W;

  // h(i) = i - 8: every 4-bit value once.
  function automatic logic [N*H_W-1:0] ramp();
    logic [N*H_W-1:0] v;
    for (int i = 0; i < N; i++) v[i*H_W +: H_W] = H_W'(i - 2 ** (H_W - 1));
    return v;
  endfunction
  localparam logic [N*H_W-1:0] H = ramp();

  logic signed [X_W-1:0] x;
  logic signed [P_W-1:0] prod [2*L-1][L][M];

  int checks = 0, failures = 0;

  for (genvar s = 0; s < 2*L-1; s++) begin : g_dut
    mcm_block #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .S(s), .H_FLAT(H)) dut (
      .x   (x),
      .prod(prod[s])
    );
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -(2 ** (X_W-1)); xv < 2 ** (X_W-1); xv++) begin
      x = X_W'(xv);
      #1;
      for (int s = 0; s < 2*L-1; s++)
        for (int j = 0; j < L; j++)
          for (int m = 0; m < M; m++) begin
            int e;
            e = (j <= s && s - j < L) ? xv * ((j + m*L) - 2 ** (H_W-1)) : 0;
            checks++;
            if (int'(prod[s][j][m]) != e) begin
              failures++;
              if (failures < 10)
                $display("S=%0d x=%0d prod[%0d][%0d] = %0d, expected %0d", s, xv, j, m, prod[s][j][m], e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
