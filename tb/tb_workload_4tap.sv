// tb_workload_4tap -- the small reference configuration: a 4-tap filter with
// 4-bit samples and 4-bit coefficients, processed in blocks of L = 4 (so the
// whole filter is one weight vector, M = 1).
//
// Coefficients h(0..3) = -6, 2, -6, -4 (1010, 0010, 1010, 1100 in 4-bit two's
// complement) and the first input block x = 4, -8, 1, 2 (0100, 1000, 0001,
// 0010) are those of the reference simulation; further random blocks follow.
// Both structures run the same stream: the reconfigurable one with the 4-tap
// filter as its only stored filter, the fixed one with it as constants. Both
// are compared with the direct convolution y(n) = sum_i h(i) x(n-i).
module tb_workload_4tap;
  localparam int L   = 4;
  localparam int N   = 4;
  localparam int X_W = 4;
  localparam int H_W = 4;
  localparam int Y_W = X_W + H_W + $clog2(N);

  localparam logic [N*H_W-1:0] H = {4'b1100, 4'b1010, 4'b0010, 4'b1010};  // h(3) .. h(0)
  localparam int HV [N] = '{-6, 2, -6, -4};

  logic clk = 1'b0;
  logic rst, in_valid, r_out_valid, f_out_valid;
  logic [0:0] sel;
  logic signed [X_W-1:0] x_blk [L];
  logic signed [Y_W-1:0] r_y [L], f_y [L];

  int checks = 0, failures = 0;
  int xs [$];

  rfir_block #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .NUM_FILT(1), .ROM_FLAT(H)) u_r (
    .clk(clk), .rst(rst), .sel(sel), .in_valid(in_valid), .x_blk(x_blk),
    .out_valid(r_out_valid), .y_blk(r_y)
  );
  fixed_block_fir #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .H_FLAT(H)) u_f (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x_blk(x_blk),
    .out_valid(f_out_valid), .y_blk(f_y)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    sel = '0;
    rst = 1'b1; in_valid = 1'b0;
    foreach (x_blk[i]) x_blk[i] = '0;
    repeat (2) @(posedge clk);   // coefficient unit loads the filter
    @(negedge clk) rst = 1'b0;
    for (int blk = 0; blk < 300; blk++) begin
      in_valid = 1'b1;
      if (blk == 0) begin
        // newest first: x(n) = 2 is the last of 4, -8, 1, 2
        x_blk[0] = 4'b0010; x_blk[1] = 4'b0001; x_blk[2] = 4'b1000; x_blk[3] = 4'b0100;
      end else begin
        foreach (x_blk[i]) x_blk[i] = X_W'($urandom);
      end
      @(posedge clk);
      for (int i = L - 1; i >= 0; i--) xs.push_back(int'(x_blk[i]));
      @(negedge clk);
      expect_eq(int'(r_out_valid), 1, "rfir out_valid");
      expect_eq(int'(f_out_valid), 1, "fixed out_valid");
      for (int l = 0; l < L; l++) begin
        int n0, e;
        n0 = xs.size() - 1 - l;
        e = 0;
        for (int i = 0; i < N && n0 - i >= 0; i++) e += HV[i] * xs[n0 - i];
        expect_eq(int'(r_y[l]), e, $sformatf("block %0d rfir y[%0d]", blk, l));
        expect_eq(int'(f_y[l]), e, $sformatf("block %0d fixed y[%0d]", blk, l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
