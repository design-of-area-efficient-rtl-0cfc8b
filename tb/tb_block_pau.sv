// tb_block_pau -- self-checking testbench of the pipeline adder unit.
//
// Random partial-result blocks r^m are applied with random gaps. After valid
// block k the unit must show, one clock later, y_k = sum_m r^m_{k-m} (blocks
// before reset count as zero); out_valid must follow in_valid by exactly one
// clock, and y must hold during gaps.
module tb_block_pau;
  localparam int L   = 4;
  localparam int M   = 4;
  localparam int R_W = 10;
  localparam int Y_W = R_W + $clog2(M);

  logic clk = 1'b0;
  logic rst, in_valid;
  logic signed [R_W-1:0] r [M][L];
  logic signed [Y_W-1:0] y [L];
  logic out_valid;

  int checks = 0, failures = 0;
  int rh [$][M][L];     // accepted r blocks, oldest first
  int last_y [L];
  int gaps = 0;

  block_pau #(.L(L), .M(M), .R_W(R_W), .Y_W(Y_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
    bit was_valid;
    rst = 1'b1; in_valid = 1'b0;
    foreach (r[m, l]) r[m][l] = '0;
    foreach (last_y[l]) last_y[l] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      int blk [M][L];
      in_valid = ($urandom_range(0, 3) != 0);
      if (!in_valid) gaps++;
      foreach (r[m, l]) begin
        r[m][l] = R_W'($urandom);
        blk[m][l] = int'(r[m][l]);
      end
      was_valid = in_valid;
      @(posedge clk);
      if (was_valid) rh.push_back(blk);
      @(negedge clk);
      expect_eq(int'(out_valid), int'(was_valid), "out_valid");
      if (was_valid) begin
        int k;
        k = rh.size() - 1;
        for (int l = 0; l < L; l++) begin
          last_y[l] = 0;
          for (int m = 0; m < M; m++)
            if (k - m >= 0) last_y[l] += rh[k-m][m][l];
        end
      end
      for (int l = 0; l < L; l++) expect_eq(int'(y[l]), last_y[l], $sformatf("y[%0d]", l));
    end
    checks++;
    if (gaps == 0) begin failures++; $display("no gap cycles exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
