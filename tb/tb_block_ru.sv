// tb_block_ru -- self-checking testbench of the register unit.
//
// Random blocks are applied with random gaps (in_valid low) and a reset in the
// middle. A reference list of accepted samples gives the expected
// x(kL-s) for every output sample and every row element of S0_k.
module tb_block_ru;
  localparam int L   = 4;
  localparam int X_W = 4;

  logic clk = 1'b0;
  logic rst, in_valid;
  logic signed [X_W-1:0] x_blk [L];
  logic signed [X_W-1:0] samp  [2*L-1];
  logic signed [X_W-1:0] rows  [L][L];

  int checks = 0, failures = 0;
  int hist [$];   // accepted samples, oldest first
  int gaps = 0;

  block_ru #(.L(L), .X_W(X_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected x(kL-s): s < L from the current block, else from history.
  function automatic int expect_samp(int s);
    if (s < L) return int'(x_blk[s]);
    if (hist.size() < s - L + 1) return 0;
    return hist[hist.size() - 1 - (s - L)];
  endfunction

  task automatic check_now();
    for (int s = 0; s < 2*L-1; s++) begin
      checks++;
      if (int'(samp[s]) != expect_samp(s)) begin
        failures++;
        $display("samp[%0d] = %0d, expected %0d", s, samp[s], expect_samp(s));
      end
    end
    for (int l = 0; l < L; l++)
      for (int j = 0; j < L; j++) begin
        checks++;
        if (int'(rows[l][j]) != expect_samp(l + j)) begin
          failures++;
          $display("rows[%0d][%0d] = %0d, expected %0d", l, j, rows[l][j], expect_samp(l+j));
        end
      end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    foreach (x_blk[i]) x_blk[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      if (cyc == 200) begin
        rst = 1'b1;
        @(negedge clk) rst = 1'b0;
        hist.delete();
      end
      in_valid = ($urandom_range(0, 3) != 0);
      if (!in_valid) gaps++;
      foreach (x_blk[i]) x_blk[i] = X_W'($urandom);
      #1 check_now();
      @(posedge clk);
      if (in_valid)
        for (int i = L - 1; i >= 0; i--) hist.push_back(int'(x_blk[i]));
    end
    checks++;
    if (gaps == 0) begin failures++; $display("no gap cycles exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
