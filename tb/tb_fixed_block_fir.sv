// tb_fixed_block_fir -- self-checking testbench of the MCM-based fixed
// block filter, at a size other than the default (L = 2, N = 10, 6-bit
// samples, 5-bit coefficients spanning the full signed range).
//
// Streams random blocks with random gaps, resets once in the middle, and
// compares every output block with the direct convolution
// y(n) = sum_i h(i) x(n-i) over the accepted samples; out_valid must follow
// in_valid by one clock.
module tb_fixed_block_fir;
  localparam int L   = 2;
  localparam int N   = 10;
  localparam int X_W = 6;
  localparam int H_W = 5;
  localparam int Y_W = X_W + H_W + $clog2(N);

  // Test coefficients: h(i) = ((7*i*i + 11*i + 16) mod 32) - 16, with the
  // extremes -16 and +15 forced at taps 0 and 1.
  function automatic int hc(int i);
    if (i == 0) return -(2 ** (H_W-1));
    if (i == 1) return 2 ** (H_W-1) - 1;
    return ((7*i*i + 11*i + 16) % (2 ** H_W)) - 2 ** (H_W-1);
  endfunction
  function automatic logic [N*H_W-1:0] pack_h();
    logic [N*H_W-1:0] v;
    for (int i = 0; i < N; i++) v[i*H_W +: H_W] = H_W'(hc(i));
    return v;
  endfunction
  localparam logic [N*H_W-1:0] H = pack_h();

  logic clk = 1'b0;
  logic rst, in_valid, out_valid;
  logic signed [X_W-1:0] x_blk [L];
  logic signed [Y_W-1:0] y_blk [L];

  int checks = 0, failures = 0, n_gap = 0;
  int xs [$];
  int last_y [L];

  fixed_block_fir #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .H_FLAT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic do_reset();
    rst = 1'b1; in_valid = 1'b0;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    xs.delete();
    foreach (last_y[l]) last_y[l] = 0;
  endtask

  initial begin
    bit v;
    foreach (x_blk[i]) x_blk[i] = '0;
    @(negedge clk);
    do_reset();
    for (int cyc = 0; cyc < 1000; cyc++) begin
      if (cyc == 500) do_reset();
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) n_gap++;
      foreach (x_blk[i]) x_blk[i] = X_W'($urandom);
      v = in_valid;
      @(posedge clk);
      if (v) for (int i = L - 1; i >= 0; i--) xs.push_back(int'(x_blk[i]));
      @(negedge clk);
      expect_eq(int'(out_valid), int'(v), "out_valid");
      if (v)
        for (int l = 0; l < L; l++) begin
          int n0;
          n0 = xs.size() - 1 - l;
          last_y[l] = 0;
          for (int i = 0; i < N && n0 - i >= 0; i++) last_y[l] += hc(i) * xs[n0 - i];
        end
      for (int l = 0; l < L; l++) expect_eq(int'(y_blk[l]), last_y[l], $sformatf("cyc %0d y[%0d]", cyc, l));
    end
    expect_eq(int'(n_gap > 0), 1, "input gaps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
