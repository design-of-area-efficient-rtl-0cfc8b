// tb_rfir_block -- self-checking testbench of the reconfigurable block filter.
//
// Streams random sample blocks with random gaps, switches the channel filter
// at random times and resets once in the middle. The reference keeps every
// accepted sample and the filter that the coefficient unit held when each
// block was accepted, and forms
//   y(n0) = sum_m sum_j x(n0 - mL - j) * h_{f(k-m)}(mL + j)
// for output element l of block k (n0 = kL + L-1-l), i.e. a plain
// convolution while the filter is unchanged and the transpose-form mixture
// right after a switch. Also checks the one-clock latency of out_valid and
// counts switches, gaps and mixed blocks (each must occur).
module tb_rfir_block;
  localparam int L        = 4;
  localparam int N        = 16;
  localparam int X_W      = 4;
  localparam int H_W      = 4;
  localparam int NUM_FILT = 4;
  localparam int M        = N / L;
  localparam int Y_W      = X_W + H_W + $clog2(N);

  logic clk = 1'b0;
  logic rst, in_valid, out_valid;
  logic [1:0] sel;
  logic signed [X_W-1:0] x_blk [L];
  logic signed [Y_W-1:0] y_blk [L];

  int checks = 0, failures = 0;
  int xs [$];     // accepted samples, index n = kL + (L-1-l)
  int fid [$];    // filter in effect for accepted block k
  int csu_f;      // filter held by the coefficient unit
  int n_switch = 0, n_gap = 0, n_mixed = 0;
  int last_y [L];

  rfir_block #(.L(L), .N(N), .X_W(X_W), .H_W(H_W), .NUM_FILT(NUM_FILT)) dut (.*);

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

  function automatic int xat(int n);
    return (n < 0) ? 0 : xs[n];
  endfunction

  task automatic compute_expected();
    int k;
    bit mixed;
    k = fid.size() - 1;
    mixed = 1'b0;
    for (int l = 0; l < L; l++) begin
      int n0;
      n0 = k*L + L - 1 - l;
      last_y[l] = 0;
      for (int m = 0; m < M && k - m >= 0; m++) begin
        if (fid[k-m] != fid[k]) mixed = 1'b1;
        for (int j = 0; j < L; j++)
          last_y[l] += xat(n0 - m*L - j) * tb_ref_pkg::ref_coef(fid[k-m], m*L + j, N, H_W);
      end
    end
    if (mixed) n_mixed++;
  endtask

  task automatic do_reset();
    rst = 1'b1; in_valid = 1'b0;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    xs.delete(); fid.delete();
    csu_f = 0;
    foreach (last_y[l]) last_y[l] = 0;
  endtask

  initial begin
    bit v;
    sel = '0;
    foreach (x_blk[i]) x_blk[i] = '0;
    @(negedge clk);
    do_reset();
    for (int cyc = 0; cyc < 1200; cyc++) begin
      if (cyc == 600) do_reset();
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) n_gap++;
      if ($urandom_range(0, 39) == 0) sel = 2'($urandom_range(0, NUM_FILT - 1));
      foreach (x_blk[i]) x_blk[i] = X_W'($urandom);
      v = in_valid;
      @(posedge clk);
      if (v) begin
        for (int i = L - 1; i >= 0; i--) xs.push_back(int'(x_blk[i]));
        fid.push_back(csu_f);
      end
      if (int'(sel) != csu_f) n_switch++;
      csu_f = int'(sel);
      @(negedge clk);
      expect_eq(int'(out_valid), int'(v), "out_valid");
      if (v) compute_expected();
      for (int l = 0; l < L; l++) expect_eq(int'(y_blk[l]), last_y[l], $sformatf("cyc %0d y[%0d]", cyc, l));
    end
    expect_eq(int'(n_switch > 0), 1, "filter switches seen");
    expect_eq(int'(n_gap > 0),    1, "input gaps seen");
    expect_eq(int'(n_mixed > 0),  1, "mixed blocks after a switch seen");
    $display("filter switches %0d, gaps %0d, mixed blocks %0d", n_switch, n_gap, n_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
