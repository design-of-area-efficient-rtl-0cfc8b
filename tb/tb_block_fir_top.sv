// tb_block_fir_top -- end-to-end testbench of both block filters, with the
// top at its default parameters (L = 4, N = 16, 4-bit data, 4 filters).
//
// One random sample stream feeds both filters, one block per clock with
// random gaps. The reconfigurable filter switches its channel filter at
// random; the fixed filter always holds placeholder filter 0. References:
//   reconfigurable  y(n0) = sum_m sum_j x(n0-mL-j) h_{f(k-m)}(mL+j), where
//                   f(k) is the filter held when block k was accepted;
//   fixed           y(n) = sum_i h_0(i) x(n-i).
// Also checked: one output block per input block, one clock later. Counted,
// and required at least once: filter switches, input gaps, output blocks
// mixing two filters after a switch, a reset in mid-stream, and blocks where
// both filters ran filter 0 and must agree.
module tb_block_fir_top;
  localparam int L        = 4;
  localparam int N        = 16;
  localparam int X_W      = 4;
  localparam int H_W      = 4;
  localparam int NUM_FILT = 4;
  localparam int M        = N / L;
  localparam int Y_W      = X_W + H_W + $clog2(N);

  logic clk = 1'b0;
  logic rst;
  logic [1:0] rfir_sel;
  logic rfir_in_valid, rfir_out_valid, fixed_in_valid, fixed_out_valid;
  logic signed [X_W-1:0] rfir_x_blk [L], fixed_x_blk [L];
  logic signed [Y_W-1:0] rfir_y_blk [L], fixed_y_blk [L];

  int checks = 0, failures = 0;
  int xs [$];
  int fid [$];
  int csu_f;
  int n_switch = 0, n_gap = 0, n_mixed = 0, n_reset = 0, n_agree = 0, n_blocks = 0;
  int exp_r [L], exp_f [L];

  block_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
    bit mixed, all0;
    k = fid.size() - 1;
    mixed = 1'b0;
    all0 = 1'b1;
    for (int l = 0; l < L; l++) begin
      int n0;
      n0 = k*L + L - 1 - l;
      exp_r[l] = 0;
      exp_f[l] = 0;
      for (int m = 0; m < M && k - m >= 0; m++) begin
        if (fid[k-m] != fid[k]) mixed = 1'b1;
        if (fid[k-m] != 0) all0 = 1'b0;
        for (int j = 0; j < L; j++) begin
          exp_r[l] += xat(n0 - m*L - j) * tb_ref_pkg::ref_coef(fid[k-m], m*L + j, N, H_W);
          exp_f[l] += xat(n0 - m*L - j) * tb_ref_pkg::ref_coef(0, m*L + j, N, H_W);
        end
      end
    end
    if (mixed) n_mixed++;
    if (all0) begin
      n_agree++;
      for (int l = 0; l < L; l++)
        expect_eq(int'(rfir_y_blk[l]), int'(fixed_y_blk[l]), "filter 0 agreement");
    end
  endtask

  task automatic do_reset();
    rst = 1'b1; rfir_in_valid = 1'b0; fixed_in_valid = 1'b0;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    xs.delete(); fid.delete();
    csu_f = 0;
    foreach (exp_r[l]) begin exp_r[l] = 0; exp_f[l] = 0; end
  endtask

  initial begin
    bit v;
    rfir_sel = '0;
    foreach (rfir_x_blk[i]) rfir_x_blk[i] = '0;
    foreach (fixed_x_blk[i]) fixed_x_blk[i] = '0;
    @(negedge clk);
    do_reset();
    for (int cyc = 0; cyc < 2000; cyc++) begin
      if (cyc == 1000) begin do_reset(); n_reset++; end
      v = ($urandom_range(0, 4) != 0);
      rfir_in_valid = v;
      fixed_in_valid = v;
      if (!v) n_gap++;
      if ($urandom_range(0, 29) == 0) rfir_sel = 2'($urandom_range(0, NUM_FILT - 1));
      foreach (rfir_x_blk[i]) begin
        rfir_x_blk[i] = X_W'($urandom);
        fixed_x_blk[i] = rfir_x_blk[i];
      end
      @(posedge clk);
      if (v) begin
        for (int i = L - 1; i >= 0; i--) xs.push_back(int'(rfir_x_blk[i]));
        fid.push_back(csu_f);
      end
      if (int'(rfir_sel) != csu_f) n_switch++;
      csu_f = int'(rfir_sel);
      @(negedge clk);
      expect_eq(int'(rfir_out_valid), int'(v), "rfir out_valid latency");
      expect_eq(int'(fixed_out_valid), int'(v), "fixed out_valid latency");
      if (v) begin
        n_blocks++;
        compute_expected();
      end
      for (int l = 0; l < L; l++) begin
        expect_eq(int'(rfir_y_blk[l]),  exp_r[l], $sformatf("cyc %0d rfir y[%0d]", cyc, l));
        expect_eq(int'(fixed_y_blk[l]), exp_f[l], $sformatf("cyc %0d fixed y[%0d]", cyc, l));
      end
    end
    expect_eq(int'(n_switch > 0), 1, "filter switches seen");
    expect_eq(int'(n_gap > 0),    1, "input gaps seen");
    expect_eq(int'(n_mixed > 0),  1, "mixed blocks after a switch seen");
    expect_eq(int'(n_reset > 0),  1, "mid-stream reset seen");
    expect_eq(int'(n_agree > 0),  1, "filter-0 agreement blocks seen");
    $display("blocks %0d, filter switches %0d, gaps %0d, mixed blocks %0d, resets %0d, agreeing blocks %0d",
             n_blocks, n_switch, n_gap, n_mixed, n_reset, n_agree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
