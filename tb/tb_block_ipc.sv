// tb_block_ipc -- self-checking testbench of the inner-product cell.
//
// Applies corner vectors (all most-negative, all most-positive) and random
// signed rows and weight vectors, and compares r with an integer dot product.
module tb_block_ipc;
  localparam int L   = 4;
  localparam int X_W = 4;
  localparam int H_W = 4;
  localparam int R_W = X_W + H_W + $clog2(L);

  logic signed [X_W-1:0] row [L];
  logic signed [H_W-1:0] c   [L];
  logic signed [R_W-1:0] r;

  int checks = 0, failures = 0;

  block_ipc #(.L(L), .X_W(X_W), .H_W(H_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int e;
    e = 0;
    for (int j = 0; j < L; j++) e += int'(row[j]) * int'(c[j]);
    checks++;
    if (int'(r) != e) begin
      failures++;
      if (failures < 10) $display("r = %0d, expected %0d", r, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 2002; t++) begin
      for (int j = 0; j < L; j++) begin
        if (t == 0)      begin row[j] = {1'b1, {(X_W-1){1'b0}}}; c[j] = {1'b1, {(H_W-1){1'b0}}}; end
        else if (t == 1) begin row[j] = {1'b1, {(X_W-1){1'b0}}}; c[j] = {1'b0, {(H_W-1){1'b1}}}; end
        else             begin row[j] = X_W'($urandom);          c[j] = H_W'($urandom);          end
      end
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
