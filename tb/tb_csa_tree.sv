// tb_csa_tree -- self-checking testbench of the carry-save adder tree for
// several operand counts (2, 3, 4, 5, 8), including all-most-negative and
// all-most-positive operands, against an integer sum.
module tb_csa_tree;
  localparam int IN_W = 6;

  int checks = 0, failures = 0;

  logic signed [IN_W-1:0] a2 [2], a3 [3], a4 [4], a5 [5], a8 [8];
  logic signed [IN_W+1-1:0] s2;
  logic signed [IN_W+2-1:0] s3, s4;
  logic signed [IN_W+3-1:0] s5, s8;

  csa_tree #(.N_IN(2), .IN_W(IN_W)) u2 (.a(a2), .sum(s2));
  csa_tree #(.N_IN(3), .IN_W(IN_W)) u3 (.a(a3), .sum(s3));
  csa_tree #(.N_IN(4), .IN_W(IN_W)) u4 (.a(a4), .sum(s4));
  csa_tree #(.N_IN(5), .IN_W(IN_W)) u5 (.a(a5), .sum(s5));
  csa_tree #(.N_IN(8), .IN_W(IN_W)) u8 (.a(a8), .sum(s8));

  initial begin : watchdog
    #100000;
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

  function automatic logic [IN_W-1:0] pick(int t);
    if (t == 0) return {1'b1, {(IN_W-1){1'b0}}};
    if (t == 1) return {1'b0, {(IN_W-1){1'b1}}};
    return IN_W'($urandom);
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int e2, e3, e4, e5, e8;
      e2 = 0; e3 = 0; e4 = 0; e5 = 0; e8 = 0;
      foreach (a2[i]) begin a2[i] = pick(t); e2 += int'(a2[i]); end
      foreach (a3[i]) begin a3[i] = pick(t); e3 += int'(a3[i]); end
      foreach (a4[i]) begin a4[i] = pick(t); e4 += int'(a4[i]); end
      foreach (a5[i]) begin a5[i] = pick(t); e5 += int'(a5[i]); end
      foreach (a8[i]) begin a8[i] = pick(t); e8 += int'(a8[i]); end
      #1;
      expect_eq(int'(s2), e2, "sum of 2");
      expect_eq(int'(s3), e3, "sum of 3");
      expect_eq(int'(s4), e4, "sum of 4");
      expect_eq(int'(s5), e5, "sum of 5");
      expect_eq(int'(s8), e8, "sum of 8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
