// tb_block_csu -- self-checking testbench of the coefficient selection unit.
//
// Checks the reset selection (filter 0), then random filter selects: the
// full coefficient set of the selected filter must appear one clock after
// the select, as M short weight vectors coef[m][j] = h(mL+j). Expected values
// come from the testbench's own statement of the table formula.
module tb_block_csu;
  localparam int L        = 4;
  localparam int N        = 16;
  localparam int H_W      = 4;
  localparam int NUM_FILT = 4;
  localparam int M        = N / L;

  logic clk = 1'b0;
  logic rst;
  logic [1:0] sel;
  logic signed [H_W-1:0] coef [M][L];

  int checks = 0, failures = 0;

  block_csu #(.L(L), .N(N), .H_W(H_W), .NUM_FILT(NUM_FILT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_filter(int f);
    for (int m = 0; m < M; m++)
      for (int j = 0; j < L; j++) begin
        int e;
        e = tb_ref_pkg::ref_coef(f, m*L + j, N, H_W);
        checks++;
        if (int'(coef[m][j]) != e) begin
          failures++;
          if (failures < 10) $display("filter %0d coef[%0d][%0d] = %0d, expected %0d", f, m, j, coef[m][j], e);
        end
      end
  endtask

  initial begin
    int prev_f;
    rst = 1'b1; sel = 2'd3;
    repeat (2) @(posedge clk);
    @(negedge clk) check_filter(0);
    rst = 1'b0;
    prev_f = 0;
    for (int t = 0; t < 200; t++) begin
      int f;
      f = $urandom_range(0, NUM_FILT - 1);
      sel = 2'(f);
      #1 if (f != prev_f) check_filter(prev_f);   // not yet switched
      @(negedge clk) check_filter(f);
      prev_f = f;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
