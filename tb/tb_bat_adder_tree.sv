// tb_bat_adder_tree: self-checking test of the 28-input Binary Addition Tree.
// Applies all-zero, all-maximum, all-minimum, single-one-per-position and 200
// random input sets, holding them for the two cycles of stage 1 and then
// scrambling them; checks the sum against a plain loop sum and checks that
// out_valid is high in exactly the eighth cycle (cycle 1 = in_valid) and no
// other. A watchdog ends a hung run.
module tb_bat_adder_tree;
  import nn_pkg::*;

  localparam int IN_W = PROD_W, SUM_W = PROD_W + 5;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  x [LINE_PIX];
  logic signed [SUM_W-1:0] sum;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bat_adder_tree dut (.clk, .rst_n, .in_valid, .x, .sum, .out_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int v [LINE_PIX]);
    int expect_s = 0, seen = 0, cyc;
    for (int j = 0; j < LINE_PIX; j++) expect_s += v[j];
    @(negedge clk);
    for (int j = 0; j < LINE_PIX; j++) x[j] = IN_W'(v[j]);
    in_valid = 1'b1;
    // cycles 1..10, cycle 1 is the in_valid cycle
    for (cyc = 1; cyc <= 10; cyc++) begin
      if (cyc == 2) in_valid = 1'b0;
      if (cyc == 3) for (int j = 0; j < LINE_PIX; j++) x[j] = IN_W'($urandom);
      #1;
      if (out_valid) begin
        seen++;
        checks++;
        if (cyc != ADD_CYCLES) begin
          failures++; $display("out_valid in cycle %0d, expected %0d", cyc, ADD_CYCLES);
        end
        checks++;
        if (int'(sum) != expect_s) begin
          failures++; $display("sum %0d, expected %0d", sum, expect_s);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (seen != 1) begin
      failures++; $display("out_valid seen %0d times", seen);
    end
  endtask

  initial begin
    int v [LINE_PIX];
    for (int j = 0; j < LINE_PIX; j++) x[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (v[j]) v[j] = 0;       run(v);
    foreach (v[j]) v[j] = 32767;   run(v);
    foreach (v[j]) v[j] = -32768;  run(v);
    for (int p = 0; p < LINE_PIX; p++) begin
      foreach (v[j]) v[j] = (j == p) ? (p + 1) * 1000 : 0;
      run(v);
    end
    for (int i = 0; i < 200; i++) begin
      foreach (v[j]) v[j] = int'($urandom_range(65535)) - 32768;
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
