// tb_classifier_controller: self-checking test of the 393-cycle sequencer.
// Runs three classifications, the second with start pulses while busy that
// must be ignored. Cycle n counts from 0 for the first cycle after the edge
// that samples start. Checks, cycle by cycle: clear only with start;
// mul_start exactly in cycles 14*l, with rd_line = l, for l = 0..27; sel_en
// only in cycle 392; busy in cycles 0..392; done only in cycle 393, i.e.
// 393 edges after start. A watchdog ends a hung run.
module tb_classifier_controller;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic clear, mul_start, sel_en, busy, done;
  logic [4:0] rd_line;
  int checks = 0, failures = 0;

  localparam int TOTAL = IMG_LINES * LINE_CYCLES + 1;  // 393

  always #5 clk = ~clk;

  classifier_controller dut (
    .clk, .rst_n, .start, .clear, .mul_start, .rd_line, .sel_en, .busy, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input int n, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("cycle %0d: %s=%0b, expected %0b", n, what, got, exp);
    end
  endtask

  task automatic run(input bit poke);
    int mul_seen = 0;
    @(negedge clk);
    start = 1'b1;
    #1 expect_bit("clear", -1, clear, 1'b1);
    for (int n = 0; n <= TOTAL + 2; n++) begin
      @(negedge clk);
      start = poke && (n % 50 == 7);
      #1;
      expect_bit("clear", n, clear, 1'b0);
      expect_bit("mul_start", n, mul_start, n < TOTAL - 1 && n % LINE_CYCLES == 0);
      if (mul_start) begin
        mul_seen++;
        checks++;
        if (int'(rd_line) != n / LINE_CYCLES) begin
          failures++; $display("cycle %0d: rd_line %0d", n, rd_line);
        end
      end
      expect_bit("sel_en", n, sel_en, n == TOTAL - 1);
      expect_bit("busy", n, busy, n <= TOTAL - 1);
      expect_bit("done", n, done, n == TOTAL);
    end
    start = 1'b0;
    checks++;
    if (mul_seen != IMG_LINES) begin
      failures++; $display("%0d line starts, expected %0d", mul_seen, IMG_LINES);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 expect_bit("busy", -2, busy, 1'b0);
    run(1'b0); run(1'b1); run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
