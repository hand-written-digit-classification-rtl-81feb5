// tb_perceptron: self-checking test of one perceptron over whole images.
// For each of 4 images (one all-maximum, one all-minimum, two random) it loads
// a bias, then feeds 28 lines of random pixels and weights with one mul_start
// every 14 cycles, scrambling the inputs right after they are sampled. After
// every line it checks the accumulator against bias + sum of w*x computed here,
// and that line_done is high only in the fourteenth cycle of the line.
// A watchdog ends a hung run.
module tb_perceptron;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, mul_start = 1'b0;
  bias_t   bias;
  pixel_t  pixels  [LINE_PIX];
  weight_t weights [LINE_PIX];
  acc_t    acc;
  logic    line_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  perceptron dut (.clk, .rst_n, .clear, .bias, .mul_start, .pixels, .weights, .acc, .line_done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic image(input int mode);
    longint expect_acc;
    int b;
    b = (mode == 0) ? 32767 : (mode == 1) ? -32768 : int'($urandom_range(65535)) - 32768;
    @(negedge clk);
    bias = bias_t'(b); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0; bias = bias_t'($urandom);
    expect_acc = b;
    for (int l = 0; l < IMG_LINES; l++) begin
      for (int j = 0; j < LINE_PIX; j++) begin
        int p, w;
        p = (mode == 0) ? 255 : (mode == 1) ? 255 : int'($urandom_range(255));
        w = (mode == 0) ? 127 : (mode == 1) ? -128 : int'($urandom_range(255)) - 128;
        pixels[j] = pixel_t'(p); weights[j] = weight_t'(w);
        expect_acc += p * w;
      end
      mul_start = 1'b1;
      for (int c = 0; c < LINE_CYCLES; c++) begin
        @(negedge clk);
        if (c == 0) begin
          mul_start = 1'b0;
          for (int j = 0; j < LINE_PIX; j++) begin
            pixels[j] = pixel_t'($urandom); weights[j] = weight_t'($urandom);
          end
        end
        // now in cycle c+1 of the line; line_done belongs to cycle 13
        if (c + 1 < LINE_CYCLES) begin
          checks++;
          if (line_done != (c + 1 == LINE_CYCLES - 1)) begin
            failures++; $display("line_done=%0b in line cycle %0d", line_done, c + 1);
          end
        end
      end
      checks++;
      if (longint'(acc) != expect_acc) begin
        failures++; $display("image mode %0d line %0d: acc %0d, expected %0d", mode, l, acc, expect_acc);
      end
    end
  endtask

  initial begin
    bias = '0;
    foreach (pixels[j]) begin pixels[j] = '0; weights[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    image(0); image(1); image(2); image(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
