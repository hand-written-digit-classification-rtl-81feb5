// tb_weight_memory: self-checking test of the weights matrix store.
// Checks that biases reset to zero, writes all 10 x 784 weights and the ten
// biases with random values, attempts out-of-range writes (class 10..15,
// pixel >= 784) that must be ignored, and reads every line back for all ten
// classes at once, comparing with a copy kept here. A watchdog ends a hung run.
module tb_weight_memory;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, w_we = 1'b0, b_we = 1'b0;
  class_t w_class, b_class;
  logic [9:0] w_addr;
  weight_t w_data;
  bias_t b_data;
  logic [4:0] rd_line;
  weight_t line_w [NUM_CLASSES][LINE_PIX];
  bias_t biases [NUM_CLASSES];
  int checks = 0, failures = 0;
  int wmodel [NUM_CLASSES][IMG_PIX];
  int bmodel [NUM_CLASSES];

  always #5 clk = ~clk;

  weight_memory dut (
    .clk, .rst_n, .w_we, .w_class, .w_addr, .w_data, .b_we, .b_class, .b_data,
    .rd_line, .line_w, .biases);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_class = '0; w_addr = '0; w_data = '0; b_class = '0; b_data = '0; rd_line = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NUM_CLASSES; k++) begin
      checks++;
      if (biases[k] != '0) begin
        failures++; $display("bias %0d not reset", k);
      end
    end
    for (int round = 0; round < 2; round++) begin
      for (int k = 0; k < NUM_CLASSES; k++)
        for (int a = 0; a < IMG_PIX; a++) begin
          @(negedge clk);
          w_we = 1'b1; w_class = class_t'(k); w_addr = 10'(a);
          w_data = weight_t'($urandom); wmodel[k][a] = int'(w_data);
        end
      for (int k = 0; k < NUM_CLASSES; k++) begin
        @(negedge clk);
        w_we = 1'b0; b_we = 1'b1; b_class = class_t'(k);
        b_data = bias_t'($urandom); bmodel[k] = int'(b_data);
      end
      // ignored writes
      for (int k = NUM_CLASSES; k < 16; k++) begin
        @(negedge clk);
        w_we = 1'b1; w_class = class_t'(k); w_addr = 10'($urandom_range(IMG_PIX - 1)); w_data = weight_t'($urandom);
        b_we = 1'b1; b_class = class_t'(k); b_data = bias_t'($urandom);
      end
      for (int a = IMG_PIX; a < 1024; a += 5) begin
        @(negedge clk);
        w_we = 1'b1; w_class = class_t'($urandom_range(NUM_CLASSES - 1)); w_addr = 10'(a);
        b_we = 1'b0;
      end
      @(negedge clk);
      w_we = 1'b0; b_we = 1'b0;
      for (int k = 0; k < NUM_CLASSES; k++) begin
        checks++;
        if (int'(biases[k]) != bmodel[k]) begin
          failures++; $display("bias %0d: %0d, expected %0d", k, biases[k], bmodel[k]);
        end
      end
      for (int l = 0; l < IMG_LINES; l++) begin
        rd_line = 5'(l);
        #1;
        for (int k = 0; k < NUM_CLASSES; k++)
          for (int j = 0; j < LINE_PIX; j++) begin
            checks++;
            if (int'(line_w[k][j]) != wmodel[k][l * LINE_PIX + j]) begin
              failures++; $display("class %0d line %0d col %0d: %0d, expected %0d", k, l, j, line_w[k][j], wmodel[k][l * LINE_PIX + j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
