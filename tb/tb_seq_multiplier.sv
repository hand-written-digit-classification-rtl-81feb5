// tb_seq_multiplier: self-checking test of seq_multiplier.
// Multiplies the corner operands (0, 255, -128, 127, -1) and 300 random pairs,
// compares each product with the integer product worked out here, and checks
// that done rises exactly six clock edges after the edge that samples start,
// counting that edge as the first. A watchdog ends a hung run.
module tb_seq_multiplier;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pixel_t  pixel;
  weight_t weight;
  prod_t   product;
  logic    done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_multiplier dut (.clk, .rst_n, .start, .pixel, .weight, .product, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p, input int w);
    int n, expect_p;
    @(negedge clk);
    pixel = pixel_t'(p); weight = weight_t'(w); start = 1'b1;
    @(posedge clk); n = 1;
    @(negedge clk); start = 1'b0; pixel = pixel_t'($urandom); weight = weight_t'($urandom);
    while (!done && n < 20) begin
      @(posedge clk); #1 n++;
      if (done) break;
    end
    expect_p = p * w;
    checks += 2;
    if (n != MUL_CYCLES) begin
      failures++; $display("latency %0d for %0d*%0d, expected %0d", n, p, w, MUL_CYCLES);
    end
    if (int'(product) != expect_p) begin
      failures++; $display("%0d * %0d = %0d, expected %0d", p, w, product, expect_p);
    end
  endtask

  initial begin
    pixel = '0; weight = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0); run(255, 127); run(255, -128); run(1, -1); run(255, -1);
    run(128, -128); run(3, 3); run(170, 85); run(85, -86);
    for (int i = 0; i < 300; i++)
      run(int'($urandom_range(255)), int'($urandom_range(255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
