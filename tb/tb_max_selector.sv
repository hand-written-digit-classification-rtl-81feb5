// tb_max_selector: self-checking test of the ten-way max selector.
// Checks the worked example of the design description (scores 0.1 ... 0.76,
// answer 4), a maximum in every position, all-equal and two-way ties (lowest
// index wins) and 2000 random score sets against a reference search written
// here. A watchdog ends a hung run.
module tb_max_selector;
  import nn_pkg::*;

  score_t scores [NUM_CLASSES];
  class_t index;
  score_t max_score;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  max_selector dut (.scores, .index, .max_score);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int best = 0;
    #1;
    for (int i = NUM_CLASSES - 1; i >= 0; i--)
      if (scores[i] >= scores[best]) best = i;
    checks += 2;
    if (int'(index) != best) begin
      failures++; $display("index %0d, expected %0d", index, best);
    end
    if (max_score != scores[best]) begin
      failures++; $display("max %0d, expected %0d", max_score, scores[best]);
    end
  endtask

  initial begin
    static real ex [NUM_CLASSES] = '{0.1, 0.2, 0.3, 0.44, 0.88, 0.15, 0.2, 0.33, 0.6, 0.76};
    foreach (ex[i]) scores[i] = score_t'(int'(ex[i] * 256.0));
    check();
    checks++;
    if (index != 4'b0100) begin
      failures++; $display("worked example gave %0d", index);
    end
    for (int p = 0; p < NUM_CLASSES; p++) begin
      foreach (scores[i]) scores[i] = score_t'(i == p ? 200 : 100 + i);
      check();
    end
    foreach (scores[i]) scores[i] = 8'd77;
    check();
    for (int p = 0; p < NUM_CLASSES - 1; p++) begin
      foreach (scores[i]) scores[i] = score_t'((i == p || i == p + 1) ? 255 : 10);
      check();
    end
    for (int n = 0; n < 2000; n++) begin
      foreach (scores[i]) scores[i] = score_t'($urandom_range((n % 2) != 0 ? 255 : 7));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
