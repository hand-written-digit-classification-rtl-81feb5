// tb_sigmoid_unit: self-checking test of the piecewise-linear sigmoid.
// Sweeps x from -6 to +6 in steps of 1/256 plus the extreme sums and random
// sums. Each score is checked three ways: exactly against the same
// piecewise-linear rule, written with explicit breakpoints, evaluated here in
// real arithmetic and truncated like
// the hardware; within 0.025 of the true 1/(1+e^-x); and, along the sweep,
// never below the previous score (monotonic). A watchdog ends a hung run.
module tb_sigmoid_unit;
  import nn_pkg::*;

  acc_t   x;
  score_t y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  sigmoid_unit dut (.x, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_score(longint xi);
    real one, ax, yp, yv;
    one = real'(longint'(1) << FRAC_BITS);
    ax = (xi < 0) ? real'(-xi) : real'(xi);
    // breakpoints where the lines meet: 1, 7/3 and 5
    if (ax >= 5.0 * one)              yp = one;
    else if (ax >= 7.0 / 3.0 * one)   yp = $floor(ax / 32.0) + 0.84375 * one;
    else if (ax >= one)               yp = $floor(ax / 8.0) + 0.625 * one;
    else                              yp = $floor(ax / 4.0) + 0.5 * one;
    yv = (xi < 0) ? one - yp : yp;
    yv = $floor(yv / (one / 256.0));
    return (yv > 255.0) ? 255 : int'(yv);
  endfunction

  task automatic check(input longint xi, input bit check_true);
    int r;
    real xr, t;
    x = acc_t'(xi);
    #1;
    r = ref_score(xi);
    checks++;
    if (int'(y) != r) begin
      failures++; $display("x=%0d: score %0d, expected %0d", xi, y, r);
    end
    if (check_true) begin
      xr = real'(xi) / real'(longint'(1) << FRAC_BITS);
      t = 1.0 / (1.0 + $exp(-xr));
      checks++;
      if ((real'(y) / 256.0 - t) > 0.025 || (t - real'(y) / 256.0) > 0.025) begin
        failures++; $display("x=%f: score %0d/256 far from sigmoid %f", xr, y, t);
      end
    end
  endtask

  initial begin
    int prev;
    prev = 0;
    for (longint xi = -6 * 4096; xi <= 6 * 4096; xi += 16) begin
      check(xi, 1'b1);
      checks++;
      if (int'(y) < prev) begin
        failures++; $display("not monotonic at x=%0d", xi);
      end
      prev = int'(y);
    end
    check(-64'sd2147483648, 1'b0);
    check(longint'(2147483647), 1'b0);
    check(-1, 1'b1); check(0, 1'b1); check(1, 1'b1);
    for (int i = 0; i < 500; i++) check(longint'($signed($urandom)) >>> ($urandom_range(20)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
