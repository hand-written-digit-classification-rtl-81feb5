// tb_image_classifier: end-to-end, full-size test of the digit classifier
// with every parameter at its default.
//
// Part 1, digit templates: ten seven-segment style digits are drawn on the
// 28 x 28 grid. Perceptron k gets weight +1/16 on the pixels of digit k and
// -1/16 elsewhere, and a bias that brings its sum to +1.5 for a perfect
// match, so every other digit scores lower. Each of the ten digit images
// (with faint random background noise) must be classified as itself; the
// "4" image reproduces the example of an input picture classified 4'b0100.
// Part 2, random networks: random images, weights and biases at three weight
// scales, so the sums land in every segment of the sigmoid, on both signs,
// and in saturation, where equal scores must go to the lowest digit.
// Every run is checked against sums, sigmoid and arg-max worked out here
// (digit and all ten scores), and done must come 393 edges after start.
// During some runs the testbench writes garbage to the image, weights and
// biases and pulses start again; both must be ignored, and a repeated run
// must give the same answer. Each mechanism is counted and must occur.
// A watchdog ends a hung run.
module tb_image_classifier;
  import nn_pkg::*;

  localparam int TOTAL = IMG_LINES * LINE_CYCLES + 1;  // 393

  logic clk = 1'b0, rst_n = 1'b0;
  logic img_we = 1'b0, w_we = 1'b0, b_we = 1'b0, start = 1'b0;
  logic [9:0] img_addr, w_addr;
  pixel_t img_data;
  class_t w_class, b_class;
  weight_t w_data;
  bias_t b_data;
  logic busy, done;
  class_t digit;
  score_t scores [NUM_CLASSES];

  int checks = 0, failures = 0;
  int img [IMG_PIX];
  int wt  [NUM_CLASSES][IMG_PIX];
  int bs  [NUM_CLASSES];

  // mechanism counters
  int n_runs = 0, n_template_ok = 0, n_example4 = 0, n_ties = 0, n_neg_sum = 0;
  int n_seg [8];   // sigmoid regions: [0..3] x>=0 lines 1..3 and saturation, [4..7] same for x<0
  int n_busy_writes = 0, n_busy_starts = 0;

  always #5 clk = ~clk;

  image_classifier dut (
    .clk, .rst_n, .img_we, .img_addr, .img_data, .w_we, .w_class, .w_addr, .w_data,
    .b_we, .b_class, .b_data, .start, .busy, .done, .digit, .scores);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int ref_score(longint xi, output int region);
    real one, ax, yp, yv;
    one = 4096.0;
    ax = (xi < 0) ? real'(-xi) : real'(xi);
    if (ax >= 5.0 * one)            begin yp = one;                           region = 3; end
    else if (ax >= 7.0 / 3.0 * one) begin yp = $floor(ax / 32.0) + 3456.0;    region = 2; end
    else if (ax >= one)             begin yp = $floor(ax / 8.0) + 2560.0;     region = 1; end
    else                            begin yp = $floor(ax / 4.0) + 2048.0;     region = 0; end
    if (xi < 0) region += 4;
    yv = (xi < 0) ? one - yp : yp;
    yv = $floor(yv / 16.0);
    return (yv > 255.0) ? 255 : int'(yv);
  endfunction

  // ---------------- loading ----------------
  task automatic load_all();
    for (int a = 0; a < IMG_PIX; a++) begin
      @(negedge clk);
      img_we = 1'b1; img_addr = 10'(a); img_data = pixel_t'(img[a]);
    end
    @(negedge clk); img_we = 1'b0;
    for (int k = 0; k < NUM_CLASSES; k++)
      for (int a = 0; a < IMG_PIX; a++) begin
        @(negedge clk);
        w_we = 1'b1; w_class = class_t'(k); w_addr = 10'(a); w_data = weight_t'(wt[k][a]);
      end
    @(negedge clk); w_we = 1'b0;
    for (int k = 0; k < NUM_CLASSES; k++) begin
      @(negedge clk);
      b_we = 1'b1; b_class = class_t'(k); b_data = bias_t'(bs[k]);
    end
    @(negedge clk); b_we = 1'b0;
  endtask

  task automatic load_image();
    for (int a = 0; a < IMG_PIX; a++) begin
      @(negedge clk);
      img_we = 1'b1; img_addr = 10'(a); img_data = pixel_t'(img[a]);
    end
    @(negedge clk); img_we = 1'b0;
  endtask

  // ---------------- one classification ----------------
  task automatic classify(input int expect_digit, input bit disturb, output int got);
    longint s;
    int sc [NUM_CLASSES];
    int best, nbest, region, n;
    best = 0;
    for (int k = 0; k < NUM_CLASSES; k++) begin
      s = longint'(bs[k]);
      for (int a = 0; a < IMG_PIX; a++) s += img[a] * wt[k][a];
      if (s < 0) n_neg_sum++;
      sc[k] = ref_score(s, region);
      n_seg[region]++;
      if (sc[k] > sc[best]) best = k;
    end
    nbest = 0;
    for (int k = 0; k < NUM_CLASSES; k++) if (sc[k] == sc[best]) nbest++;
    if (nbest > 1) n_ties++;

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;   // edges after the start edge
    while (!done && n < TOTAL + 20) begin
      if (disturb) begin
        img_we = 1'b1; img_addr = 10'($urandom_range(IMG_PIX - 1)); img_data = pixel_t'($urandom);
        w_we = 1'b1; w_class = class_t'($urandom_range(NUM_CLASSES - 1));
        w_addr = 10'($urandom_range(IMG_PIX - 1)); w_data = weight_t'($urandom);
        b_we = 1'b1; b_class = class_t'($urandom_range(NUM_CLASSES - 1)); b_data = bias_t'($urandom);
        start = (n % 97 == 5);
        if (busy) n_busy_writes++;
        if (busy && start) n_busy_starts++;
      end
      @(negedge clk);
      n++;
    end
    img_we = 1'b0; w_we = 1'b0; b_we = 1'b0; start = 1'b0;
    n_runs++;
    checks++;
    if (n != TOTAL) begin
      failures++; $display("run %0d: done after %0d cycles, expected %0d", n_runs, n, TOTAL);
    end
    checks++;
    if (int'(digit) != best) begin
      failures++; $display("run %0d: digit %0d, expected %0d", n_runs, digit, best);
    end
    for (int k = 0; k < NUM_CLASSES; k++) begin
      checks++;
      if (int'(scores[k]) != sc[k]) begin
        failures++; $display("run %0d: score %0d = %0d, expected %0d", n_runs, k, scores[k], sc[k]);
      end
    end
    if (expect_digit >= 0) begin
      checks++;
      if (int'(digit) != expect_digit) begin
        failures++; $display("template %0d classified as %0d", expect_digit, digit);
      end else n_template_ok++;
    end
    got = int'(digit);
  endtask

  // ---------------- seven-segment digit templates ----------------
  function automatic bit on_segment(int seg, int r, int c);
    case (seg)
      0: return r >= 3  && r <= 5  && c >= 8  && c <= 19;   // a: top
      1: return r >= 3  && r <= 13 && c >= 17 && c <= 19;   // b: upper right
      2: return r >= 14 && r <= 24 && c >= 17 && c <= 19;   // c: lower right
      3: return r >= 22 && r <= 24 && c >= 8  && c <= 19;   // d: bottom
      4: return r >= 14 && r <= 24 && c >= 8  && c <= 10;   // e: lower left
      5: return r >= 3  && r <= 13 && c >= 8  && c <= 10;   // f: upper left
      6: return r >= 12 && r <= 15 && c >= 8  && c <= 19;   // g: middle
      default: return 1'b0;
    endcase
  endfunction

  function automatic bit in_digit(int d, int a);
    static logic [6:0] segs [10] = '{7'b0111111, 7'b0000110, 7'b1011011, 7'b1001111, 7'b1100110,
                                     7'b1101101, 7'b1111101, 7'b0000111, 7'b1111111, 7'b1101111};
    for (int s = 0; s < 7; s++)
      if (segs[d][s] && on_segment(s, a / LINE_PIX, a % LINE_PIX)) return 1'b1;
    return 1'b0;
  endfunction

  localparam int INK = 100;   // grey level of a stroke

  initial begin
    int got, got2;
    img_addr = '0; img_data = '0; w_class = '0; w_addr = '0; w_data = '0; b_class = '0; b_data = '0;
    foreach (n_seg[i]) n_seg[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Part 1: templates
    for (int k = 0; k < NUM_CLASSES; k++) begin
      int tsum;
      tsum = 0;
      for (int a = 0; a < IMG_PIX; a++) begin
        wt[k][a] = in_digit(k, a) ? 1 : -1;
        if (in_digit(k, a)) tsum += INK;
      end
      bs[k] = 6144 - tsum;   // +1.5 for a perfect match
      checks++;
      if (bs[k] < -32768) begin failures++; $display("template bias out of range"); end
    end
    for (int d = 0; d < NUM_CLASSES; d++) begin
      for (int a = 0; a < IMG_PIX; a++) img[a] = in_digit(d, a) ? INK : int'($urandom_range(3));
      if (d == 0) load_all(); else load_image();
      classify(d, 1'b0, got);
      if (d == 4 && got == 4) n_example4++;
    end

    // Part 2: random networks; weight scales give small, medium and saturating sums
    for (int r = 0; r < 12; r++) begin
      int wmax;
      wmax = (r % 3 == 0) ? 2 : (r % 3 == 1) ? 6 : 127;
      for (int a = 0; a < IMG_PIX; a++) img[a] = int'($urandom_range(255));
      for (int k = 0; k < NUM_CLASSES; k++) begin
        for (int a = 0; a < IMG_PIX; a++) wt[k][a] = int'($urandom_range(2 * wmax)) - wmax;
        bs[k] = int'($urandom_range(65535)) - 32768;
      end
      load_all();
      classify(-1, r % 4 == 1, got);
      if (r % 4 == 1) begin
        // the disturbed run must not have changed the stored operands
        classify(-1, 1'b0, got2);
        checks++;
        if (got2 != got) begin failures++; $display("repeat run differs"); end
      end
    end
    // all weights at the extremes, all pixels white
    for (int a = 0; a < IMG_PIX; a++) img[a] = 255;
    for (int k = 0; k < NUM_CLASSES; k++) begin
      for (int a = 0; a < IMG_PIX; a++) wt[k][a] = (k % 2 == 0) ? 127 : -128;
      bs[k] = (k % 2 == 0) ? 32767 : -32768;
    end
    load_all();
    classify(-1, 1'b0, got);

    // every mechanism must have happened
    begin
      static string names [8] = '{"line1+", "line2+", "line3+", "sat+", "line1-", "line2-", "line3-", "sat-"};
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (n_seg[i] == 0) begin failures++; $display("sigmoid region %s never used", names[i]); end
      end
    end
    checks += 6;
    if (n_template_ok != NUM_CLASSES) begin failures++; $display("templates recognised: %0d", n_template_ok); end
    if (n_example4 == 0)     begin failures++; $display("example 4 not classified"); end
    if (n_ties == 0)         begin failures++; $display("no tie in the max selector"); end
    if (n_neg_sum == 0)      begin failures++; $display("no negative sum"); end
    if (n_busy_writes == 0)  begin failures++; $display("no write while busy"); end
    if (n_busy_starts == 0)  begin failures++; $display("no start while busy"); end
    $display("runs=%0d templates=%0d ties=%0d neg=%0d busy_writes=%0d busy_starts=%0d regions=%0d/%0d/%0d/%0d/%0d/%0d/%0d/%0d",
             n_runs, n_template_ok, n_ties, n_neg_sum, n_busy_writes, n_busy_starts,
             n_seg[0], n_seg[1], n_seg[2], n_seg[3], n_seg[4], n_seg[5], n_seg[6], n_seg[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
