// image_classifier: hand-written digit classifier. A 28 x 28 grey-scale image
// and a trained weights matrix go in; the most likely digit, 0 to 9, comes out
// as a 4-bit number 393 clock cycles after start.
//
// Ten perceptrons, one per digit, each compute b + sum(w * x) over the 784
// pixels. The image is processed line by line: for each of the 28 lines all
// ten perceptrons multiply their 28 pixels by their 28 weights in parallel
// (6 cycles, 280 multipliers in all) and sum the 28 products in a Binary
// Addition Tree (4 stages x 2 cycles), accumulating line sums. After the last
// line each sum passes through a sigmoid and a max selector picks the digit
// with the greatest score (1 cycle). 28 x (6 + 8) + 1 = 393 cycles.
// The data flow, the counts and the cycle budget follow the design
// description; the number formats (see nn_pkg), the memories, the load ports
// and the controller are this design's choices.
// Interface:
//   img_we/img_addr/img_data      write pixel img_addr (row-major, 0..783)
//   w_we/w_class/w_addr/w_data    write weight of perceptron w_class for pixel w_addr
//   b_we/b_class/b_data           write bias of perceptron b_class
//   start                         one-cycle pulse; ignored while busy
//   busy, done                    done pulses once, 393 edges after the start edge
//   digit, scores                 held from done until the next done
// Writes to the image and the weights are ignored while busy, so the operands
// cannot change under a running classification. Asynchronous active-low reset.
module image_classifier
  import nn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       img_we,
  input  logic [9:0] img_addr,
  input  pixel_t     img_data,
  input  logic       w_we,
  input  class_t     w_class,
  input  logic [9:0] w_addr,
  input  weight_t    w_data,
  input  logic       b_we,
  input  class_t     b_class,
  input  bias_t      b_data,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output class_t     digit,
  output score_t     scores [NUM_CLASSES]
);

  logic       clear, mul_start, sel_en;
  logic [4:0] rd_line;

  pixel_t  line_pix [LINE_PIX];
  weight_t line_w   [NUM_CLASSES][LINE_PIX];
  bias_t   biases   [NUM_CLASSES];
  acc_t    acc      [NUM_CLASSES];
  score_t  sig      [NUM_CLASSES];
  logic [NUM_CLASSES-1:0] line_done;
  class_t  sel_index;
  score_t  sel_max;

  classifier_controller #(.N_LINES(IMG_LINES)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .clear    (clear),
    .mul_start(mul_start),
    .rd_line  (rd_line),
    .sel_en   (sel_en),
    .busy     (busy),
    .done     (done)
  );

  image_buffer #(.N_LINES(IMG_LINES)) u_img (
    .clk     (clk),
    .we      (img_we && !busy),
    .addr    (img_addr),
    .wdata   (img_data),
    .rd_line (rd_line),
    .line_pix(line_pix)
  );

  weight_memory #(.N_CLASSES(NUM_CLASSES), .N_LINES(IMG_LINES)) u_wmem (
    .clk    (clk),
    .rst_n  (rst_n),
    .w_we   (w_we && !busy),
    .w_class(w_class),
    .w_addr (w_addr),
    .w_data (w_data),
    .b_we   (b_we && !busy),
    .b_class(b_class),
    .b_data (b_data),
    .rd_line(rd_line),
    .line_w (line_w),
    .biases (biases)
  );

  for (genvar k = 0; k < NUM_CLASSES; k++) begin : g_neuron
    perceptron u_perceptron (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .bias     (biases[k]),
      .mul_start(mul_start),
      .pixels   (line_pix),
      .weights  (line_w[k]),
      .acc      (acc[k]),
      .line_done(line_done[k])
    );

    sigmoid_unit #(.FRAC(FRAC_BITS)) u_sigmoid (
      .x(acc[k]),
      .y(sig[k])
    );
  end

  max_selector #(.N(NUM_CLASSES)) u_max (
    .scores   (sig),
    .index    (sel_index),
    .max_score(sel_max)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      digit <= '0;
      for (int k = 0; k < NUM_CLASSES; k++) scores[k] <= '0;
    end else if (sel_en) begin
      digit <= sel_index;
      scores <= sig;
    end
  end

  // the ten perceptrons run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    line_done == {NUM_CLASSES{line_done[0]}});
  // the selected score is the greatest one
  a_max: assert property (@(posedge clk) disable iff (!rst_n)
    sel_en |-> sel_max == sig[sel_index]);

endmodule
