// weight_memory: the classifier's "weights matrix": one signed 8-bit weight
// per pixel for each of the ten perceptrons (10 x 784) plus one bias per
// perceptron.
//
// The weights are trained elsewhere and loaded here; the design gives the
// matrix as an input of the classifier but no storage structure, so the
// organisation is this design's choice: one 224-bit word per class and line. Weights are written one at a time
// (class, row-major pixel index) and biases one at a time (class); both are
// synchronous writes, and out-of-range classes or indices are ignored. The
// read port is combinational: rd_line selects an image line and line_w
// returns the 28 weights of that line for every class at once, which is what
// the ten perceptrons multiply in parallel. Biases are always readable.
// The weight array has no reset; biases reset to zero.
module weight_memory
  import nn_pkg::*;
#(
  parameter int unsigned N_CLASSES = NUM_CLASSES,
  parameter int unsigned N_LINES   = IMG_LINES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       w_we,
  input  class_t     w_class,
  input  logic [9:0] w_addr,
  input  weight_t    w_data,
  input  logic       b_we,
  input  class_t     b_class,
  input  bias_t      b_data,
  input  logic [4:0] rd_line,
  output weight_t    line_w [N_CLASSES][LINE_PIX],
  output bias_t      biases [N_CLASSES]
);

  localparam int unsigned NPIX = N_LINES * LINE_PIX;

  // one word per class and line: the 28 weights of that line, weight j in
  // bits [8j+7:8j]; a weight write updates one byte of a word
  typedef logic [LINE_PIX*W_W-1:0] word_t;
  word_t mem [N_CLASSES * N_LINES];

  logic [9:0] w_line, w_col;
  assign w_line = w_addr / 10'(LINE_PIX);
  assign w_col  = w_addr % 10'(LINE_PIX);

  always_ff @(posedge clk) begin
    if (w_we && 32'(w_class) < N_CLASSES && 32'(w_addr) < NPIX)
      mem[32'(w_class) * N_LINES + 32'(w_line)][W_W * 32'(w_col) +: W_W] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_CLASSES; k++) biases[k] <= '0;
    end else if (b_we && 32'(b_class) < N_CLASSES) begin
      biases[b_class] <= b_data;
    end
  end

  for (genvar k = 0; k < N_CLASSES; k++) begin : g_rd
    word_t word;
    assign word = (32'(rd_line) < N_LINES) ? mem[k * N_LINES + 32'(rd_line)] : '0;
    for (genvar j = 0; j < LINE_PIX; j++) begin : g_col
      assign line_w[k][j] = word[W_W*j +: W_W];
    end
  end

endmodule
