// image_buffer: holds the 28 x 28 grey-scale input image (784 pixels of
// 8 bits) and delivers one whole line of 28 pixels to the perceptrons.
//
// The design describes the image only as the classifier's input; the storage
// is this design's choice. Pixels are written one at a time at row-major index
// addr = 28*line + column (synchronous write). The array holds one 224-bit word per line. The read port is combinational:
// rd_line selects a line and all 28 pixels of that line appear on line_pix in
// the same cycle. Writes with addr >= 784 are ignored. The array has no reset;
// load an image before using it.
module image_buffer
  import nn_pkg::*;
#(
  parameter int unsigned N_LINES = IMG_LINES
) (
  input  logic       clk,
  input  logic       we,
  input  logic [9:0] addr,
  input  pixel_t     wdata,
  input  logic [4:0] rd_line,
  output pixel_t     line_pix [LINE_PIX]
);

  localparam int unsigned NPIX = N_LINES * LINE_PIX;

  // one word per line, pixel j in bits [8j+7:8j]; a write updates one byte
  typedef logic [LINE_PIX*PIX_W-1:0] word_t;
  word_t mem [N_LINES];
  word_t word;

  logic [4:0] line;
  logic [9:0] col;
  assign line = 5'(addr / 10'(LINE_PIX));
  assign col  = addr % 10'(LINE_PIX);

  always_ff @(posedge clk) begin
    if (we && 32'(addr) < NPIX)
      mem[line][PIX_W * 32'(col) +: PIX_W] <= wdata;
  end

  assign word = (32'(rd_line) < N_LINES) ? mem[rd_line] : '0;
  for (genvar j = 0; j < LINE_PIX; j++) begin : g_col
    assign line_pix[j] = word[PIX_W*j +: PIX_W];
  end

endmodule
