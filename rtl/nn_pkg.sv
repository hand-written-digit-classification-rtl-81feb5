// nn_pkg: widths, types and cycle budgets shared by the digit classifier.
//
// The classifier reads a 28x28 grey-scale image (8-bit pixels, 0..255), one
// line of 28 pixels at a time, and feeds it to ten perceptrons, one per digit.
// Pixel count, line length, class count, the 8-bit grey level, the 6-cycle
// multiply and the 4 x 2-cycle addition tree come from the design description.
// The number formats are this design's own choice:
//   pixel   unsigned, read as p/256      (Q0.8)
//   weight  signed 8 bit, read as w/16   (Q3.4, range -8 .. +7.9375)
//   product signed 16 bit, 12 fraction bits
//   sum     signed 32 bit, 12 fraction bits (784 products need 26 bits)
//   bias    signed 16 bit, 12 fraction bits
//   score   sigmoid output, unsigned 8 bit, read as s/256
package nn_pkg;

  localparam int unsigned PIX_W     = 8;
  localparam int unsigned W_W       = 8;
  localparam int unsigned PROD_W    = PIX_W + W_W;  // 255 * -128 fits 16 bit signed
  localparam int unsigned ACC_W     = 32;
  localparam int unsigned BIAS_W    = 16;
  localparam int unsigned FRAC_BITS = 12;            // fraction bits of products and sums
  localparam int unsigned SCORE_W   = 8;

  localparam int unsigned LINE_PIX    = 28;          // pixels per image line = BAT inputs
  localparam int unsigned IMG_LINES   = 28;
  localparam int unsigned IMG_PIX     = LINE_PIX * IMG_LINES;  // 784
  localparam int unsigned NUM_CLASSES = 10;
  localparam int unsigned CLASS_W     = 4;           // digit output width

  localparam int unsigned MUL_CYCLES  = 6;           // multiply phase of a line
  localparam int unsigned ADD_CYCLES  = 8;           // 4 BAT stages x 2 cycles
  localparam int unsigned LINE_CYCLES = MUL_CYCLES + ADD_CYCLES;  // 14
  // 28 * 14 + 1 = 393 cycles from start to digit

  typedef logic        [PIX_W-1:0]   pixel_t;
  typedef logic signed [W_W-1:0]     weight_t;
  typedef logic signed [PROD_W-1:0]  prod_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic signed [BIAS_W-1:0]  bias_t;
  typedef logic        [SCORE_W-1:0] score_t;
  typedef logic        [CLASS_W-1:0] class_t;

endpackage
