// sigmoid_unit: squashes a perceptron sum into a score between 0 and 1,
// approximating sigmoid(x) = 1 / (1 + e^-x).
//
// The design asks for a sigmoid in fixed-point hardware but gives no circuit,
// so this unit uses the common piecewise-linear approximation whose slopes are
// powers of two (shifts, no multiplier). For x >= 0 it is the least of four
// lines, which makes it continuous and never decreasing:
//   y(|x|) = min( |x|/4 + 0.5, |x|/8 + 0.625, |x|/32 + 0.84375, 1 )
// i.e. the first line below |x| = 1, the second up to |x| = 2.333, the third
// up to |x| = 5 and 1 beyond; for x < 0, y = 1 - y(|x|). (The often quoted
// breakpoint 2.375 instead of 2.333 leaves a small downward step, which could
// reorder two scores in the max selector.)
// Input: signed sum with FRAC fraction bits (12 in this design). y is formed
// with FRAC fraction bits, truncated (the shifts drop bits), then reduced to
// an 8-bit score s = floor(y * 256), with y = 1 saturating to 255. The score is
// monotonic in x, never decreasing, which the max selector relies on.
// Purely combinational; no clock.
module sigmoid_unit
  import nn_pkg::*;
#(
  parameter int unsigned FRAC = FRAC_BITS
) (
  input  acc_t   x,
  output score_t y
);

  localparam logic [ACC_W-1:0] ONE    = ACC_W'(1) << FRAC;
  localparam logic [ACC_W-1:0] C_084  = (27 * ONE) >> 5;  // 0.84375
  localparam logic [ACC_W-1:0] C_0625 = (5 * ONE) >> 3;   // 0.625
  localparam logic [ACC_W-1:0] C_05   = ONE >> 1;         // 0.5

  logic [ACC_W-1:0] ax;     // |x|, 0 .. 2^31
  logic [ACC_W-1:0] l1, l2, l3;  // the three sloped lines at |x|
  logic [ACC_W-1:0] ypos;   // y(|x|) with FRAC fraction bits
  logic [ACC_W-1:0] yv;     // y(x)
  logic [ACC_W-1:0] ys;     // y scaled to the score's 8 fraction bits

  always_comb begin
    ax = x[ACC_W-1] ? ACC_W'(-x) : ACC_W'(x);
    l1   = (ax >> 2) + C_05;
    l2   = (ax >> 3) + C_0625;
    l3   = (ax >> 5) + C_084;
    ypos = ONE;
    if (l3 < ypos) ypos = l3;
    if (l2 < ypos) ypos = l2;
    if (l1 < ypos) ypos = l1;
    yv = x[ACC_W-1] ? ONE - ypos : ypos;
    ys = yv >> (FRAC - SCORE_W);
    y  = (ys > ACC_W'(2**SCORE_W - 1)) ? score_t'(2**SCORE_W - 1) : score_t'(ys);
  end

  // the score keeps SCORE_W of the FRAC fraction bits
  if (FRAC < SCORE_W || FRAC + 3 >= ACC_W) begin : g_bad_frac
    $error("FRAC out of range for the sum and score widths");
  end

endmodule
