// perceptron: one output neuron of the classifier. It forms
//   acc = b + sum over all 784 pixels of w[i] * x[i]
// one image line at a time; the sigmoid that completes out = sigmoid(w.x + b)
// sits outside, in sigmoid_unit.
//
// Per line, 28 seq_multipliers form the 28 products in parallel (six cycles)
// and a bat_adder_tree sums them (eight cycles). In the last tree cycle the
// tree's final adder result is added into the accumulator. The tree is
// started by the multipliers' done pulse, so a line takes 6 + 8 = 14 cycles
// from mul_start; lines are not overlapped, as in the design's cycle count.
// Loading the bias into the accumulator at the start of an image is this
// design's choice of where the bias b enters the sum.
// Interface: clear (one cycle, loads bias into acc); mul_start (one cycle,
// pixels and weights sampled on that edge); line_done pulses in the
// fourteenth cycle of the line, the cycle whose closing edge updates acc.
// acc is a signed 32-bit sum with 12 fraction bits.
module perceptron
  import nn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  bias_t   bias,
  input  logic    mul_start,
  input  pixel_t  pixels  [LINE_PIX],
  input  weight_t weights [LINE_PIX],
  output acc_t    acc,
  output logic    line_done
);

  localparam int unsigned SUM_W = PROD_W + 5;

  prod_t                   prod [LINE_PIX];
  logic [LINE_PIX-1:0]     mul_done;
  logic signed [SUM_W-1:0] line_sum;

  for (genvar j = 0; j < LINE_PIX; j++) begin : g_mul
    seq_multiplier u_mul (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (mul_start),
      .pixel  (pixels[j]),
      .weight (weights[j]),
      .product(prod[j]),
      .done   (mul_done[j])
    );
  end

  // all multipliers start together, so any one's done marks the line
  bat_adder_tree #(.IN_W(PROD_W), .SUM_W(SUM_W)) u_bat (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_done[0]),
    .x        (prod),
    .sum      (line_sum),
    .out_valid(line_done)
  );

  // the 28 multipliers run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    mul_done == {LINE_PIX{mul_done[0]}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         acc <= '0;
    else if (clear)     acc <= acc_t'(bias);
    else if (line_done) acc <= acc + acc_t'(line_sum);
  end

endmodule
