// bat_adder_tree: Binary Addition Tree summing the 28 products of one image
// line with 27 two-input adders in four stages of two clock cycles each.
//
// The adder numbering and the way the adders are joined follow the design's
// tree drawing: the 28 inputs are split into a 16-input half on the left
// (adders 1-8, 9-12, 13-14, 26) and a 12-input half on the right (adders 15-20,
// 21-23, 24, 25); adder 27 joins the two halves.
//   stage 1  adders 1-8  : x[2i]+x[2i+1], i = 0..7      adders 15-20: x[16..27]
//   stage 2  adders 9-12 : 1+2, 3+4, 5+6, 7+8           adders 21-23: 15+16, 17+18, 19+20
//   stage 3  adder 13 = 9+10, adder 14 = 11+12          adder 24 = 21+22 (23 waits)
//   stage 4  adder 26 = 13+14, adder 25 = 24+23, then adder 27 = 26+25
// Each stage is given two cycles, which gives the 2 x 4 = 8 addition cycles
// of a line. How the two cycles are used is this design's choice: in stages
// 1-3 the results of a stage are registered at the end of its second cycle
// (the adders have two cycles to settle); stage 4 holds two adder levels, so
// adders 25 and 26 are registered at the end of its first cycle and adder 27
// works in its second cycle and drives `sum` directly for the consumer's
// register (the perceptron's accumulator).
// Timing: in_valid is a one-cycle pulse in cycle 1; x must stay stable during
// cycles 1 and 2. sum is valid while out_valid is high, in cycle 8.
module bat_adder_tree
  import nn_pkg::*;
#(
  parameter int unsigned IN_W  = PROD_W,
  parameter int unsigned SUM_W = PROD_W + 5   // 28 inputs need 5 more bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [LINE_PIX],
  output logic signed [SUM_W-1:0] sum,
  output logic                    out_valid
);

  typedef logic signed [SUM_W-1:0] s_t;

  logic [3:0] cyc;          // 0 idle, otherwise the current cycle 1..8
  s_t a [1:26];             // registered adder outputs, index = adder number

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0;
      for (int i = 1; i <= 26; i++) a[i] <= '0;
    end else begin
      if (in_valid)          cyc <= 4'd2;
      else if (cyc == 4'd8)  cyc <= '0;
      else if (cyc != '0)    cyc <= cyc + 4'd1;

      // stage 1: end of cycle 2
      if (cyc == 4'd2) begin
        for (int i = 0; i < 8; i++)
          a[1+i] <= s_t'(x[2*i]) + s_t'(x[2*i+1]);
        for (int i = 0; i < 6; i++)
          a[15+i] <= s_t'(x[16+2*i]) + s_t'(x[17+2*i]);
      end
      // stage 2: end of cycle 4
      if (cyc == 4'd4) begin
        a[9]  <= a[1]  + a[2];
        a[10] <= a[3]  + a[4];
        a[11] <= a[5]  + a[6];
        a[12] <= a[7]  + a[8];
        a[21] <= a[15] + a[16];
        a[22] <= a[17] + a[18];
        a[23] <= a[19] + a[20];
      end
      // stage 3: end of cycle 6
      if (cyc == 4'd6) begin
        a[13] <= a[9]  + a[10];
        a[14] <= a[11] + a[12];
        a[24] <= a[21] + a[22];
      end
      // stage 4, first level: end of cycle 7
      if (cyc == 4'd7) begin
        a[26] <= a[13] + a[14];
        a[25] <= a[24] + a[23];
      end
    end
  end

  // stage 4, second level: adder 27 in cycle 8
  assign sum       = a[26] + a[25];
  assign out_valid = (cyc == 4'd8);

endmodule
