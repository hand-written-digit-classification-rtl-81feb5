// seq_multiplier: multiplies one unsigned 8-bit pixel by one signed 8-bit
// weight in six clock cycles.
//
// Each perceptron owns one of these per pixel of a line (28 of them), so a
// whole line is multiplied in parallel in six cycles, as the design budget
// prescribes. How the six cycles are spent is this design's choice: the pixel
// is consumed two bits at a time (radix 4), so eight bits take four add
// steps; one cycle loads the operands and one writes the result register.
//   cycle 1  (edge where start=1)  load pixel, weight and 3*weight
//   cycles 2-5                     part += digit * (weight << 2k), k = 0..3
//   cycle 6                        product <= part, done pulses
// done is high for the one cycle that follows the sixth edge; product holds its
// value until the next multiplication ends, so a consumer may read it for as
// long as no new start is given. A start while busy restarts the operation.
// Interface: start (1-cycle pulse), pixel, weight -> product (signed, 16 bit,
// exact), done. Asynchronous active-low reset clears product and done.
module seq_multiplier
  import nn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  pixel_t  pixel,
  input  weight_t weight,
  output prod_t   product,
  output logic    done
);

  logic [2:0]       step;     // 0 idle, 1..4 add steps, 5 write result
  logic [PIX_W-1:0] a_sh;     // pixel bits not yet consumed
  prod_t            m1, m3;   // weight and 3*weight, shifted by 2 per step
  prod_t            part;     // partial product
  prod_t            pp;       // current partial product term

  always_comb begin
    unique case (a_sh[1:0])
      2'd0: pp = '0;
      2'd1: pp = m1;
      2'd2: pp = m1 <<< 1;
      2'd3: pp = m3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step    <= '0;
      a_sh    <= '0;
      m1      <= '0;
      m3      <= '0;
      part    <= '0;
      product <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_sh <= pixel;
        m1   <= prod_t'(weight);
        m3   <= prod_t'(weight) + (prod_t'(weight) <<< 1);
        part <= '0;
        step <= 3'd1;
      end else if (step >= 3'd1 && step <= 3'd4) begin
        part <= part + pp;
        a_sh <= a_sh >> 2;
        m1   <= m1 <<< 2;
        m3   <= m3 <<< 2;
        step <= step + 3'd1;
      end else if (step == 3'd5) begin
        product <= part;
        done    <= 1'b1;
        step    <= '0;
      end
    end
  end

endmodule
