// classifier_controller: sequences one classification, 393 cycles long.
//
// The cycle budget is the design's: every image line takes 6 multiply cycles
// and 2 x 4 addition cycles (14 in all), the 28 lines take 392 cycles, and the
// max selector takes one more, 393. The lines are processed one after another
// without overlap. The controller is a three-state machine (IDLE, RUN,
// SELECT) with a line counter and a cycle-in-line counter:
//   edge with start=1 in IDLE : clear=1 that cycle (accumulators load biases),
//                               go to RUN, line 0, cycle 0
//   RUN, cycle 0              : mul_start=1, rd_line=line (operands sampled)
//   RUN, cycle 13             : perceptrons accumulate the line; next line,
//                               or SELECT after line 27
//   SELECT                    : sel_en=1 (digit register loads), back to IDLE,
//                               done pulses in the following cycle
// So done rises 393 edges after the edge that samples start. busy is high from
// the cycle after start until done. start is ignored while busy.
module classifier_controller
  import nn_pkg::*;
#(
  parameter int unsigned N_LINES = IMG_LINES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       clear,
  output logic       mul_start,
  output logic [4:0] rd_line,
  output logic       sel_en,
  output logic       busy,
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SELECT} state_t;

  state_t     state;
  logic [4:0] line;
  logic [3:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      line  <= '0;
      cyc   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          line  <= '0;
          cyc   <= '0;
        end
        S_RUN: begin
          if (32'(cyc) == LINE_CYCLES - 1) begin
            cyc <= '0;
            if (32'(line) == N_LINES - 1) state <= S_SELECT;
            else                          line  <= line + 5'd1;
          end else begin
            cyc <= cyc + 4'd1;
          end
        end
        S_SELECT: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign clear     = (state == S_IDLE) && start;
  assign mul_start = (state == S_RUN) && (cyc == '0);
  assign rd_line   = line;
  assign sel_en    = (state == S_SELECT);
  assign busy      = (state != S_IDLE);

endmodule
