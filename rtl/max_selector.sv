// max_selector: returns the index, in 4-bit binary, of the greatest of the ten
// sigmoid scores, i.e. the digit the image most probably shows.
//
// Function as in the design description (for example scores
// [0.1 0.2 0.3 0.44 0.88 0.15 0.2 0.33 0.6 0.76] give 4'b0100). The circuit is
// this design's: a linear chain of comparators where a later channel replaces
// the running maximum only if it is strictly greater, so a tie goes to the
// lowest digit. Purely combinational; the classifier registers its output in
// the single max-selector cycle.
module max_selector
  import nn_pkg::*;
#(
  parameter int unsigned N = NUM_CLASSES
) (
  input  score_t scores [N],
  output class_t index,
  output score_t max_score
);

  always_comb begin
    index     = '0;
    max_score = scores[0];
    for (int i = 1; i < N; i++) begin
      if (scores[i] > max_score) begin
        index     = class_t'(i);
        max_score = scores[i];
      end
    end
  end

endmodule
