// Linear interpolation of a missed output.
//
// On each output event (rising completion of the output register) the block
// stores the new word in y. If the miss detector says a word was lost just
// before it, y_est receives the average of the previous word and the new one,
// floor((y_prev + y_in) / 2), and est_valid is set; otherwise est_valid is
// cleared and y_est keeps its old value. A consumer reading at the event
// therefore gets, in order, y_est (when est_valid) and then y.
// Linear interpolation by averaging the two neighbours follows the document;
// unsigned words, rounding down and the reset are this design's choices.
module interpolator #(
  parameter int unsigned W = 9
) (
  input  logic         rst,
  input  logic         done,
  input  logic         miss,
  input  logic [W-1:0] y_in,
  output logic [W-1:0] y,
  output logic [W-1:0] y_est,
  output logic         est_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] pair_avg;
  always_comb pair_avg = W'(({1'b0, y} + {1'b0, y_in}) >> 1);

  always_ff @(posedge done or posedge rst) begin
    if (rst) begin
      y         <= '0;
      y_est     <= '0;
      est_valid <= 1'b0;
    end else begin
      y         <= y_in;
      est_valid <= miss;
      if (miss) y_est <= pair_avg;
    end
  end
endmodule
