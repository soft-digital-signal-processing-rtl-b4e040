// Miss detector on the output side.
//
// Consecutive input samples carry opposite flag values and, as long as the
// supply is not so low that two samples in a row are lost, at most one sample
// is lost between two delivered outputs. So if an output arrives with the
// same flag as the previous output, exactly one output was missed between
// them. The detector runs on the rising edge of the output register's
// completion signal (the moment a new output word is complete): 'miss' is
// combinational and valid at that edge; at the edge it stores the flag, and
// counts outputs and misses. The first output after reset is never a miss.
// The flag rule follows the document; the event, the counters and the reset
// are this design's choices.
module miss_detect (
  input  logic        rst,
  input  logic        done,
  input  logic        flag,
  output logic        miss,
  output logic        miss_q,
  output logic [31:0] miss_count,
  output logic [31:0] out_count
);
  timeunit 1ps; timeprecision 1ps;

  logic have_prev, flag_prev;

  assign miss = have_prev & (flag == flag_prev);

  always_ff @(posedge done or posedge rst) begin
    if (rst) begin
      have_prev  <= 1'b0;
      flag_prev  <= 1'b0;
      miss_q     <= 1'b0;
      miss_count <= '0;
      out_count  <= '0;
    end else begin
      have_prev  <= 1'b1;
      flag_prev  <= flag;
      miss_q     <= miss;
      out_count  <= out_count + 32'd1;
      if (miss) miss_count <= miss_count + 32'd1;
    end
  end
endmodule
