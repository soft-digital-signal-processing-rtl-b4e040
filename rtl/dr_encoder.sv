// Synchronous-to-dual-rail source with the miss-detection flag.
//
// The synchronous side (for example an A/D converter) delivers one W-bit
// sample per period. This block, clocked at twice the sample rate, puts each
// sample on the bus as dual-rail DATA for one clock and as SPACER for the
// next, so DATA and SPACER last equally long. A flag bit (bus[W]) is attached
// to every sample and alternates DATA0, DATA1, DATA0, ... on consecutive
// samples, which lets the output side see when one was lost. The source never
// waits for the acknowledge: its rate is fixed, as in the document.
// Interface: 'take' is high in the clock cycle before the edge on which
// 'sample' is captured; 'data_phase' is high while the bus carries DATA.
// Reset: bus SPACER, next sample carries flag DATA0.
// The flag scheme follows the document; the clocking is this design's choice.
module dr_encoder
  import dr_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [W-1:0]    sample,
  output logic            take,
  output logic            data_phase,
  output dr_bit_t [W:0]   bus
);
  timeunit 1ps; timeprecision 1ps;

  logic flag;

  // The next edge starts a DATA phase whenever the bus is now SPACER.
  assign take = ~data_phase;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      data_phase <= 1'b0;
      flag       <= 1'b0;
      bus        <= {(W+1){DR_SPACER}};
    end else if (!data_phase) begin
      data_phase <= 1'b1;
      flag       <= ~flag;
      for (int i = 0; i < W; i++) bus[i] <= dr_encode(sample[i]);
      bus[W]     <= dr_encode(flag);
    end else begin
      data_phase <= 1'b0;
      bus        <= {(W+1){DR_SPACER}};
    end
  end
endmodule
