// Muller C-element with N inputs and a reset.
//
// The output rises once every input is high, falls once every input is low,
// and otherwise keeps its value. It is the storage element of the dual-rail
// registers, the completion tree and the full adder. The state is written as
// a level-sensitive latch whose enable is "all inputs agree" and whose data is
// that common value; reset clears it so every bus starts as SPACER.
// Timing: zero delay, purely level sensitive. Synthesis maps it to a latch;
// the circuit-level latch warning is expected, the C-element is a latch.
// Inside a handshake loop lint may instead report circular logic or "no
// latch": the feedback through the loop is what holds the state.
// The document only names the C-element; this form and the reset are this
// design's choice.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         q
);
  timeunit 1ps; timeprecision 1ps;

  logic agree;  // all inputs equal: the latch is transparent
  assign agree = (&in) | ~(|in);

  always_latch begin
    if (rst)        q = 1'b0;
    else if (agree) q = in[0];
  end
endmodule
