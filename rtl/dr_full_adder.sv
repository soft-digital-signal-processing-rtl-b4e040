// Dual-rail delay-insensitive full adder (minterm form).
//
// Each of the eight input combinations (a, b, ci) has a 3-input C-element on
// the matching rails; it fires only when all three inputs carry DATA and
// resets only when all three are back to SPACER. The sum and carry rails are
// ORs of the minterms that make them 0 or 1. Because every output waits for
// every input, DATA and SPACER both take exactly one adder delay and an output
// never appears before all inputs have arrived, which keeps the adder correct
// whatever the gate delays are.
// The document calls for a delay-insensitive full adder without giving one;
// this minterm circuit is this design's choice.
// DELAY is the adder's propagation delay in ps for simulation (it stands for
// the supply-voltage dependent gate delay); synthesis ignores it, and a
// zero-delay lint reports it as an ignored delay.
// Lint reports the C-element feedback and, inside a pipeline, the handshake
// loop through this block as circular logic; that loop is the asynchronous
// circuit itself.
module dr_full_adder
  import dr_pkg::*;
#(
  parameter int unsigned DELAY = 0
) (
  input  logic    rst,
  input  dr_bit_t a,
  input  dr_bit_t b,
  input  dr_bit_t ci,
  output dr_bit_t s,
  output dr_bit_t co
);
  timeunit 1ps; timeprecision 1ps;

  // m[{a,b,ci}] is the minterm for that input combination.
  logic [7:0] m;
  dr_bit_t    s_n, co_n;

  for (genvar k = 0; k < 8; k++) begin : g_min
    c_element #(.N(3)) u_c (
      .rst (rst),
      .in  ({ (k[2] ? a.d1  : a.d0),
              (k[1] ? b.d1  : b.d0),
              (k[0] ? ci.d1 : ci.d0) }),
      .q   (m[k])
    );
  end

  assign s_n.d1  = m[1] | m[2] | m[4] | m[7];
  assign s_n.d0  = m[0] | m[3] | m[5] | m[6];
  assign co_n.d1 = m[3] | m[5] | m[6] | m[7];
  assign co_n.d0 = m[0] | m[1] | m[2] | m[4];

  assign #(DELAY) s  = s_n;
  assign #(DELAY) co = co_n;
endmodule
