// Dual-rail encoding shared by the self-timed blocks.
//
// Every bit of a self-timed bus travels on two wires (d1, d0):
//   DATA0  = (d1=0, d0=1)  Boolean 0
//   DATA1  = (d1=1, d0=0)  Boolean 1
//   SPACER = (d1=0, d0=0)  no value yet (the "empty" state between words)
//   (1,1) is forbidden.
// A bus alternates between all-DATA and all-SPACER. The helpers below encode
// and decode single bits; the modules loop over their buses with them.
package dr_pkg;
  timeunit 1ps; timeprecision 1ps;

  typedef struct packed {
    logic d1;  // true rail
    logic d0;  // false rail
  } dr_bit_t;

  localparam dr_bit_t DR_SPACER = '{d1: 1'b0, d0: 1'b0};

  // Encode a Boolean as DATA0 / DATA1.
  function automatic dr_bit_t dr_encode(input logic v);
    return '{d1: v, d0: ~v};
  endfunction

  // A bit holds a value (DATA0 or DATA1).
  function automatic logic dr_is_data(input dr_bit_t b);
    return b.d1 ^ b.d0;
  endfunction

  // Both rails high: never allowed on a legal bus.
  function automatic logic dr_is_illegal(input dr_bit_t b);
    return b.d1 & b.d0;
  endfunction
endpackage
