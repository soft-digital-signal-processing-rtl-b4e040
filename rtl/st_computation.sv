// Self-timed computation block: N-bit dual-rail ripple-carry adder.
//
// A chain of N delay-insensitive full adders computes s = a + b + ci, with the
// final carry as s[N]. The carry ripples through the chain, so a DATA wave and
// the SPACER wave behind it each take N adder delays (N * FA_DELAY ps) to
// reach the last sum bit. A chain of 8 full adders is the example circuit the
// document analyses; using it as the computation of the whole architecture,
// and carrying ci on the bus, are this design's choices.
// Interface: dual-rail in, dual-rail out, no handshake of its own (the
// registers on either side supply it).
module st_computation
  import dr_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned FA_DELAY = 0
) (
  input  logic             rst,
  input  dr_bit_t [N-1:0]  a,
  input  dr_bit_t [N-1:0]  b,
  input  dr_bit_t          ci,
  output dr_bit_t [N:0]    s
);
  timeunit 1ps; timeprecision 1ps;

  dr_bit_t [N:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < N; i++) begin : g_fa
    dr_full_adder #(.DELAY(FA_DELAY)) u_fa (
      .rst (rst),
      .a   (a[i]),
      .b   (b[i]),
      .ci  (c[i]),
      .s   (s[i]),
      .co  (c[i+1])
    );
  end

  assign s[N] = c[N];
endmodule
