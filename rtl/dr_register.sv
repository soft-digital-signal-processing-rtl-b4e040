// Dual-rail handshake register (register 1 and register 2 of the architecture).
//
// Every rail of every bit is a 2-input C-element of the incoming rail and the
// request from the next stage. With req high a DATA word passes; with req low
// a SPACER passes; anything else is held. A completion detector (ORs and a
// C-element tree) watches the outputs, and the acknowledge to the previous
// stage is its inverse: ack falls when every output bit is DATA (ask for
// SPACER) and rises when every bit is SPACER (ask for the next DATA).
// This structure and the ack polarity follow the document; reset (all SPACER,
// ack high) is this design's addition.
// GUARD = 1 (this design's addition, used for register 1): each rail's
// C-element also takes the register's own acknowledge and an OR of all input
// rails. A new DATA word can then only enter once the outputs are back to
// SPACER, and the outputs return to SPACER only when the whole input word is
// SPACER. Register 1 needs this because its source runs at a fixed rate and
// does not wait: without it a word arriving while the previous one is still
// held with req high would set both rails of the bits that changed, and one
// arriving while req is low would clear only those bits, starting part of the
// SPACER wave early.
// Interface: req/ack four-phase return-to-spacer handshake; zero delay.
// Lint reports the C-element feedback and, inside a pipeline, the handshake
// loop through this block as circular logic; that loop is the asynchronous
// circuit itself.
module dr_register
  import dr_pkg::*;
#(
  parameter int unsigned W     = 2,
  parameter bit          GUARD = 1'b0
) (
  input  logic             rst,
  input  logic             req,
  input  dr_bit_t [W-1:0]  d_in,
  output dr_bit_t [W-1:0]  d_out,
  output logic             ack
);
  timeunit 1ps; timeprecision 1ps;

  logic done;

  if (GUARD) begin : g_guard
    logic in_any;  // some input rail is high
    assign in_any = |d_in;
    for (genvar i = 0; i < W; i++) begin : g_bit
      c_element #(.N(4)) u_c1 (.rst(rst), .in({d_in[i].d1, req, ack, in_any}), .q(d_out[i].d1));
      c_element #(.N(4)) u_c0 (.rst(rst), .in({d_in[i].d0, req, ack, in_any}), .q(d_out[i].d0));
    end
  end else begin : g_plain
    for (genvar i = 0; i < W; i++) begin : g_bit
      c_element #(.N(2)) u_c1 (.rst(rst), .in({d_in[i].d1, req}), .q(d_out[i].d1));
      c_element #(.N(2)) u_c0 (.rst(rst), .in({d_in[i].d0, req}), .q(d_out[i].d0));
    end
  end

  dr_completion #(.W(W)) u_done (.rst(rst), .bus(d_out), .done(done));

  assign ack = ~done;
endmodule
