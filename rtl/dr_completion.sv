// Completion detector for a W-bit dual-rail bus.
//
// Each bit's two rails are ORed ("this bit holds a value"); the W results are
// combined by a balanced binary tree of 2-input C-elements. The output goes
// high only when every bit is DATA and low only when every bit is SPACER; while
// a bus is half way between the two it holds its last value. This hysteresis
// is what makes the acknowledge of a dual-rail register safe.
// The OR gates feeding C-elements follow the register drawing of the
// architecture; the tree shape for more than two bits is this design's choice.
// Timing: zero delay.
// Lint reports the C-element feedback and, inside a pipeline, the handshake
// loop through this block as circular logic; that loop is the asynchronous
// circuit itself.
module dr_completion
  import dr_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic             rst,
  input  dr_bit_t [W-1:0]  bus,
  output logic             done
);
  timeunit 1ps; timeprecision 1ps;

  // Heap-ordered tree: nodes 0..W-2 are C-elements, W-1..2W-2 are the leaves.
  logic [2*W-2:0] node;

  for (genvar i = 0; i < W; i++) begin : g_leaf
    assign node[W-1+i] = bus[i].d1 | bus[i].d0;
  end

  for (genvar j = 0; j + 1 < W; j++) begin : g_node
    c_element #(.N(2)) u_c (
      .rst (rst),
      .in  ({node[2*j+1], node[2*j+2]}),
      .q   (node[j])
    );
  end

  assign done = node[0];
endmodule
