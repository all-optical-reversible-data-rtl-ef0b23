// glg_decoder_2to4 -- 2:4 reversible decoder (data distributor) from a
// single GLG gate.
//
// The select bits drive the gate's A and B inputs and its C and D inputs are
// held at 0, so the four outputs are the four minterms of (A, B):
//   y[0] = A'B', y[1] = A'B, y[2] = AB', y[3] = AB
// One gate, two constant inputs and no garbage output.
//
// OPTICAL selects the realisation of the gate: 0 uses the Boolean GLG
// (glg_gate), 1 the all-optical MZI network (glg_mzi). Both give the same
// truth table.
//
// Interface: a (MSB), b -> y[3:0], y[{a,b}] = 1. Combinational.
// The structure is the published 2:4 decoder; the OPTICAL switch and the
// output vector ordering are this design's choices.
module glg_decoder_2to4 #(
  parameter bit OPTICAL = 1'b0
) (
  input  logic       a,
  input  logic       b,
  output logic [3:0] y
);

  if (OPTICAL) begin : g_optical
    glg_mzi u_glg (
      .a(a), .b(b), .c(1'b0), .d(1'b0),
      .p(y[0]), .q(y[1]), .r(y[2]), .s(y[3])
    );
  end else begin : g_logic
    glg_gate u_glg (
      .a(a), .b(b), .c(1'b0), .d(1'b0),
      .p(y[0]), .q(y[1]), .r(y[2]), .s(y[3])
    );
  end

endmodule
