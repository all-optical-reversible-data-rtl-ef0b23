// fredkin_split_stage -- one column of Fredkin gates that doubles the number
// of decoded lines.
//
// Every gate i takes the stage's select bit on its control input, decoded
// line x[i] on its second input and the constant k on its third. With k = 0
// the gate sends x[i] to y[2i] when e = 0 and to y[2i+1] when e = 1, the
// other output staying 0. With k = 1 and active-low lines (x[i] = 0 when
// selected) the same gates give active-low outputs: y[2i] = e, y[2i+1] = e'
// for the selected line and 1 for the rest. The select bit leaves each gate
// on its pass-through output and enters the next gate's control input; the
// copy leaving the last gate is the stage's single garbage output.
//
// Interface: e, k, x[WIDTH-1:0] -> y[2*WIDTH-1:0], garbage.
// Timing: combinational; the select ripples through WIDTH gates.
//
// The column of four gates with a chained select, a constant third input and
// one garbage output follows the published 3:8 decoder; making the width a
// parameter is this design's generalisation.
module fredkin_split_stage #(
  parameter int unsigned WIDTH = 4
) (
  input  logic               e,
  input  logic               k,
  input  logic [WIDTH-1:0]   x,
  output logic [2*WIDTH-1:0] y,
  output logic               garbage
);

  logic [WIDTH:0] sel_chain;  // select entering gate i is sel_chain[i]

  assign sel_chain[0] = e;

  for (genvar i = 0; i < WIDTH; i++) begin : g_gate
    fredkin_gate u_fredkin (
      .a (sel_chain[i]),
      .b (x[i]),
      .c (k),
      .p (sel_chain[i+1]),
      .q (y[2*i]),
      .r (y[2*i+1])
    );
  end

  assign garbage = sel_chain[WIDTH];

endmodule
