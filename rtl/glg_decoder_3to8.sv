// glg_decoder_3to8 -- 3:8 reversible decoder from one GLG gate and four
// Fredkin gates.
//
// Stage 1: the GLG gate decodes (A, B) into four lines P, Q, R, S.
// Stage 2: a column of four Fredkin gates splits each line by the third
// select bit E: line x becomes z[2i] = x.E' and z[2i+1] = x.E. E is passed
// from gate to gate and leaves the last one as the single garbage output.
//
// Polarity. Every constant input of the circuit (GLG C and D, the third input
// of each Fredkin gate) is driven by s. With s = 0 the outputs are one-hot,
// z[{a,b,e}] = 1. With s = 1 the GLG produces the complemented minterms and
// the Fredkin gates, fed a constant 1, keep the complement: the outputs are
// one-cold, z[{a,b,e}] = 0 and all others 1.
//
// Interface: a (MSB), b, e (LSB), s -> z[7:0], garbage (= e).
// Timing: combinational; GLG followed by the select ripple through four
// Fredkin gates.
//
// Gate count, connections and both truth tables follow the published 3:8
// decoder. Driving the GLG's C and D from s as well as the Fredkin constants
// is this design's reading, the one under which the s = 1 table holds.
module glg_decoder_3to8 (
  input  logic       a,
  input  logic       b,
  input  logic       e,
  input  logic       s,
  output logic [7:0] z,
  output logic       garbage
);

  logic [3:0] line;  // {S, R, Q, P} of the GLG gate

  glg_gate u_glg (
    .a(a), .b(b), .c(s), .d(s),
    .p(line[0]), .q(line[1]), .r(line[2]), .s(line[3])
  );

  fredkin_split_stage #(.WIDTH(4)) u_stage (
    .e       (e),
    .k       (s),
    .x       (line),
    .y       (z),
    .garbage (garbage)
  );

endmodule
