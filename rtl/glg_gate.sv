// glg_gate -- the 4x4 reversible Garbage Less Gate (GLG).
//
// Inputs A, B, C, D map one-to-one onto outputs P, Q, R, S:
//   P = A'B' ^ D,  Q = A'B ^ D,  R = AB' ^ D,  S = AB ^ C
// The four products A'B', A'B, AB', AB are the minterms of (A, B), so with
// C = D = 0 the gate is a complete 2:4 decoder with no garbage output, and
// with C = D = 1 it is an active-low 2:4 decoder. Because the mapping is a
// bijection on 4 bits, the inputs can always be recovered from the outputs.
//
// Interface: a, b, c, d -> p, q, r, s. Combinational.
// The equations are those of the published gate definition.
module glg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = (~a & ~b) ^ d;
    q = (~a &  b) ^ d;
    r = ( a & ~b) ^ d;
    s = ( a &  b) ^ c;
  end

endmodule
