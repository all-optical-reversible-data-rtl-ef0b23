// fredkin_gate -- 3x3 reversible Fredkin (controlled swap) gate.
//
// The control A passes straight through to P. When A = 0, B and C pass to Q
// and R unchanged; when A = 1 they are swapped:
//   P = A,  Q = A'B ^ AC,  R = A'C ^ AB
// With C tied to 0 the gate routes B to Q when A = 0 and to R when A = 1,
// which is how the decoder uses it to split one decoded line into two.
//
// Interface: a, b, c -> p, q, r. Combinational.
// The equations are the standard Fredkin gate definition.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
