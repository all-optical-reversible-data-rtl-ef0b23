// glg_data_distributor -- top level: a reversible N:2^N data distributor and
// an all-optical 2:4 data distributor side by side.
//
// u_dist is the N:2^N decoder (GLG gate plus Fredkin columns; N = 3 is the
// 3:8 decoder of one GLG and four Fredkin gates). Its polarity input s picks
// one-hot (s = 0) or one-cold (s = 1) outputs, and it emits N - 2 garbage
// bits, the select bits leaving each Fredkin column.
// u_opt is the 2:4 decoder whose GLG gate is realised with MZI switches and
// beam combiners, as for an all-optical implementation.
// The two share no signals.
//
// Interface: sel[N-1:0], s -> z[2^N-1:0], garbage[N-3:0];
//            opt_a, opt_b -> opt_y[3:0] (opt_y[{opt_a,opt_b}] = 1).
// Timing: combinational throughout.
//
// N defaults to 3, the size of the published example; N must be at least 3
// here so that the garbage port has its natural width.
module glg_data_distributor #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]      sel,
  input  logic              s,
  output logic [(1<<N)-1:0] z,
  output logic [N-3:0]      garbage,
  input  logic              opt_a,
  input  logic              opt_b,
  output logic [3:0]        opt_y
);

  glg_decoder_n #(.N(N)) u_dist (
    .sel     (sel),
    .s       (s),
    .z       (z),
    .garbage (garbage)
  );

  glg_decoder_2to4 #(.OPTICAL(1'b1)) u_opt (
    .a (opt_a),
    .b (opt_b),
    .y (opt_y)
  );

endmodule
