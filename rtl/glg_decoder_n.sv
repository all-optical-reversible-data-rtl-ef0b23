// glg_decoder_n -- N:2^N reversible decoder built from the GLG gate and
// Fredkin gates.
//
// The two most significant select bits are decoded by the GLG gate and the
// third by a column of four Fredkin gates (the 3:8 decoder). Each further
// select bit, from MSB to LSB, adds one Fredkin column twice as wide as the
// one before, which splits every line in two (fredkin_split_stage). A column
// of width W costs W gates and one garbage output, so the whole decoder has
// 1 + 4 + 8 + ... + 2^(N-1) = 2^N - 3 gates and N - 2 garbage outputs.
//
// s sets the polarity as in glg_decoder_3to8: 0 gives one-hot outputs, 1
// one-cold outputs. For N = 2 the plain 2:4 decoder is used (active-high
// only, s unused, garbage tied to 0).
//
// Interface: sel[N-1:0] (sel[N-1] is A), s -> z[2^N-1:0], garbage.
// z[sel] is the selected line. Combinational.
//
// The N:2^N extension is stated in the published work without a circuit; the
// stage-by-stage construction here repeats the step of its 3:8 decoder.
module glg_decoder_n #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]                 sel,
  input  logic                         s,
  output logic [(1<<N)-1:0]            z,
  output logic [((N>2) ? N-2 : 1)-1:0] garbage
);

  if (N < 2) begin : g_bad_n
    $error("glg_decoder_n: N must be at least 2");
  end else if (N == 2) begin : g_n2
    glg_decoder_2to4 #(.OPTICAL(1'b0)) u_dec (
      .a(sel[1]), .b(sel[0]), .y(z)
    );
    assign garbage = 1'b0;
  end else begin : g_nbig
    // lines[j] holds 2^(j+3) decoded lines after stage j.
    logic [(1<<N)-1:0] lines [N-2];

    glg_decoder_3to8 u_dec3 (
      .a(sel[N-1]), .b(sel[N-2]), .e(sel[N-3]), .s(s),
      .z(lines[0][7:0]), .garbage(garbage[0])
    );
    if (N > 3) begin : g_unused_top
      assign lines[0][(1<<N)-1:8] = '0;
    end

    for (genvar j = 1; j < N - 2; j++) begin : g_stage
      localparam int unsigned W = 1 << (j + 2);
      fredkin_split_stage #(.WIDTH(W)) u_stage (
        .e       (sel[N-3-j]),
        .k       (s),
        .x       (lines[j-1][W-1:0]),
        .y       (lines[j][2*W-1:0]),
        .garbage (garbage[j])
      );
      if (2 * W < (1 << N)) begin : g_pad
        assign lines[j][(1<<N)-1:2*W] = '0;
      end
    end

    assign z = lines[N-3];
  end

endmodule
