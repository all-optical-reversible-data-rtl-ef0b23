// tb_glg_decoder_n -- checks the N:2^N decoder for N = 2..6 over every select
// value and both polarities: the selected output must be the only one at the
// active level, and garbage bit j must carry the select bit of Fredkin
// column j.
module tb_glg_decoder_n;
  logic [5:0]  sel;
  logic        s;
  logic [3:0]  z2;
  logic [7:0]  z3;
  logic [15:0] z4;
  logic [31:0] z5;
  logic [63:0] z6;
  logic [0:0]  g2, g3;
  logic [1:0]  g4;
  logic [2:0]  g5;
  logic [3:0]  g6;
  int checks = 0, failures = 0;

  glg_decoder_n #(.N(2)) dut2 (.sel(sel[1:0]), .s, .z(z2), .garbage(g2));
  glg_decoder_n          dut3 (.sel(sel[2:0]), .s, .z(z3), .garbage(g3));
  glg_decoder_n #(.N(4)) dut4 (.sel(sel[3:0]), .s, .z(z4), .garbage(g4));
  glg_decoder_n #(.N(5)) dut5 (.sel(sel[4:0]), .s, .z(z5), .garbage(g5));
  glg_decoder_n #(.N(6)) dut6 (.sel(sel[5:0]), .s, .z(z6), .garbage(g6));

  // Expected 2^n outputs: bit sel is at the active level, the rest are not.
  function automatic logic [63:0] expect_z(int n, logic [5:0] sv, logic pol);
    logic [63:0] zz = '0;
    for (int i = 0; i < (1 << n); i++) zz[i] = (i == int'(sv) % (1 << n)) ^ pol;
    return zz;
  endfunction

  // Expected garbage: column j (j = 0 is the 3:8 decoder's column) is
  // selected by sel[n-3-j].
  function automatic logic [3:0] expect_g(int n, logic [5:0] sv);
    logic [3:0] gg = '0;
    for (int j = 0; j < n - 2; j++) gg[j] = sv[n-3-j];
    return gg;
  endfunction

  task automatic check(string name, logic [63:0] got, logic [63:0] exp,
                       logic [3:0] gg, logic [3:0] gexp);
    checks++;
    if (got !== exp || gg !== gexp) begin
      failures++;
      $display("FAIL %s sel=%b s=%b z=%h exp=%h g=%b exp=%b", name, sel, s, got, exp, gg, gexp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {s, sel} = 7'(v);
      #1;
      if (!s) check("N=2", 64'(z2), expect_z(2, sel & 6'h03, 1'b0), 4'(g2), 4'b0);
      check("N=3", 64'(z3), expect_z(3, sel & 6'h07, s), 4'(g3), expect_g(3, sel));
      check("N=4", 64'(z4), expect_z(4, sel & 6'h0f, s), 4'(g4), expect_g(4, sel));
      check("N=5", 64'(z5), expect_z(5, sel & 6'h1f, s), 4'(g5), expect_g(5, sel));
      check("N=6", z6,      expect_z(6, sel,         s), g6,     expect_g(6, sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
