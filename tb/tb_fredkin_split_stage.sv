// tb_fredkin_split_stage -- checks a column of four Fredkin gates (and one of
// two) for every input line pattern, select value and constant value.
// Expected: line i goes to output 2i when e = 0 and to 2i+1 when e = 1, the
// other output of the pair carrying the constant k; the garbage output
// repeats e.
module tb_fredkin_split_stage;
  logic       e, k;
  logic [3:0] x4;
  logic [7:0] y4;
  logic       g4;
  logic [1:0] x2;
  logic [3:0] y2;
  logic       g2;
  int checks = 0, failures = 0;

  fredkin_split_stage dut4 (.e, .k, .x(x4), .y(y4), .garbage(g4));
  fredkin_split_stage #(.WIDTH(2)) dut2 (.e, .k, .x(x2), .y(y2), .garbage(g2));

  function automatic logic [7:0] expect_y(logic [3:0] x, logic e, logic k, int w);
    logic [7:0] y = '0;
    for (int i = 0; i < w; i++) begin
      y[2*i]   = e ? k    : x[i];
      y[2*i+1] = e ? x[i] : k;
    end
    return y;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {k, e, x4} = 6'(v);
      x2 = x4[1:0];
      #1;
      checks++;
      if (y4 !== expect_y(x4, e, k, 4) || g4 !== e) begin
        failures++;
        $display("FAIL W=4 e=%b k=%b x=%b y=%b g=%b", e, k, x4, y4, g4);
      end
      checks++;
      if (y2 !== expect_y({2'b00, x2}, e, k, 2) || g2 !== e) begin
        failures++;
        $display("FAIL W=2 e=%b k=%b x=%b y=%b g=%b", e, k, x2, y2, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
