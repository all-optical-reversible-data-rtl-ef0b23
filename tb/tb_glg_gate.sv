// tb_glg_gate -- exhaustive check of the GLG gate against its 16-row truth table
// (inputs ABCD counting 0000..1111, outputs PQRS), plus a check that no two
// input rows give the same output, i.e. that the gate is reversible.
module tb_glg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  glg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  // PQRS for ABCD = 0..15
  localparam logic [3:0] TT [16] = '{
    4'b1000, 4'b0110, 4'b1001, 4'b0111,
    4'b0100, 4'b1010, 4'b0101, 4'b1011,
    4'b0010, 4'b1100, 4'b0011, 4'b1101,
    4'b0001, 4'b1111, 4'b0000, 4'b1110
  };

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== TT[v]) begin
        failures++;
        $display("FAIL ABCD=%b PQRS=%b expected %b", {a, b, c, d}, {p, q, r, s}, TT[v]);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b repeated: mapping not one-to-one", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
