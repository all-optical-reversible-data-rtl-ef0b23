// tb_glg_decoder_3to8 -- checks the 3:8 decoder against its two truth
// tables: constant inputs at 0 (one-hot outputs Z7..Z0) and at 1 (one-cold
// outputs), and checks that the garbage output carries the select bit E.
module tb_glg_decoder_3to8;
  logic       a, b, e, s;
  logic [7:0] z;
  logic       garbage;
  int checks = 0, failures = 0;

  glg_decoder_3to8 dut (.a, .b, .e, .s, .z, .garbage);

  // Z7..Z0 for ABE = 000..111
  localparam logic [7:0] TT_S0 [8] = '{
    8'b0000_0001, 8'b0000_0010, 8'b0000_0100, 8'b0000_1000,
    8'b0001_0000, 8'b0010_0000, 8'b0100_0000, 8'b1000_0000
  };
  localparam logic [7:0] TT_S1 [8] = '{
    8'b1111_1110, 8'b1111_1101, 8'b1111_1011, 8'b1111_0111,
    8'b1110_1111, 8'b1101_1111, 8'b1011_1111, 8'b0111_1111
  };

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [7:0] exp;
      {s, a, b, e} = 4'(v);
      exp = s ? TT_S1[v[2:0]] : TT_S0[v[2:0]];
      #1;
      checks++;
      if (z !== exp) begin
        failures++;
        $display("FAIL s=%b ABE=%b z=%b expected %b", s, {a, b, e}, z, exp);
      end
      checks++;
      if (garbage !== e) begin
        failures++;
        $display("FAIL garbage=%b e=%b", garbage, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
