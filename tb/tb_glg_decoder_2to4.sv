// tb_glg_decoder_2to4 -- checks the 2:4 decoder in both realisations (Boolean
// GLG and MZI network): for each (a, b) exactly output {a,b} is lit.
module tb_glg_decoder_2to4;
  logic       a, b;
  logic [3:0] y_logic, y_opt;
  int checks = 0, failures = 0;

  glg_decoder_2to4                     dut_logic (.a, .b, .y(y_logic));
  glg_decoder_2to4 #(.OPTICAL(1'b1))   dut_opt   (.a, .b, .y(y_opt));

  // expected outputs y[3:0] for AB = 00, 01, 10, 11
  localparam logic [3:0] TT [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y_logic !== TT[v]) begin
        failures++;
        $display("FAIL logic AB=%b y=%b", {a, b}, y_logic);
      end
      checks++;
      if (y_opt !== TT[v]) begin
        failures++;
        $display("FAIL optical AB=%b y=%b", {a, b}, y_opt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
