// tb_beam_combiner -- exhaustive check of the three-input beam combiner:
// the output carries light whenever at least one input does.
module tb_beam_combiner;
  logic [2:0] beams;
  logic       out;
  int checks = 0, failures = 0;

  beam_combiner #(.N(3)) dut (.beams, .out);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int lit;
      beams = 3'(v);
      lit = 0;
      for (int i = 0; i < 3; i++) if (v[i]) lit++;
      #1;
      checks++;
      if (out !== (lit > 0)) begin
        failures++;
        $display("FAIL beams=%b out=%b", beams, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
