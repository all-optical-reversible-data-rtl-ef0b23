// tb_mzi_switch -- exhaustive check of the MZI switch truth table.
// Expected values come from the switch's operating description: light at the
// bar port only when both the incoming and the control light are present,
// light at the cross port only when the incoming light is present and the
// control is dark.
module tb_mzi_switch;
  logic in_sig, ctrl, bar_port, cross_port;
  int checks = 0, failures = 0;

  mzi_switch dut (.in_sig, .ctrl, .bar_port, .cross_port);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // rows: {in, ctrl, bar, cross}
    automatic logic [3:0] rows [4] = '{4'b00_00, 4'b01_00, 4'b10_01, 4'b11_10};
    foreach (rows[i]) begin
      {in_sig, ctrl} = rows[i][3:2];
      #1;
      checks++;
      if ({bar_port, cross_port} !== rows[i][1:0]) begin
        failures++;
        $display("FAIL in=%b ctrl=%b bar=%b cross=%b", in_sig, ctrl, bar_port, cross_port);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
