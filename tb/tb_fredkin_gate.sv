// tb_fredkin_gate -- exhaustive check of the Fredkin gate as a controlled
// swap: P follows A; B and C pass straight when A = 0 and are exchanged when
// A = 1.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      {a, b, c} = 3'(v);
      exp = a ? {a, c, b} : {a, b, c};
      #1;
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL ABC=%b PQR=%b expected %b", {a, b, c}, {p, q, r}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
