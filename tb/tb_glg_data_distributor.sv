// tb_glg_data_distributor -- end-to-end test of the top level at its default
// size (3:8 distributor plus the all-optical 2:4 distributor).
// For every select value in both polarities it checks the distributor
// outputs and garbage bit, and for every optical select value the optical
// outputs; the two halves are driven at the same time with unrelated values
// to show they do not interact. It counts how often each output line was
// selected in each polarity and each optical output was lit, and counts a
// failure for any line never exercised.
module tb_glg_data_distributor;
  logic [2:0] sel;
  logic       s;
  logic [7:0] z;
  logic [0:0] garbage;
  logic       opt_a, opt_b;
  logic [3:0] opt_y;
  int checks = 0, failures = 0;
  int hits_high [8];
  int hits_low  [8];
  int hits_opt  [4];

  glg_data_distributor dut (.sel, .s, .z, .garbage, .opt_a, .opt_b, .opt_y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits_high[i]) begin hits_high[i] = 0; hits_low[i] = 0; end
    foreach (hits_opt[i]) hits_opt[i] = 0;

    // Exhaustive sweep, then a pseudo-random sequence of operations.
    for (int v = 0; v < 16 * 4 + 200; v++) begin
      int sv, ov;
      if (v < 64) begin
        sv = v % 16;
        ov = v / 16;
      end else begin
        sv = int'($urandom_range(15));
        ov = int'($urandom_range(3));
      end
      {s, sel} = 4'(sv);
      {opt_a, opt_b} = 2'(ov);
      #1;

      checks++;
      if (z !== (s ? ~(8'b1 << sel) : (8'b1 << sel))) begin
        failures++;
        $display("FAIL s=%b sel=%0d z=%b", s, sel, z);
      end
      checks++;
      if (garbage[0] !== sel[0]) begin
        failures++;
        $display("FAIL garbage=%b sel=%b", garbage, sel);
      end
      checks++;
      if (opt_y !== (4'b1 << {opt_a, opt_b})) begin
        failures++;
        $display("FAIL optical AB=%b%b y=%b", opt_a, opt_b, opt_y);
      end

      for (int i = 0; i < 8; i++) begin
        if (!s && z[i])  hits_high[i]++;
        if (s  && !z[i]) hits_low[i]++;
      end
      for (int i = 0; i < 4; i++) if (opt_y[i]) hits_opt[i]++;
    end

    for (int i = 0; i < 8; i++) begin
      checks++;
      if (hits_high[i] == 0 || hits_low[i] == 0) begin
        failures++;
        $display("FAIL line %0d never selected (active-high %0d, active-low %0d)",
                 i, hits_high[i], hits_low[i]);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (hits_opt[i] == 0) begin
        failures++;
        $display("FAIL optical output %0d never lit", i);
      end
    end
    $display("selections active-high: %p", hits_high);
    $display("selections active-low:  %p", hits_low);
    $display("optical outputs lit:    %p", hits_opt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
