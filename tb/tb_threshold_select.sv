// tb_threshold_select: the four thresholds for S5S4 with default values at
// two register widths, and with overridden values.
module tb_threshold_select;
  logic [1:0] sel;
  logic signed [11:0] t12;
  logic signed [7:0]  t8;
  logic signed [11:0] tc;
  int checks = 0, failures = 0;

  threshold_select #(.ACC_W(12)) dut12 (.sel, .threshold(t12));
  threshold_select #(.ACC_W(8))  dut8  (.sel, .threshold(t8));
  threshold_select #(.ACC_W(12), .THR0(-5), .THR1(100), .THR2(-300), .THR3(7)) dutc (.sel, .threshold(tc));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e12[4] = '{0, 256, -256, 512};
    int e8[4]  = '{0, 16, -16, 32};
    int ec[4]  = '{-5, 100, -300, 7};
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      #1;
      checks += 3;
      if (int'(t12) != e12[s]) begin failures++; $display("FAIL 12-bit sel %0d: %0d", s, t12); end
      if (int'(t8)  != e8[s])  begin failures++; $display("FAIL 8-bit sel %0d: %0d", s, t8); end
      if (int'(tc)  != ec[s])  begin failures++; $display("FAIL custom sel %0d: %0d", s, tc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
