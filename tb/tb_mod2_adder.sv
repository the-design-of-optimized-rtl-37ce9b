// tb_mod2_adder: exhaustive check of the spreading gate against the bipolar
// product: coded chip -1 exactly when data and code differ in sign.
module tb_mod2_adder;
  logic data, pn, coded;
  int checks = 0, failures = 0;

  mod2_adder dut (.data, .pn, .coded);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bd, bp, prod;
    for (int i = 0; i < 4; i++) begin
      data = i[1]; pn = i[0];
      #1;
      bd = data ? -1 : 1;
      bp = pn ? -1 : 1;
      prod = bd * bp;
      checks++;
      if (coded !== (prod < 0)) begin
        failures++;
        $display("FAIL data=%b pn=%b coded=%b", data, pn, coded);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
