// tb_data_latch: the latch takes `d` only at edges with `load` and holds it
// otherwise; random stimulus against a reference register.
module tb_data_latch;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic d = 1'b0;
  logic q;
  logic exp_q;
  int checks = 0, failures = 0;

  data_latch dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (q !== 1'b0) failures++;
    exp_q = 1'b0;
    for (int i = 0; i < 500; i++) begin
      load = ($urandom_range(0, 3) == 0);
      d    = 1'($urandom);
      @(posedge clk);
      if (load) exp_q = d;
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d q=%b want %b", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
