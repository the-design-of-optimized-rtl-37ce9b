// tb_clock_divider: checks the chip counter for every code length and for no
// coding: `last` comes exactly every L ticks, `first` at count 0, ticks
// without `tick` hold the count, and `run` low clears it.
module tb_clock_divider;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic       run = 1'b0;
  logic       tick = 1'b0;
  logic [7:0] count;
  logic       first, last;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .rst_n, .sel, .run, .tick, .count, .first, .last);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sel=%b: %s", sel, what);
    end
  endtask

  initial begin
    int len, exp_cnt, lasts;
    logic [3:0] sels[5] = '{4'b0000, 4'b0001, 4'b0110, 4'b1011, 4'b1101};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (sels[k]) begin
      sel = sels[k];
      len = (sel[1:0] == 0) ? 1 : 32 << sel[3:2];
      run = 1'b0;
      @(negedge clk);
      check(count == 0, "cleared while run low");
      run = 1'b1;
      exp_cnt = 0; lasts = 0;
      for (int i = 0; i < 3 * len + 10; i++) begin
        tick = ($urandom_range(0, 3) != 0);
        #1;
        check(count == 8'(exp_cnt), $sformatf("count %0d want %0d", count, exp_cnt));
        check(first == (exp_cnt == 0), "first");
        check(last == (tick && exp_cnt == len - 1), "last");
        if (last) lasts++;
        if (tick) exp_cnt = (exp_cnt == len - 1) ? 0 : exp_cnt + 1;
        @(negedge clk);
      end
      check(lasts >= 2, "several bit periods seen");
      tick = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
