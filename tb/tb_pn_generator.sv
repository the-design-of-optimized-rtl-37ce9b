// tb_pn_generator: checks the programmable PN generator against the tap-list
// reference for all sixteen code select words: the chips of one bit after a
// load, maximal period 2^n - 1 and balance of the free-running sequence,
// load priority over step, hold without step, and a constant 0 without coding.
module tb_pn_generator;
  import tb_dsss_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic       load = 1'b0;
  logic       step = 1'b0;
  logic       pn;
  int checks = 0, failures = 0;

  pn_generator dut (.clk, .rst_n, .sel, .load, .step, .pn);

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
    bit ref_c[$];
    bit got[$];
    int n, p, ones;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 16; s++) begin
      n = ref_degree(4'(s));
      p = (n == 0) ? 1 : (1 << n) - 1;
      @(negedge clk);
      sel = 4'(s); load = 1'b1; step = 1'b0;
      @(negedge clk);
      load = 1'b0; step = 1'b1;
      ref_seq(sel, 2 * p + 2, ref_c);
      got = {};
      for (int i = 0; i < 2 * p + 2; i++) begin
        got.push_back(pn);
        @(negedge clk);
      end
      for (int i = 0; i < 2 * p + 2; i++)
        check(got[i] == ref_c[i], $sformatf("chip %0d got %0b want %0b", i, got[i], ref_c[i]));
      if (n != 0) begin
        ones = 0;
        for (int i = 0; i < p; i++) ones += int'(got[i]);
        check(ones == (1 << (n - 1)), $sformatf("balance %0d ones in period %0d", ones, p));
        for (int i = 0; i < p; i++)
          check(got[i] == got[i + p], "period is 2^n-1");
        // Hold: no step keeps the chip.
        step = 1'b0;
        begin
          logic h;
          h = pn;
          repeat (3) @(negedge clk);
          check(pn == h, "hold without step");
        end
        // Load wins over step: back at chip 0 (seed, output 1).
        load = 1'b1; step = 1'b1;
        @(negedge clk);
        load = 1'b0; step = 1'b0;
        check(pn == 1'b1, "load restarts at the seed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
