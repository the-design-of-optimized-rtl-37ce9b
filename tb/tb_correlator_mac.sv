// tb_correlator_mac: random samples, chips and period starts into two MACs
// (8-bit samples with a 12-bit register, 4-bit samples with a 6-bit register)
// against an integer reference with saturation: the running sum, the
// accumulator register and the per-period saturation flag.
module tb_correlator_mac;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0, first = 1'b0, pn = 1'b0;
  logic signed [7:0]  sample_a = '0;
  logic signed [3:0]  sample_b = '0;
  logic signed [11:0] acc_a, sum_a;
  logic signed [5:0]  acc_b, sum_b;
  logic sat_a, sat_b;
  int checks = 0, failures = 0;
  int sat_seen_a = 0, sat_seen_b = 0;

  correlator_mac #(.IN_W(8), .ACC_W(12)) dut_a (
    .clk, .rst_n, .valid, .first, .pn, .sample(sample_a), .acc(acc_a), .sum(sum_a), .sum_sat(sat_a));
  correlator_mac #(.IN_W(4), .ACC_W(6)) dut_b (
    .clk, .rst_n, .valid, .first, .pn, .sample(sample_b), .acc(acc_b), .sum(sum_b), .sum_sat(sat_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int clamp(input int v, input int w, output bit s);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    s = (v > hi) || (v < lo);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  initial begin
    int ra, rb, na, nb, cnt, plen;
    bit sa, sb, fa, fb, s1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ra = 0; rb = 0; fa = 0; fb = 0; cnt = 0; plen = 32;
    for (int i = 0; i < 40000; i++) begin
      valid = ($urandom_range(0, 7) != 0);
      first = (cnt == 0);
      pn    = 1'($urandom);
      // Biased samples so that long periods reach saturation.
      sample_a = 8'($urandom_range(0, 255));
      if (i % 3000 < 1500) sample_a = pn ? -8'sd120 : 8'sd120;
      sample_b = 4'($urandom_range(0, 15));
      if (i % 3000 < 1500) sample_b = pn ? -4'sd7 : 4'sd7;
      #1;
      na = clamp((first ? 0 : ra) + (pn ? -int'(sample_a) : int'(sample_a)), 12, s1);
      sa = s1 || (!first && fa);
      nb = clamp((first ? 0 : rb) + (pn ? -int'(sample_b) : int'(sample_b)), 6, s1);
      sb = s1 || (!first && fb);
      check(int'(sum_a) == na, $sformatf("a: sum %0d want %0d", sum_a, na));
      check(int'(sum_b) == nb, $sformatf("b: sum %0d want %0d", sum_b, nb));
      check(sat_a == sa && sat_b == sb, "saturation flags");
      check(int'(acc_a) == ra && int'(acc_b) == rb, "accumulator registers");
      if (valid) begin
        ra = na; rb = nb; fa = sa; fb = sb;
        if (sa && !first) sat_seen_a++;
        if (sb && !first) sat_seen_b++;
        cnt = (cnt == plen - 1) ? 0 : cnt + 1;
        if (cnt == 0) plen = 32 << $urandom_range(0, 3);
      end
      @(negedge clk);
    end
    check(sat_seen_a > 0 && sat_seen_b > 0, "saturation exercised");
    $display("saturating samples: %0d / %0d", sat_seen_a, sat_seen_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
