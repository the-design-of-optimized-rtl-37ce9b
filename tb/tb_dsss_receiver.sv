// tb_dsss_receiver: feeds the receiver digitized chip streams built from the
// reference codes (bipolar chips of amplitude A plus uniform noise, random
// gaps between samples) and checks, per bit: the correlation sum against an
// integer model of the saturating accumulator, the decision against the
// selected threshold, the recovered bit against the sent bit where the signal
// is clean, the saturation flag, and that data_valid comes one cycle after
// the last sample of the bit.
module tb_dsss_receiver;
  import tb_dsss_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int ACC_W = 12;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic [3:0]              sel = '0;
  logic [1:0]              thr_sel = '0;
  logic                    en = 1'b0;
  logic                    valid = 1'b0;
  logic signed [IN_W-1:0]  sample = '0;
  logic                    data_out, data_valid, saturated;
  logic signed [ACC_W-1:0] corr;
  int checks = 0, failures = 0;
  int sat_bits = 0, thr_used[4] = '{0, 0, 0, 0};

  dsss_receiver #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .sel, .thr_sel, .en, .valid, .sample,
    .data_out, .data_valid, .corr, .saturated);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sel=%b thr=%0d: %s", sel, thr_sel, what);
    end
  endtask

  function automatic int thr_value(input int t);
    int tv[4] = '{0, 256, -256, 512};
    return tv[t];
  endfunction

  // Receive nbits random bits, code s, amplitude amp, noise +-noise.
  task automatic receive(input logic [3:0] s, input int t, input int amp,
                         input int noise, input int nbits);
    bit code[$];
    bit bits[$];
    int len, x, acc, exp_corr, outs;
    bit exp_sat, clean;
    len = ref_len(s);
    ref_seq(s, len, code);
    for (int i = 0; i < nbits; i++) bits.push_back(1'($urandom));
    @(negedge clk);
    en = 1'b0; valid = 1'b0;
    sel = s; thr_sel = 2'(t);
    thr_used[t]++;
    @(negedge clk);
    en = 1'b1;
    outs = 0;
    for (int b = 0; b < nbits; b++) begin
      acc = 0; exp_sat = 1'b0;
      for (int i = 0; i < len; i++) begin
        // Optional idle cycles between samples.
        while ($urandom_range(0, 3) == 0) begin
          valid = 1'b0;
          @(negedge clk);
          #1;
          check(!data_valid, "no data_valid in an idle cycle");
        end
        x = ((bits[b] ^ code[i]) ? -amp : amp) + $urandom_range(0, 2 * noise) - noise;
        if (x > 127) x = 127;
        if (x < -128) x = -128;
        valid = 1'b1;
        sample = IN_W'(x);
        acc += code[i] ? -x : x;
        if (acc > 2047) begin acc = 2047; exp_sat = 1'b1; end
        if (acc < -2048) begin acc = -2048; exp_sat = 1'b1; end
        @(negedge clk);
        valid = 1'b0;
        if (i == len - 1) begin
          #1;
          check(data_valid, "data_valid one cycle after the last sample");
          exp_corr = acc;
          check(int'(corr) == exp_corr, $sformatf("bit %0d corr %0d want %0d", b, corr, exp_corr));
          check(data_out == (exp_corr < thr_value(t)), "decision against threshold");
          check(saturated == exp_sat, "saturation flag");
          clean = (noise < amp) && (t == 0);
          if (clean) check(data_out == bits[b], $sformatf("bit %0d recovered", b));
          if (saturated) sat_bits++;
          outs++;
        end else begin
          #1;
          check(!data_valid, "no data_valid inside a bit");
        end
      end
    end
    check(outs == nbits, "one output per bit");
    en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    receive(4'b0000, 0, 60, 20, 20);    // no coding
    receive(4'b0001, 0, 20, 10, 6);     // 32 chips
    receive(4'b0010, 1, 20, 60, 4);     // noisy, threshold +T
    receive(4'b0111, 2, 10, 30, 4);     // 64 chips, threshold -T
    receive(4'b1001, 3, 5, 4, 3);       // 128 chips, threshold +2T
    receive(4'b1101, 0, 100, 20, 3);    // 256 chips, saturates
    receive(4'b1110, 0, 3, 20, 3);      // 256 chips, weak and noisy
    check(sat_bits > 0, "saturation exercised");
    $display("bits with saturation: %0d", sat_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
