// tb_autocorrelation: records the transmitter output for each code length
// (32, 64, 128, 256 chips, all three tap sets each) with a run of zero data
// bits, so that the output is the bare code repeated, and computes its
// normalised periodic autocorrelation over one code period in bipolar form.
// The value at zero shift must be 1, every other shift must stay at or below
// 1/3, and each value must equal the one computed from the reference code.
module tb_autocorrelation;
  import tb_dsss_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic       en = 1'b0;
  logic       data_req, coded, chip_valid, pn_chip;
  int checks = 0, failures = 0;

  dsss_transmitter dut (.clk, .rst_n, .sel, .en, .data(1'b0), .data_req, .coded, .chip_valid, .pn_chip);

  always #50 clk = ~clk;

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
    bit rec[$];
    bit code[$];
    int len, r, rr, worst;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 1; s < 16; s++) begin
      if (s[1:0] == 0) continue;
      sel = 4'(s);
      len = ref_len(sel);
      ref_seq(sel, len, code);
      rec = {};
      en = 1'b1;
      // Skip the start cycle, then record three periods.
      while (rec.size() < 3 * len) begin
        @(negedge clk);
        if (chip_valid) rec.push_back(coded);
      end
      en = 1'b0;
      repeat (len + 2) @(negedge clk);
      worst = 0;
      for (int k = 0; k < len; k++) begin
        r = 0; rr = 0;
        for (int i = 0; i < len; i++) begin
          r  += (rec[len + i] == rec[len + (i + k) % len]) ? 1 : -1;
          rr += (code[i] == code[(i + k) % len]) ? 1 : -1;
        end
        check(r == rr, $sformatf("shift %0d: %0d want %0d", k, r, rr));
        if (k == 0) check(r == len, "peak at zero shift");
        else if ((r < 0 ? -r : r) > worst) worst = (r < 0 ? -r : r);
      end
      check(3 * worst <= len, $sformatf("side lobe %0d of %0d", worst, len));
      $display("L=%0d sel=%b largest side lobe %0.3f", len, sel, real'(worst) / real'(len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
