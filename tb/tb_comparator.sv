// tb_comparator: random correlation sums and thresholds, with the boundary
// cases equal, one below and one above; data is 1 exactly when the sum lies
// below the threshold.
module tb_comparator;
  logic signed [11:0] corr, threshold;
  logic data;
  int checks = 0, failures = 0;

  comparator #(.ACC_W(12)) dut (.corr, .threshold, .data);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, t;
    for (int i = 0; i < 2000; i++) begin
      t = $urandom_range(0, 4095) - 2048;
      case (i % 4)
        0: c = t;
        1: c = t - 1;
        2: c = t + 1;
        default: c = $urandom_range(0, 4095) - 2048;
      endcase
      if (c < -2048 || c > 2047) c = t;
      corr = 12'(c); threshold = 12'(t);
      #1;
      checks++;
      if (data !== (c < t)) begin
        failures++;
        $display("FAIL corr=%0d thr=%0d data=%b", c, t, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
