// tb_register_sweep: the test pattern 10101010 sent with every code length
// (32, 64, 128, 256 chips) and received at once by nine receivers that differ
// in input data width and internal register width, 4-bit samples with 6 to 16
// bit registers, 8-bit samples with 9 to 16, 12-bit samples with 12 and 16.
// Each receiver gets the transmitted chips as bipolar samples at about half of
// its own full scale plus noise. Every receiver must recover the pattern at
// every code length; a receiver whose register holds the largest possible sum
// (ACC_W >= IN_W + n for 2^n chips) must never saturate, and saturation must
// occur somewhere in the sweep.
module tb_register_sweep;
  import tb_dsss_ref_pkg::*;

  localparam int NCFG = 9;
  localparam int CFG_IN[NCFG]  = '{4, 4, 4, 4, 8, 8, 8, 12, 12};
  localparam int CFG_ACC[NCFG] = '{6, 9, 12, 16, 9, 12, 16, 12, 16};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic       tx_en = 1'b0;
  logic       tx_data = 1'b0;
  logic       data_req, coded, chip_valid, pn_chip;
  logic       rx_en = 1'b0;
  logic       chip_d = 1'b0;
  int checks = 0, failures = 0;

  bit pattern[8] = '{1, 0, 1, 0, 1, 0, 1, 0};
  int nout[NCFG], nerr[NCFG], nsat[NCFG];

  dsss_transmitter u_tx (.clk, .rst_n, .sel, .en(tx_en), .data(tx_data), .data_req,
                         .coded, .chip_valid, .pn_chip);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    rx_en  <= chip_valid;
    chip_d <= coded;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_rx
    localparam int IW = CFG_IN[g];
    localparam int AW = CFG_ACC[g];
    logic signed [IW-1:0] sample;
    logic                 d, dv, sat;
    logic signed [AW-1:0] corr;
    always_comb begin
      int a, x;
      a = (1 << (IW - 1)) / 2;
      x = (chip_d ? -a : a) + int'($urandom_range(0, 2 * (a / 2))) - a / 2;
      sample = IW'(x);
    end
    dsss_receiver #(.IN_W(IW), .ACC_W(AW)) u_rx (
      .clk, .rst_n, .sel, .thr_sel(2'b00), .en(rx_en), .valid(rx_en), .sample,
      .data_out(d), .data_valid(dv), .corr, .saturated(sat));
    always @(posedge clk) begin
      if (dv) begin
        if (d != pattern[nout[g] % 8]) nerr[g]++;
        if (sat) nsat[g]++;
        nout[g]++;
      end
    end
  end

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
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    static logic [3:0] codes[4] = '{4'b0011, 4'b0111, 4'b1010, 4'b1110};
    int idx, len, n;
    int sat_total;
    sat_total = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (codes[k]) begin
      sel = codes[k];
      len = ref_len(sel);
      n = ref_degree(sel);
      for (int g = 0; g < NCFG; g++) begin nout[g] = 0; nerr[g] = 0; nsat[g] = 0; end
      idx = 0;
      while (idx < 8) begin
        tx_en = 1'b1;
        tx_data = pattern[idx];
        #1;
        if (data_req) idx++;
        @(negedge clk);
      end
      tx_en = 1'b0;
      repeat (len + 4) @(negedge clk);
      for (int g = 0; g < NCFG; g++) begin
        check(nout[g] == 8 && nerr[g] == 0,
              $sformatf("L=%0d in=%0d reg=%0d: %0d bits, %0d errors", len, CFG_IN[g], CFG_ACC[g], nout[g], nerr[g]));
        if (CFG_ACC[g] >= CFG_IN[g] + n)
          check(nsat[g] == 0, $sformatf("L=%0d in=%0d reg=%0d saturated", len, CFG_IN[g], CFG_ACC[g]));
        sat_total += nsat[g];
        $display("L=%0d in=%0d reg=%0d saturated bits=%0d", len, CFG_IN[g], CFG_ACC[g], nsat[g]);
      end
    end
    check(sat_total > 0, "saturation occurred in the sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
