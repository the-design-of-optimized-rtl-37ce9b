// tb_pressure_waveform: a 2048-sample pressure-like waveform, three beats of a
// sharp systolic rise, a dicrotic notch and a slow decay, normalised to about
// 0.66 .. 0.96 and quantised to 8 bits, is sent as a bit stream (MSB
// first) through the transceiver at its default parameters with the 32-chip
// code [5,2], looped back through a noisy channel, and rebuilt sample by sample
// at the receiver. Every rebuilt sample must equal the sent one, so the
// difference to the analog waveform is the 8-bit quantisation alone, and the
// link must carry one bit per 32 cycles.
module tb_pressure_waveform;

  localparam int NSAMP = 2048;
  localparam int LEN   = 32;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               tx_en = 1'b0;
  logic               tx_data = 1'b0;
  logic               tx_data_req, tx_coded, tx_chip_valid;
  logic               rx_en = 1'b0;
  logic               rx_valid = 1'b0;
  logic signed [7:0]  rx_sample = '0;
  logic               rx_data, rx_data_valid, rx_saturated;
  logic signed [11:0] rx_corr;
  int checks = 0, failures = 0;

  dsss_transceiver dut (
    .clk, .rst_n,
    .tx_sel(4'b0001), .tx_en, .tx_data, .tx_data_req, .tx_coded, .tx_chip_valid,
    .rx_sel(4'b0001), .rx_thr_sel(2'b00), .rx_en, .rx_valid, .rx_sample,
    .rx_data, .rx_data_valid, .rx_corr, .rx_saturated);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    int x;
    x = (tx_coded ? -40 : 40) + $urandom_range(0, 60) - 30;
    rx_valid  <= tx_chip_valid;
    rx_en     <= tx_chip_valid;
    rx_sample <= 8'(x);
  end

  logic [7:0] wave[NSAMP];
  int nbits = 0, nsamp = 0, errs = 0, maxdiff = 0;
  logic [7:0] shreg = '0;
  longint cyc = 0, last_cyc = -1;
  int bad_rate = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && rx_data_valid) begin
      logic [7:0] v;
      v = {shreg[6:0], rx_data};
      shreg <= v;
      if (last_cyc >= 0 && cyc - last_cyc != longint'(LEN)) begin bad_rate++; $display("interval %0d at bit %0d", cyc - last_cyc, nbits); end
      last_cyc <= cyc;
      nbits++;
      if (nbits % 8 == 0) begin
        int dlt;
        dlt = int'(v) - int'(wave[nsamp]);
        if (dlt < 0) dlt = -dlt;
        checks++;
        if (dlt != 0) begin errs++; failures++; $display("sample %0d got %0d want %0d", nsamp, v, wave[nsamp]); end
        if (dlt > maxdiff) maxdiff = dlt;
        nsamp++;
      end
    end
  end

  initial begin : watchdog
    repeat (NSAMP * 8 * LEN + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    for (int i = 0; i < NSAMP; i++) begin
      real p, y;
      int q;
      p = real'(i % 680);
      y = 0.66 + 0.24 * $exp(-((p - 150.0) / 70.0) ** 2)
               + 0.05 * $exp(-((p - 360.0) / 30.0) ** 2)
               + 0.06 * (1.0 - p / 680.0);
      q = $rtoi(y * 255.0 + 0.5);
      if (q > 255) q = 255;
      wave[i] = 8'(q);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idx = 0;
    while (idx < NSAMP * 8) begin
      tx_en = 1'b1;
      tx_data = wave[idx / 8][7 - idx % 8];
      #1;
      if (tx_data_req) idx++;
      @(negedge clk);
    end
    tx_en = 1'b0;
    repeat (LEN + 4) @(negedge clk);
    checks++; if (nsamp != NSAMP) begin failures++; $display("FAIL %0d samples rebuilt", nsamp); end
    if (errs != 0) $display("FAIL %0d samples differ, max %0d", errs, maxdiff);
    checks++; if (bad_rate != 0) begin failures++; $display("FAIL %0d bit intervals not %0d cycles", bad_rate, LEN); end
    $display("samples=%0d bits=%0d max difference=%0d LSB", nsamp, nbits, maxdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
