// tb_dsss_transceiver: end-to-end test of the transceiver at its default
// parameters (8-bit samples, 12-bit accumulator), in a loopback: the
// transmitter's coded chips go through a channel model in this testbench
// (bipolar mapping, amplitude, uniform noise, quantisation to the A/D
// resolution, one cycle of delay) into the receiver, which is enabled with the
// first sample so that it is aligned to the bits.
//
// Runs:
//  * the test pattern 10101010 with every code length (32, 64, 128, 256) at
//    4-bit and 8-bit A/D resolution (4-bit samples sign-extended);
//  * a sampled pressure-like waveform, 8-bit samples sent MSB first as a bit
//    stream and rebuilt at the receiver;
//  * no coding and a reserved select word;
//  * strong signals that saturate the accumulator, and every threshold.
// Every recovered bit is compared with the sent bit, the output rate must be
// one bit per L cycles, and each mechanism must have happened at least once.
module tb_dsss_transceiver;
  import tb_dsss_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [3:0]        tx_sel = '0;
  logic              tx_en = 1'b0;
  logic              tx_data = 1'b0;
  logic              tx_data_req, tx_coded, tx_chip_valid;
  logic [3:0]        rx_sel = '0;
  logic [1:0]        rx_thr_sel = '0;
  logic              rx_en = 1'b0;
  logic              rx_valid = 1'b0;
  logic signed [7:0] rx_sample = '0;
  logic              rx_data, rx_data_valid, rx_saturated;
  logic signed [11:0] rx_corr;

  int checks = 0, failures = 0;
  int amp = 0, noise = 0;
  // Mechanism counters.
  int n_len[4] = '{0, 0, 0, 0};
  int n_nocode = 0, n_reserved = 0, n_sat = 0, n_adc4 = 0, n_wave = 0;
  int n_thr[4] = '{0, 0, 0, 0};

  dsss_transceiver dut (
    .clk, .rst_n,
    .tx_sel, .tx_en, .tx_data, .tx_data_req, .tx_coded, .tx_chip_valid,
    .rx_sel, .rx_thr_sel, .rx_en, .rx_valid, .rx_sample,
    .rx_data, .rx_data_valid, .rx_corr, .rx_saturated);

  always #50 clk = ~clk;   // 10 MHz

  // Channel and A/D converter model.
  always @(posedge clk) begin
    int x;
    x = (tx_coded ? -amp : amp) + $urandom_range(0, 2 * noise) - noise;
    if (x > 127) x = 127;
    if (x < -128) x = -128;
    rx_valid  <= tx_chip_valid;
    rx_en     <= tx_chip_valid;
    rx_sample <= 8'(x);
  end

  // Received bits and the cycles they came in.
  bit rx_bits[$];
  longint rx_cyc[$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && rx_data_valid) begin
      rx_bits.push_back(rx_data);
      rx_cyc.push_back(cyc);
      if (rx_saturated) n_sat++;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL sel=%b: %s", tx_sel, what);
    end
  endtask

  // Send a bit stream over the loopback and check what comes back.
  task automatic link(input logic [3:0] s, input int t, input int a, input int nz,
                      input bit bits[$]);
    int idx, len;
    len = ref_len(s);
    @(negedge clk);
    tx_sel = s; rx_sel = s; rx_thr_sel = 2'(t);
    amp = a; noise = nz;
    rx_bits = {}; rx_cyc = {};
    idx = 0;
    while (idx < bits.size()) begin
      tx_en   = 1'b1;
      tx_data = bits[idx];
      #1;
      if (tx_data_req) idx++;
      @(negedge clk);
    end
    tx_en = 1'b0;
    // Drain: the last bit, the channel delay and the receiver output.
    repeat (len + 4) @(negedge clk);
    check(rx_bits.size() == bits.size(),
          $sformatf("%0d bits back for %0d sent", rx_bits.size(), bits.size()));
    foreach (bits[i])
      if (i < rx_bits.size())
        check(rx_bits[i] == bits[i], $sformatf("bit %0d: got %0b sent %0b", i, rx_bits[i], bits[i]));
    for (int i = 1; i < rx_cyc.size(); i++)
      check(rx_cyc[i] - rx_cyc[i-1] == longint'(len), "one bit per code period");
    if (s[1:0] == 2'b00) begin
      if (s[3:2] == 2'b00) n_nocode++; else n_reserved++;
    end else n_len[s[3:2]]++;
    n_thr[t]++;
  endtask

  initial begin
    bit pat[$];
    bit wave_bits[$];
    bit back[$];
    static logic [3:0] codes[4] = '{4'b0001, 4'b0110, 4'b1011, 4'b1101};
    logic [7:0] wave[32];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Test pattern 10101010.
    pat = '{1, 0, 1, 0, 1, 0, 1, 0};
    foreach (codes[k]) begin
      link(codes[k], 0, 40, 30, pat);   // 8-bit A/D, noisy
      link(codes[k], 0, 6, 4, pat);     // 4-bit A/D range, +-7
      n_adc4++;
    end

    // Pressure-like waveform: a rise, a notch and a slow decay, 8-bit samples.
    for (int i = 0; i < 32; i++) begin
      int v;
      if (i < 6)       v = 170 + 14 * i;
      else if (i < 10) v = 250 - 20 * (i - 6);
      else if (i < 12) v = 175 + 5 * (i - 10);
      else             v = 185 - 2 * (i - 12);
      wave[i] = 8'(v);
      for (int b = 7; b >= 0; b--) wave_bits.push_back(wave[i][b]);
    end
    link(4'b0010, 0, 30, 20, wave_bits);
    back = rx_bits;
    for (int i = 0; i < 32; i++) begin
      logic [7:0] r;
      for (int b = 0; b < 8; b++)
        r[7 - b] = (8 * i + b < back.size()) ? back[8 * i + b] : 1'b0;
      check(r == wave[i], $sformatf("waveform sample %0d: %0d sent %0d", i, r, wave[i]));
    end
    n_wave++;

    // No coding and a reserved word: one clean chip per bit.
    pat = {};
    for (int i = 0; i < 24; i++) pat.push_back(1'($urandom));
    link(4'b0000, 0, 50, 10, pat);
    link(4'b0100, 0, 50, 10, pat);

    // Strong signal: the accumulator saturates, the sign survives; every
    // threshold on a margin large enough not to flip decisions.
    pat = {};
    for (int i = 0; i < 6; i++) pat.push_back(1'($urandom));
    link(4'b1111, 0, 100, 10, pat);
    link(4'b0101, 1, 60, 10, pat);
    link(4'b1010, 2, 60, 10, pat);
    link(4'b0011, 3, 100, 10, pat);

    foreach (n_len[k]) check(n_len[k] > 0, $sformatf("code length %0d used", 32 << k));
    foreach (n_thr[k]) check(n_thr[k] > 0, $sformatf("threshold %0d used", k));
    check(n_nocode > 0, "no coding used");
    check(n_reserved > 0, "reserved select word used");
    check(n_sat > 0, "accumulator saturated");
    check(n_adc4 > 0 && n_wave > 0, "workloads run");
    $display("mechanisms: len32=%0d len64=%0d len128=%0d len256=%0d nocode=%0d reserved=%0d saturated_bits=%0d thr=%0d/%0d/%0d/%0d",
             n_len[0], n_len[1], n_len[2], n_len[3], n_nocode, n_reserved, n_sat,
             n_thr[0], n_thr[1], n_thr[2], n_thr[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
