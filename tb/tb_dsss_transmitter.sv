// tb_dsss_transmitter: sends random data with several code select words and
// checks every chip against data XOR the reference code, that each bit lasts
// exactly L cycles (one chip per clock), that data are requested once per bit,
// that the first chip follows one cycle after enable, and that transmission
// stops cleanly at a bit boundary.
module tb_dsss_transmitter;
  import tb_dsss_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sel = '0;
  logic       en = 1'b0;
  logic       data = 1'b0;
  logic       data_req, coded, chip_valid, pn_chip;
  int checks = 0, failures = 0;

  dsss_transmitter dut (.clk, .rst_n, .sel, .en, .data, .data_req, .coded, .chip_valid, .pn_chip);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // Send nbits bits with select word s and check the chip stream.
  task automatic send(input logic [3:0] s, input int nbits);
    bit bits[$];
    bit code[$];
    bit got[$];
    int idx, len, cyc, first_chip, req_cyc[$];
    len = ref_len(s);
    ref_seq(s, len, code);
    for (int i = 0; i < nbits; i++) bits.push_back(1'($urandom));
    @(negedge clk);
    sel = s;
    idx = 0;
    cyc = 0;
    first_chip = -1;
    // Run until the transmitter has gone idle after the last bit.
    while (cyc < nbits * len + 20) begin
      en   = (idx < nbits);
      data = (idx < nbits) ? bits[idx] : 1'b0;
      #1;
      if (chip_valid) begin
        got.push_back(coded);
        if (first_chip < 0) first_chip = cyc;
      end
      if (data_req) begin
        req_cyc.push_back(cyc);
        idx++;
      end
      cyc++;
      @(negedge clk);
    end
    en = 1'b0;
    check(first_chip == 1, $sformatf("first chip in cycle %0d", first_chip));
    check(got.size() == nbits * len, $sformatf("%0d chips for %0d bits", got.size(), nbits));
    check(req_cyc.size() == nbits, $sformatf("%0d data requests", req_cyc.size()));
    for (int i = 1; i < req_cyc.size(); i++)
      check(req_cyc[i] - req_cyc[i-1] == len, "one data request per code period");
    for (int i = 0; i < got.size() && i < nbits * len; i++)
      check(got[i] == (bits[i / len] ^ code[i % len]),
            $sformatf("chip %0d of bit %0d", i % len, i / len));
    check(!chip_valid, "idle after the last bit");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    send(4'b0000, 16);   // no coding
    send(4'b0001, 8);    // 32 chips
    send(4'b0110, 6);    // 64 chips
    send(4'b1011, 5);    // 128 chips
    send(4'b1110, 4);    // 256 chips
    send(4'b1111, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
