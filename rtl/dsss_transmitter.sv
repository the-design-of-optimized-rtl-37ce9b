// dsss_transmitter: programmable direct-sequence spread-spectrum transmitter.
//
// A data bit is held in the data latch for one code period while the PN
// generator produces the L chips of the selected code; the modulo-2 adder
// XORs the two, so each data bit leaves as L coded chips, one per clock. The
// clock divider counts the chips and, at the last chip, makes the latch take
// the next bit and reloads the PN generator. Block structure (clock divider,
// data latch, PN code generator, modulo-2 adder) follows the original design.
//
// Design choices: one chip per clock cycle; a start/stop handshake. While
// `en` is low the transmitter is idle. The first cycle with `en` high takes
// the first bit (data_req high) and the chips start the cycle after. At the
// last chip of each bit data_req is high again and `data` is taken at that
// clock edge; if `en` is low then, transmission stops after the bit. So the
// data source advances to its next bit on every edge with data_req high.
// `sel` may change only while idle.
//
// Timing: chip k of bit b is on `coded` in the k-th cycle of that bit's code
// period, with `chip_valid` high; a bit lasts L cycles (L = 1 without coding).
module dsss_transmitter
  import dsss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  code_sel_t sel,         // S3S2S1S0, code select
  input  logic      en,          // transmit enable
  input  logic      data,        // serial data in
  output logic      data_req,    // `data` is taken at this clock edge
  output logic      coded,       // coded data (chip) out
  output logic      chip_valid,  // a chip is on `coded`
  output logic      pn_chip      // current PN chip, for observation
);

  logic             running;
  logic             last;
  logic             take;
  logic             q;
  logic [CNT_W-1:0] count;

  clock_divider u_div (
    .clk, .rst_n, .sel,
    .run  (running),
    .tick (1'b1),
    .count,
    .first (),
    .last
  );

  // Take a bit when starting, and at the last chip of every bit.
  assign take     = last || !running;
  assign data_req = en && take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    running <= 1'b0;
    else if (take) running <= en;
  end

  data_latch u_latch (
    .clk, .rst_n,
    .load (data_req),
    .d    (data),
    .q
  );

  pn_generator u_pn (
    .clk, .rst_n, .sel,
    .load (take),
    .step (running),
    .pn   (pn_chip)
  );

  mod2_adder u_xor (
    .data  (q),
    .pn    (pn_chip),
    .coded
  );

  assign chip_valid = running;

  // The code select must hold still while a bit is being sent.
  a_sel_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 running |-> $stable(sel));

endmodule
