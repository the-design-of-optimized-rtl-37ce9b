// clock_divider: chip counter that divides the chip rate by the code length.
//
// Counts chips 0 .. L-1 for the code length L selected by S3S2 (32, 64, 128 or
// 256; 1 without coding) and flags the last chip of each data bit. The
// transmitter uses it to time the data latch (one data bit per code period)
// and to restart the PN generator; the receiver uses it the same way to frame
// the correlation. The division by the code length follows the original
// design; counting enabled chips instead of producing a gated clock is this
// design's choice, so the whole design runs on one clock.
//
// Interface: while `run` is low the count is held at 0. While `run` is high
// each cycle with `tick` is one chip. `last` is combinational and high in the
// cycle of the final chip of a bit (with `tick`); `first` is high while the
// count is 0.
module clock_divider
  import dsss_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  code_sel_t        sel,     // S3S2S1S0; S3S2 sets the ratio
  input  logic             run,     // count enable, clear when low
  input  logic             tick,    // one chip in this cycle
  output logic [CNT_W-1:0] count,   // chip index within the bit
  output logic             first,   // chip 0 of a bit
  output logic             last     // final chip of a bit, in a tick cycle
);

  logic [CNT_W-1:0] top;

  assign top   = last_chip(sel);
  assign first = (count == '0);
  assign last  = run && tick && (count == top);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         count <= '0;
    else if (!run)      count <= '0;
    else if (last)      count <= '0;
    else if (tick)      count <= count + 1'b1;
  end

endmodule
