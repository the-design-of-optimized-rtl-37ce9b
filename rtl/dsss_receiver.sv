// dsss_receiver: programmable correlator receiver for the DS-SS link.
//
// Each received sample (the digitized chip stream) is multiplied by the local
// PN chip, a sign change, and accumulated by the MAC over one code period of
// L samples. At the last chip the comparator tests the correlation sum against
// the threshold chosen by S5S4 and outputs the recovered data bit. The PN
// generator is the same as the transmitter's and is restarted for every bit,
// so it produces the same L-chip code. Block structure (MAC, PN generator,
// threshold, comparator) follows the original design.
//
// Design choices: code phase acquisition is not part of this block. The
// receiver assumes it is aligned with the transmitter: the first sample with
// `valid` after `en` rises is chip 0 of a bit. While `en` is low the receiver
// is cleared. `sel` and `thr_sel` may change only while `en` is low.
//
// Timing: one sample per cycle at most, at any rate (`valid`). One cycle after
// the last sample of a bit, `data_valid` pulses with `data_out`, the
// correlation sum `corr` and `saturated`, which is high when the accumulator
// clipped during that bit. Parameters: IN_W sample width, ACC_W internal
// register width; the defaults, 8 and 12, are the 8-bit A/D conversion of the
// original test setup and the register width recommended there for a
// receiver that must take any input width and code length.
module dsss_receiver
  import dsss_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  code_sel_t               sel,         // S3S2S1S0, code select
  input  thr_sel_t                thr_sel,     // S5S4, threshold select
  input  logic                    en,          // receive enable / bit alignment
  input  logic                    valid,       // a sample is present
  input  logic signed [IN_W-1:0]  sample,      // digitized received chip
  output logic                    data_out,    // recovered data bit
  output logic                    data_valid,  // data_out is new
  output logic signed [ACC_W-1:0] corr,        // correlation sum of the bit
  output logic                    saturated    // accumulator clipped in the bit
);

  logic                    tick;
  logic                    first;
  logic                    last;
  logic [CNT_W-1:0]        count;
  logic                    pn;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] sum;
  logic                    sum_sat;
  logic signed [ACC_W-1:0] threshold;
  logic                    decision;

  assign tick = en && valid;

  clock_divider u_div (
    .clk, .rst_n, .sel,
    .run   (en),
    .tick,
    .count,
    .first,
    .last
  );

  pn_generator u_pn (
    .clk, .rst_n, .sel,
    .load (!en || last),
    .step (tick),
    .pn
  );

  correlator_mac #(.IN_W(IN_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .valid (tick),
    .first,
    .pn,
    .sample,
    .acc,
    .sum,
    .sum_sat
  );

  threshold_select #(.ACC_W(ACC_W)) u_thr (
    .sel (thr_sel),
    .threshold
  );

  comparator #(.ACC_W(ACC_W)) u_cmp (
    .corr (sum),
    .threshold,
    .data (decision)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out   <= 1'b0;
      data_valid <= 1'b0;
      corr       <= '0;
      saturated  <= 1'b0;
    end else begin
      data_valid <= last;
      if (last) begin
        data_out  <= decision;
        corr      <= sum;
        saturated <= sum_sat;
      end
    end
  end

  a_sel_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 en |-> $stable(sel) && $stable(thr_sel));

endmodule
