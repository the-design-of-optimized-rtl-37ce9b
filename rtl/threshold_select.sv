// threshold_select: programmable decision threshold of the receiver.
//
// Returns one of four signed thresholds, chosen by the select bits S5S4. The
// original design names this block and its 2-bit select but gives no values;
// the four values are parameters here, by default 0, +T, -T and +2T with
// T = 2^(ACC_W-4). A threshold of 0 is the plain sign decision on the
// correlation sum; the others shift the decision point to compensate for an
// offset in the received signal. Purely combinational.
module threshold_select #(
  parameter int unsigned ACC_W = 12,
  parameter int          THR0  = 0,
  parameter int          THR1  = 1 << (ACC_W - 4),
  parameter int          THR2  = -(1 << (ACC_W - 4)),
  parameter int          THR3  = 1 << (ACC_W - 3)
) (
  input  logic [1:0]              sel,       // S5S4
  output logic signed [ACC_W-1:0] threshold
);

  always_comb begin
    unique case (sel)
      2'd0: threshold = ACC_W'(THR0);
      2'd1: threshold = ACC_W'(THR1);
      2'd2: threshold = ACC_W'(THR2);
      default: threshold = ACC_W'(THR3);
    endcase
  end

endmodule
