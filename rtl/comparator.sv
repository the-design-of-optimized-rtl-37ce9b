// comparator: data decision of the correlator receiver.
//
// The correlation sum of a data bit is positive when the received chips match
// the PN code (data 0) and negative when they are its inverse (data 1). The
// comparator recovers the bit as 1 when the sum lies below the threshold and
// 0 otherwise. That a threshold function recovers the data follows the
// original design; the direction of the comparison follows from the bipolar
// mapping 0 = +1, 1 = -1. Purely combinational.
module comparator #(
  parameter int unsigned ACC_W = 12
) (
  input  logic signed [ACC_W-1:0] corr,
  input  logic signed [ACC_W-1:0] threshold,
  output logic                    data
);

  assign data = corr < threshold;

endmodule
