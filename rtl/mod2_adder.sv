// mod2_adder: spreads a data bit with a PN chip by modulo-2 addition.
//
// The coded chip is data XOR pn. In bipolar form (0 = +1, 1 = -1) this is the
// product of data and code, which is how direct-sequence spreading multiplies
// the data by the PN code, as in the original design. Purely combinational.
module mod2_adder (
  input  logic data,
  input  logic pn,
  output logic coded
);

  assign coded = data ^ pn;

endmodule
