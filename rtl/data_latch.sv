// data_latch: storage for the data bit being transmitted.
//
// A one-bit register with load enable. It takes the next data bit when the
// clock divider marks the end of a code period and holds it for all chips of
// the next one. The original design names this block (a data latch fed from
// the clock divider); building it as an edge-triggered register with enable
// rather than a level-sensitive latch is this design's choice.
//
// Interface: `q` takes `d` at the rising clock edge when `load` is high.
module data_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= d;
  end

endmodule
