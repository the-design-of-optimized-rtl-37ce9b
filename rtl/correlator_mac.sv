// correlator_mac: multiplier-accumulator of the correlator receiver.
//
// Computes r = sum over one code period of x(n) * c(n), where x is the signed
// received sample and c the PN chip in bipolar form (0 = +1, 1 = -1). Since c
// is +-1 the multiply is only a sign change, done as in two's complement
// arithmetic: the sample is inverted bit by bit when the chip is 1 and the
// chip is fed in as the adder's carry, so one adder serves for both addition
// and subtraction. This follows the original design. The accumulator (the
// internal register) is ACC_W bits wide and saturates at its most positive
// and most negative values instead of wrapping; `sat` records that
// saturation happened in the current code period.
//
// Interface: in a cycle with `valid`, the sample is added; `first` marks the
// first chip of a code period and restarts the sum from zero. `sum` is the
// combinational result including the current sample (what the accumulator
// will hold after the edge) and `sum_sat` its saturation flag for the period
// so far, so the caller can take the period's result in its last chip cycle.
// Parameters: IN_W is the input sample width (ADC resolution), ACC_W the
// internal register width. ACC_W >= IN_W is required.
module correlator_mac #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,    // a sample is present
  input  logic                    first,    // first chip of a code period
  input  logic                    pn,       // PN chip, 1 = multiply by -1
  input  logic signed [IN_W-1:0]  sample,   // two's complement sample
  output logic signed [ACC_W-1:0] acc,      // accumulator register
  output logic signed [ACC_W-1:0] sum,      // accumulator after this sample
  output logic                    sum_sat   // saturated in this period so far
);

  localparam logic signed [ACC_W:0] MAX_V = (ACC_W+1)'((1 << (ACC_W-1)) - 1);
  localparam logic signed [ACC_W:0] MIN_V = -(ACC_W+1)'(1 << (ACC_W-1));

  logic signed [ACC_W:0]  base;      // one guard bit
  logic signed [ACC_W:0]  operand;
  logic signed [ACC_W:0]  raw;
  logic                   over;
  logic                   under;
  logic                   sat_q;

  always_comb begin
    base    = first ? '0 : {acc[ACC_W-1], acc};
    // Sign-extend and invert when the chip is 1; +1 comes in as the carry.
    operand = (ACC_W+1)'(sample) ^ {(ACC_W+1){pn}};
    raw     = base + operand + (ACC_W+1)'(pn);
    over    = raw > MAX_V;
    under   = raw < MIN_V;
    if (over)       sum = MAX_V[ACC_W-1:0];
    else if (under) sum = MIN_V[ACC_W-1:0];
    else            sum = raw[ACC_W-1:0];
    sum_sat = over || under || (!first && sat_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      sat_q <= 1'b0;
    end else if (valid) begin
      acc   <= sum;
      sat_q <= sum_sat;
    end
  end

  initial assert (ACC_W >= IN_W) else $error("ACC_W must be at least IN_W");

endmodule
