// pn_generator: programmable LFSR-based PN code generator.
//
// An eight-stage Fibonacci shift register. On every step the contents move one
// stage up (stage k takes stage k-1) and stage 1 takes the XOR of the stages
// named by the feedback tap set; S1S0 selects the tap set (feedback select) and
// S3S2 selects which of stages 5..8 drives the output, which fixes the code
// length at 32, 64, 128 or 256 chips. Register structure, tap sets and length
// selection follow the original design.
//
// Design choices: `load` returns the register to the all-ones seed; the owner
// of the generator loads it at the end of each data bit, so every data bit is
// spread by the same code: the 2^n-1 chip maximal-length sequence followed by
// a repeat of its first chip, 2^n chips in all. Without coding (S1S0 = 00) the
// output is 0, so data pass the modulo-2 adder unchanged.
//
// Interface: `pn` is the current chip, a combinational function of the
// register, valid in the cycle it is used; `step` advances it at the clock
// edge; `load` has priority over `step`. `sel` may change only while the
// generator is being loaded.
module pn_generator
  import dsss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  code_sel_t sel,     // S3S2S1S0
  input  logic      load,    // restart the code from the seed
  input  logic      step,    // advance one chip
  output logic      pn       // current PN chip (0/1 = +1/-1 in bipolar form)
);

  logic [LFSR_STAGES-1:0] stages;   // stages[k-1] is stage k
  logic                   feedback;

  assign feedback = ^(stages & tap_mask(sel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      stages <= '1;
    else if (load)   stages <= '1;
    else if (step)   stages <= {stages[LFSR_STAGES-2:0], feedback};
  end

  // Length select: output taken from stage 5, 6, 7 or 8.
  always_comb begin
    if (!is_coded(sel[1:0])) pn = 1'b0;
    else                     pn = stages[degree(sel[3:2]) - 1];
  end

endmodule
