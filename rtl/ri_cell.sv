// ri_cell: R-injector of the low-power LFSR.
//
// It looks at the input (d) and the output (q) of one LFSR flip-flop, that is
// at one bit of the current pattern and the same bit of the next one. Where
// the two agree the cell passes that value; where they differ it puts out the
// injected value r_sel instead. The low-power LFSR drives r_sel with the last
// bit of the current pattern, so every changing bit of one half of the
// register moves together in a single intermediate step.
//
// The compare-and-inject behaviour follows the published R-injector; taking
// the injected value from a port is this design's choice.
//
// Purely combinational.
module ri_cell (
  input  logic d,      // flip-flop input: the bit of the next pattern
  input  logic q,      // flip-flop output: the bit of the current pattern
  input  logic r_sel,  // value injected where d and q differ
  output logic r
);

  always_comb r = (d == q) ? q : r_sel;

endmodule
