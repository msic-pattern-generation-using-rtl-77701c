// seed_gen: seed circuit of the MSIC test pattern generator.
//
// Produces the m-bit seed S that is XORed with the twisted ring counter
// outputs. Each en pulse (Clock1) gives a new seed. KIND selects the register:
// a conventional LFSR (lfsr), a bit-swapping LFSR (bs_lfsr) or a low-power
// LFSR (lp_lfsr); with the low-power LFSR each pulse gives the next of its
// T1, T1k, T2k, T3k patterns. The three choices follow the generator's
// evaluation with all three registers; making them one parameter, and the
// low-power LFSR the default, is this design's choice.
//
// Timing: seed changes on the rising clk edge where en=1.
module seed_gen
  import msic_pkg::*;
#(
  parameter seed_kind_e  KIND  = SEED_LP,
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,      // Clock1 enable
  output logic [WIDTH-1:0] seed
);

  if (KIND == SEED_LFSR) begin : g_lfsr
    lfsr #(.WIDTH(WIDTH)) u_gen (.clk, .rst_n, .en, .q(seed));
  end else if (KIND == SEED_BS) begin : g_bs
    logic [WIDTH-1:0] state;
    bs_lfsr #(.WIDTH(WIDTH)) u_gen (.clk, .rst_n, .en, .q(seed), .state);
  end else begin : g_lp
    logic [1:0] phase;
    lp_lfsr #(.WIDTH(WIDTH)) u_gen (.clk, .rst_n, .en, .q(seed), .phase);
  end

endmodule
