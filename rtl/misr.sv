// misr: multiple-input signature register.
//
// Compacts WIDTH response bits per enabled clock into a WIDTH-bit signature:
// the register shifts toward bit 0 with primitive-polynomial feedback into
// the MSB (as the LFSRs of this design), and each stage is XORed with one
// data bit:  sig <= {^(sig & TAPS), sig[WIDTH-1:1]} ^ d.
// Only the use of a MISR is given for this generator; its structure,
// polynomial and reset to 0 are standard choices of this design.
//
// Timing: sig updates on the rising clk edge where en=1; clear=1 zeroes it
// synchronously (clear wins over en). Reset is asynchronous, active low.
module misr
  import msic_pkg::*;
#(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  localparam logic [WIDTH-1:0] TAPS = lfsr_taps(WIDTH)[WIDTH-1:0];

  initial assert (WIDTH >= 2 && WIDTH <= 32)
    else $error("misr: WIDTH must be 2..32");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (en)     sig <= {^(sig & TAPS), sig[WIDTH-1:1]} ^ d;
  end

endmodule
