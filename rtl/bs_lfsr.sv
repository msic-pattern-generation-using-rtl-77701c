// bs_lfsr: bit-swapping LFSR.
//
// A conventional Fibonacci LFSR (shift toward bit 0, feedback into bit
// WIDTH-1, primitive taps from msic_pkg) whose outputs pass through one 2:1
// multiplexer per bit. The last flip-flop, bit 0, is the common select: while
// it holds 0 the outputs equal the register, while it holds 1 the outputs of
// adjacent flip-flops are swapped in pairs (q[1]<->q[0], q[3]<->q[2], ...).
// Swapping never changes the register sequence itself; it only reorders the
// output bits so that consecutive outputs differ in fewer bits (for 4 bits,
// 18 instead of 30 toggles over a period). Because the select bit is one of
// the swapped bits, two register states can give the same output: the 4-bit
// version shows 11 distinct outputs in its 15-state period.
//
// The 4-bit default, the select taken from the last flip-flop and the pairwise
// swap follow the published structure; the polynomial, the reset value and,
// for odd WIDTH, leaving the top bit unswapped are this design's choices.
//
// Timing: q is combinational from the register, which advances on the rising
// clk edge when en=1. Reset is asynchronous, active low.
module bs_lfsr
  import msic_pkg::*;
#(
  parameter int unsigned      WIDTH = 4,
  parameter logic [WIDTH-1:0] INIT  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,       // swapped outputs
  output logic [WIDTH-1:0] state    // register contents before swapping
);

  localparam logic [WIDTH-1:0] TAPS = lfsr_taps(WIDTH)[WIDTH-1:0];

  initial assert (WIDTH >= 2 && WIDTH <= 32 && INIT != '0)
    else $error("bs_lfsr: WIDTH must be 2..32 and INIT non-zero");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= INIT;
    else if (en) state <= {^(state & TAPS), state[WIDTH-1:1]};
  end

  logic sel;
  assign sel = state[0];

  always_comb begin
    q = state;
    if (sel) begin
      for (int i = 0; i + 1 < WIDTH; i += 2) begin
        q[i]     = state[i + 1];
        q[i + 1] = state[i];
      end
    end
  end

endmodule
