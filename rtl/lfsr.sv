// lfsr: conventional Fibonacci linear feedback shift register, the ordinary
// seed generator of the MSIC test pattern generator.
//
// On every clock with en=1 the register shifts one place toward bit 0 and the
// XOR of the tap stages enters bit WIDTH-1 (the "right shift" of the low-power
// LFSR description). The taps form a primitive polynomial from msic_pkg, so
// the register runs through all 2**WIDTH-1 non-zero states. The polynomial,
// the reset value INIT and the asynchronous active-low reset are choices of
// this design; the generator description only asks for a primitive
// polynomial.
//
// Timing: q changes on the rising clk edge after en is sampled high.
module lfsr
  import msic_pkg::*;
#(
  parameter int unsigned             WIDTH = 6,
  parameter logic [WIDTH-1:0]        INIT  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,     // advance one state (Clock1 enable)
  output logic [WIDTH-1:0] q
);

  localparam logic [WIDTH-1:0] TAPS = lfsr_taps(WIDTH)[WIDTH-1:0];

  initial assert (WIDTH >= 2 && WIDTH <= 32 && INIT != '0)
    else $error("lfsr: WIDTH must be 2..32 and INIT non-zero");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= INIT;
    else if (en) q <= {^(q & TAPS), q[WIDTH-1:1]};
  end

endmodule
