// lp_lfsr: low-power LFSR that spreads every LFSR step over four output
// patterns.
//
// The LFSR register holds the current pattern T1; T2 is its successor (shift
// toward bit 0, feedback into the MSB, primitive taps from msic_pkg). The
// register is split into an MSB half and an LSB half, and between T1 and T2
// three intermediate patterns are put out:
//
//   T1k = MSB(T1)              , RI(LSB(T1), LSB(T2))
//   T2k = MSB(T1)              , LSB(T2)
//   T3k = RI(MSB(T1), MSB(T2)) , LSB(T2)
//
// RI is a row of R-injector cells (ri_cell): where the two bits agree the bit
// is kept, where they differ it is replaced by R, here the last bit (bit 0)
// of T1. Each bit that differs between T1 and T2 therefore flips exactly once
// in T1 -> T1k -> T2k -> T3k -> T2, so the transitions of one LFSR step are
// shared out over four clocks.
//
// The pattern order and the half/RI construction follow the published
// scheme; the polynomial, INIT, the 2-bit phase counter that sequences the
// patterns and the unregistered output are this design's choices. For odd
// WIDTH the MSB half is the larger one.
//
// Timing: one new pattern per rising clk edge with en=1; every fourth enabled
// edge loads T2 into the register. Reset (asynchronous, active low) gives
// T1 = INIT, phase 0.
module lp_lfsr
  import msic_pkg::*;
#(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] INIT  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,       // T1, T1k, T2k, T3k, then T2 = next T1
  output logic [1:0]       phase    // 0: T1, 1: T1k, 2: T2k, 3: T3k
);

  localparam int unsigned      LO   = WIDTH / 2;       // LSB half width
  localparam logic [WIDTH-1:0] TAPS = lfsr_taps(WIDTH)[WIDTH-1:0];

  initial assert (WIDTH >= 2 && WIDTH <= 32 && INIT != '0)
    else $error("lp_lfsr: WIDTH must be 2..32 and INIT non-zero");

  logic [WIDTH-1:0] t1, t2;
  logic [WIDTH-1:0] ri_out;   // RI(T1, T2) over the whole width

  assign t2 = {^(t1 & TAPS), t1[WIDTH-1:1]};

  for (genvar i = 0; i < WIDTH; i++) begin : g_ri
    ri_cell u_ri (.d(t2[i]), .q(t1[i]), .r_sel(t1[0]), .r(ri_out[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1    <= INIT;
      phase <= 2'd0;
    end else if (en) begin
      phase <= phase + 2'd1;
      if (phase == 2'd3) t1 <= t2;
    end
  end

  always_comb begin
    unique case (phase)
      2'd0: q = t1;
      2'd1: q = {t1[WIDTH-1:LO], ri_out[LO-1:0]};
      2'd2: q = {t1[WIDTH-1:LO], t2[LO-1:0]};
      2'd3: q = {ri_out[WIDTH-1:LO], t2[LO-1:0]};
    endcase
  end

endmodule
