// rtrc: reconfigurable twisted ring counter (Johnson counter).
//
// LEN flip-flops J1..Jl (bit 0 = J1, bit LEN-1 = Jl) shift one place toward
// Jl on every clock with en=1 (Clock2). What enters J1 is chosen by the mode:
//
//   rj_mode init  mode            J1 receives       use
//   1       0     Start           0                 clear to all 0s (> LEN clocks)
//   1       1     Circular shift  Jl                rotate: LEN clocks give
//                                                   back the same vector
//   0       x     Normal          not Jl            twisted ring counting:
//                                                   2*LEN distinct vectors,
//                                                   one bit changes per clock
//
// The three modes, the Init/RJ-Mode inputs and the 2:1 selection in front of
// J1 follow the published counter; the asynchronous active-low reset to all
// 0s is added by this design so the register never starts unset.
//
// Timing: j changes on the rising clk edge where en=1.
module rtrc
  import msic_pkg::*;
#(
  parameter int unsigned LEN = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,       // Clock2 enable
  input  logic           rj_mode,  // 1: Start / Circular shift, 0: Normal
  input  logic           init,     // with rj_mode=1: 0 clears, 1 rotates
  output logic [LEN-1:0] j         // j[0] = J1 ... j[LEN-1] = Jl
);

  initial assert (LEN >= 2) else $error("rtrc: LEN must be at least 2");

  logic d_first;
  assign d_first = rj_mode ? (init & j[LEN-1]) : ~j[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  j <= '0;
    else if (en) j <= {j[LEN-2:0], d_first};
  end

endmodule
