// scan_chains: CHAINS scan chains of LEN mux-D scan cells each.
//
// While shift=1, every chain moves one cell toward its scan-out end on each
// clock: cell 0 takes scan_in[k], cell LEN-1 drives scan_out[k]. While
// capture=1 (and shift=0) all cells load the CUT's next-state bits cap_d in
// parallel. The cells drive the CUT in parallel through cells.
// Layout: chain k, cell i is bit k*LEN + i of cells and cap_d.
// The scan chains belong to the full-scan circuit under test; this model of
// them (mux-D cells, capture port, reset to 0) is this design's choice, made
// so that the generator can be exercised and checked.
//
// Timing: shift and capture act on the rising clk edge. Reset is
// asynchronous, active low.
module scan_chains #(
  parameter int unsigned CHAINS = 6,
  parameter int unsigned LEN    = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift,
  input  logic                    capture,
  input  logic [CHAINS-1:0]       scan_in,
  input  logic [CHAINS*LEN-1:0]   cap_d,
  output logic [CHAINS-1:0]       scan_out,
  output logic [CHAINS*LEN-1:0]   cells
);

  initial assert (LEN >= 2) else $error("scan_chains: LEN must be at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cells <= '0;
    else if (shift) begin
      for (int k = 0; k < CHAINS; k++)
        cells[k*LEN +: LEN] <= {cells[k*LEN +: LEN-1], scan_in[k]};
    end else if (capture) cells <= cap_d;
  end

  always_comb begin
    for (int k = 0; k < CHAINS; k++) scan_out[k] = cells[k*LEN + LEN - 1];
  end

  // shift and capture are never requested together by the driver
  a_shift_xor_capture: assert property (@(posedge clk) disable iff (!rst_n) !(shift && capture));

endmodule
