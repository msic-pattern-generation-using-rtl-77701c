// msic_tpc: multiple single-input-change (MSIC) test pattern generator for
// the test-per-clock scheme, with its output response compactor.
//
// Parts: seed circuit (seed_gen, M bits, Clock1), reconfigurable twisted ring
// counter (rtrc, N bits, Clock2), N x M XOR grid (xor_grid) and the clock and
// control block (driver_tpc). The grid outputs drive the CUT's M*N primary
// inputs directly: cut_pi[i*M + c] = seed[c] ^ J(i+1). Each seed is combined
// with the 2N twisted vectors of the counter, so the CUT sees 2N vectors per
// seed, consecutive ones differing in exactly one grid row. The CUT's outputs
// cut_po are compacted into the MISR in every cycle where vec_valid=1, i.e.
// the CUT is taken to be combinational and to answer within that cycle.
//
// Interface: start (pulse) with n_seeds begins a test; done rises after
// N+1 + n_seeds*(1+2N) cycles; signature then holds the MISR result. The
// MISR is cleared by start. Everything runs on the single clock clk; Clock1
// and Clock2 of the scheme are enables (see driver_tpc).
// The parts and their connection follow the published test-per-clock
// scheme; the MISR placement on the CUT outputs follows its description of
// test-per-clock BIST, while the handshake and sizes are this design's.
module msic_tpc
  import msic_pkg::*;
#(
  parameter seed_kind_e  KIND = SEED_LP,
  parameter int unsigned M    = 6,     // seed width (grid columns)
  parameter int unsigned N    = 6,     // counter length (grid rows)
  parameter int unsigned NPO  = 7      // CUT primary outputs
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      n_seeds,
  output logic [M*N-1:0]   cut_pi,
  input  logic [NPO-1:0]   cut_po,
  output logic             vec_valid,
  output logic             busy,
  output logic             done,
  output logic [NPO-1:0]   signature,
  output logic [M-1:0]     seed,
  output logic [N-1:0]     j
);

  logic clk1_en, clk2_en, rj_mode, init;

  driver_tpc #(.N(N)) u_drv (
    .clk, .rst_n, .start, .n_seeds,
    .clk1_en, .clk2_en, .rj_mode, .init, .vec_valid, .busy, .done
  );

  seed_gen #(.KIND(KIND), .WIDTH(M)) u_seed (
    .clk, .rst_n, .en(clk1_en), .seed
  );

  rtrc #(.LEN(N)) u_trc (
    .clk, .rst_n, .en(clk2_en), .rj_mode, .init, .j
  );

  xor_grid #(.M(M), .N(N)) u_grid (
    .seed, .j_in(j), .x(cut_pi)
  );

  misr #(.WIDTH(NPO)) u_misr (
    .clk, .rst_n, .clear(start), .en(vec_valid), .d(cut_po), .sig(signature)
  );

endmodule
