// msic_top: MSIC test pattern generation in its two application schemes.
//
// The multiple single-input-change (MSIC) generator XORs a slowly changing
// LFSR seed with the vectors of a twisted ring counter, so that every CUT
// input sequence changes one bit at a time while different inputs still get
// different, pseudo-random-looking copies. This top holds both schemes side
// by side, each with its own control and CUT ports:
//   tpc_*  test-per-clock (msic_tpc): an N x M XOR grid drives TPC_M*TPC_N
//          CUT inputs, a new vector every clock;
//   tps_*  test-per-scan (msic_tps): TPS_CHAINS scan chains of TPS_LEN cells
//          are loaded with twisted codewords, the seed drives TPS_SEED_W
//          primary inputs.
// The circuit under test is outside; its inputs and outputs are ports. The
// default sizes give 36 CUT inputs in each scheme and NPO = 7 outputs (the
// C432 benchmark); SEED_KIND selects LFSR, bit-swapping LFSR or low-power
// LFSR seeds for both. Putting both schemes in one top, the default sizes
// and the default seed circuit are this design's choices.
module msic_top
  import msic_pkg::*;
#(
  parameter seed_kind_e  SEED_KIND  = SEED_LP,
  parameter int unsigned TPC_M      = 6,
  parameter int unsigned TPC_N      = 6,
  parameter int unsigned TPS_SEED_W = 6,
  parameter int unsigned TPS_CHAINS = 6,
  parameter int unsigned TPS_LEN    = 5,
  parameter int unsigned NPO        = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // test-per-clock
  input  logic                          tpc_start,
  input  logic [15:0]                   tpc_n_seeds,
  output logic [TPC_M*TPC_N-1:0]        tpc_cut_pi,
  input  logic [NPO-1:0]                tpc_cut_po,
  output logic                          tpc_vec_valid,
  output logic                          tpc_busy,
  output logic                          tpc_done,
  output logic [NPO-1:0]                tpc_signature,
  // test-per-scan
  input  logic                          tps_start,
  input  logic [15:0]                   tps_n_seeds,
  output logic [TPS_SEED_W-1:0]         tps_cut_pi,
  output logic [TPS_CHAINS*TPS_LEN-1:0] tps_scan_cells,
  input  logic [NPO-1:0]                tps_cut_po,
  input  logic [TPS_CHAINS*TPS_LEN-1:0] tps_cut_ppo,
  output logic                          tps_scan_capture,
  output logic                          tps_busy,
  output logic                          tps_done,
  output logic [NPO+TPS_CHAINS-1:0]     tps_signature
);

  msic_tpc #(.KIND(SEED_KIND), .M(TPC_M), .N(TPC_N), .NPO(NPO)) u_tpc (
    .clk, .rst_n, .start(tpc_start), .n_seeds(tpc_n_seeds),
    .cut_pi(tpc_cut_pi), .cut_po(tpc_cut_po), .vec_valid(tpc_vec_valid),
    .busy(tpc_busy), .done(tpc_done), .signature(tpc_signature),
    .seed(), .j()
  );

  msic_tps #(.KIND(SEED_KIND), .SEED_W(TPS_SEED_W), .CHAINS(TPS_CHAINS),
             .LEN(TPS_LEN), .NPO(NPO)) u_tps (
    .clk, .rst_n, .start(tps_start), .n_seeds(tps_n_seeds),
    .cut_pi(tps_cut_pi), .scan_cells(tps_scan_cells), .cut_po(tps_cut_po),
    .cut_ppo(tps_cut_ppo), .scan_capture(tps_scan_capture),
    .busy(tps_busy), .done(tps_done), .signature(tps_signature), .j()
  );

endmodule
