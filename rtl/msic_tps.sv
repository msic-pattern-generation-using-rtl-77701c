// msic_tps: multiple single-input-change (MSIC) test pattern generator for
// the test-per-scan scheme, with scan chains and output compactor.
//
// Parts: seed circuit (seed_gen, SEED_W bits, Clock1), reconfigurable twisted
// ring counter (rtrc, LEN bits = scan length, Clock2), one XOR per scan
// chain, CHAINS scan chains of LEN cells (scan_chains), a MISR and the clock
// and control block (driver_tps).
//
// The seed drives the CUT's primary inputs directly (cut_pi = seed). Chain k
// is fed seed[k] XOR J1, the first counter stage. For every twisted vector
// the counter is rotated LEN times in Circular-shift mode (J1 takes Jl), so
// J1 presents J1, Jl, J(l-1), ..., J2 and each chain ends up holding the
// vector, true or inverted by its seed bit, rotated by one place:
// cell i of chain k = seed[k] ^ J(((i+1) mod LEN)+1), i.e. the scan-out end
// (cell LEN-1) holds seed[k] ^ J1 and cell i < LEN-1 holds seed[k] ^ J(i+2).
// The chains then capture
// the CUT's next-state bits (cut_ppo) while the MISR takes the primary
// outputs (cut_po); the following shift moves the captured bits out of the
// chains into the MISR. Successive loads of one chain differ in one bit.
//
// Interface: start (pulse) with n_seeds begins a test; done rises after
// LEN+1 + n_seeds*(2*LEN*(LEN+2)+1) + LEN cycles, with signature
// (NPO+CHAINS bits: {primary outputs, scan-outs}) holding the result. The
// MISR is cleared by start. scan_capture marks the capture cycles, in which
// scan_cells and cut_pi hold a complete test pattern. CHAINS must not exceed
// SEED_W.
// Parts, connection and shift/capture order follow the published
// test-per-scan scheme; the scan-out end feeding the MISR, the unload phase
// and the sizes are this design's choices.
module msic_tps
  import msic_pkg::*;
#(
  parameter seed_kind_e  KIND   = SEED_LP,
  parameter int unsigned SEED_W = 6,    // seed width = CUT primary inputs
  parameter int unsigned CHAINS = 6,    // scan chains
  parameter int unsigned LEN    = 5,    // scan length = counter length
  parameter int unsigned NPO    = 7     // CUT primary outputs
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [15:0]           n_seeds,
  output logic [SEED_W-1:0]     cut_pi,       // to CUT primary inputs
  output logic [CHAINS*LEN-1:0] scan_cells,   // to CUT pseudo-primary inputs
  input  logic [NPO-1:0]        cut_po,       // from CUT primary outputs
  input  logic [CHAINS*LEN-1:0] cut_ppo,      // CUT next-state, captured
  output logic                  scan_capture,
  output logic                  busy,
  output logic                  done,
  output logic [NPO+CHAINS-1:0] signature,
  output logic [LEN-1:0]        j
);

  initial assert (CHAINS <= SEED_W)
    else $error("msic_tps: CHAINS must not exceed SEED_W");

  logic clk1_en, clk2_en, rj_mode, init, scan_shift, misr_en, misr_po;
  logic [SEED_W-1:0]     seed;
  logic [CHAINS-1:0]     scan_in, scan_out;
  logic [NPO+CHAINS-1:0] misr_d;

  driver_tps #(.LEN(LEN)) u_drv (
    .clk, .rst_n, .start, .n_seeds,
    .clk1_en, .clk2_en, .rj_mode, .init,
    .scan_shift, .scan_capture, .misr_en, .misr_po, .busy, .done
  );

  seed_gen #(.KIND(KIND), .WIDTH(SEED_W)) u_seed (
    .clk, .rst_n, .en(clk1_en), .seed
  );

  rtrc #(.LEN(LEN)) u_trc (
    .clk, .rst_n, .en(clk2_en), .rj_mode, .init, .j
  );

  // XOR row: one gate per scan chain
  always_comb begin
    for (int k = 0; k < CHAINS; k++) scan_in[k] = seed[k] ^ j[0];
  end

  scan_chains #(.CHAINS(CHAINS), .LEN(LEN)) u_scan (
    .clk, .rst_n, .shift(scan_shift), .capture(scan_capture),
    .scan_in, .cap_d(cut_ppo), .scan_out, .cells(scan_cells)
  );

  assign misr_d = misr_po ? {cut_po, CHAINS'(0)} : {NPO'(0), scan_out};

  misr #(.WIDTH(NPO + CHAINS)) u_misr (
    .clk, .rst_n, .clear(start), .en(misr_en), .d(misr_d), .sig(signature)
  );

  assign cut_pi = seed;

endmodule
