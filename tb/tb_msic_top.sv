// tb_msic_top: end-to-end test of msic_top at its default parameters
// (low-power LFSR seeds; test-per-clock 6 x 6 grid; test-per-scan 6 chains
// of 5 cells with 6 seed inputs; 7 CUT outputs), with stand-in CUTs.
// Both schemes run a complete test over the full seed period of the 6-bit
// low-power LFSR (63 LFSR states x 4 patterns = 252 seeds) at the same time.
// Checked: every test-per-clock vector and every test-per-scan load against
// the reference models, the single-input-change property, cycles to done,
// and both final signatures. Counted, and required to occur: Start-mode
// clears, Normal-mode counter steps, circular shifts, captures, unload
// shifts, seed updates, low-power intermediate patterns, MISR updates.
module tb_msic_top;
  import tb_ref_pkg::*;

  localparam int M = 6, N = 6, W = 6, C = 6, L = 5, NPO = 7, SEEDS = 252;

  logic clk = 0, rst_n = 0, tpc_start = 0, tps_start = 0;
  logic [15:0] tpc_n_seeds = 16'(SEEDS), tps_n_seeds = 16'(SEEDS);
  logic [M*N-1:0] tpc_cut_pi;
  logic [NPO-1:0] tpc_cut_po, tpc_signature, tps_cut_po;
  logic tpc_vec_valid, tpc_busy, tpc_done;
  logic [W-1:0] tps_cut_pi;
  logic [C*L-1:0] tps_scan_cells, tps_cut_ppo;
  logic tps_scan_capture, tps_busy, tps_done;
  logic [NPO+C-1:0] tps_signature;
  int checks = 0, failures = 0;
  int cyc = 0;

  msic_top dut (.*);

  assign tpc_cut_po  = cut_po(64'(tpc_cut_pi));
  assign tps_cut_po  = cut_po(64'({tps_scan_cells, tps_cut_pi}));
  assign tps_cut_ppo = (C*L)'(cut_ppo(64'({tps_scan_cells, tps_cut_pi}), C * L));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_clear = 0, n_normal = 0, n_circ = 0, n_capture = 0, n_unload = 0;
  int n_seed = 0, n_lp_mid = 0, n_misr = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_tpc.clk2_en && dut.u_tpc.rj_mode && !dut.u_tpc.init) n_clear++;
    if (dut.u_tps.clk2_en && dut.u_tps.rj_mode && !dut.u_tps.init) n_clear++;
    if (dut.u_tpc.clk2_en && !dut.u_tpc.rj_mode) n_normal++;
    if (dut.u_tps.clk2_en && !dut.u_tps.rj_mode) n_normal++;
    if (dut.u_tps.clk2_en && dut.u_tps.rj_mode && dut.u_tps.init) n_circ++;
    if (tps_scan_capture) n_capture++;
    if (dut.u_tps.scan_shift && !dut.u_tps.clk2_en) n_unload++;
    if (dut.u_tpc.clk1_en) n_seed++;
    if (dut.u_tps.clk1_en) n_seed++;
    if (dut.u_tpc.clk1_en && dut.u_tpc.u_seed.g_lp.phase != 2'd3) n_lp_mid++;
    if (tpc_vec_valid) n_misr++;
    if (dut.u_tps.misr_en) n_misr++;
  end

  // ---------------- test-per-clock checks ----------------
  int vecs = 0;
  logic [63:0] tpc_ref_sig = 0;
  logic [M*N-1:0] prev_pi;
  always @(negedge clk) if (rst_n && tpc_vec_valid) begin
    int s, v, rows;
    logic [63:0] sd, jj;
    logic [M*N-1:0] e;
    s = vecs / (2 * N);
    v = vecs % (2 * N);
    sd = ref_seed(2, M, s + 1);
    jj = ref_johnson(N, v);
    for (int r = 0; r < N; r++) e[r*M +: M] = jj[r] ? ~M'(sd) : M'(sd);
    check(tpc_cut_pi == e, $sformatf("TPC vector %0d", vecs));
    if (v != 0) begin
      rows = 0;
      for (int r = 0; r < N; r++) if (tpc_cut_pi[r*M +: M] != prev_pi[r*M +: M]) rows++;
      check(rows == 1, "TPC single row change");
    end
    tpc_ref_sig = ref_misr(NPO, tpc_ref_sig, 64'(cut_po(64'(e))));
    prev_pi = tpc_cut_pi;
    vecs++;
  end

  // Expected chain load for twisted vector tw: cell i holds J(((i+1) mod L)+1).
  function automatic logic [63:0] rot1(logic [63:0] tw);
    logic [63:0] r;
    r = 0;
    for (int i = 0; i < L; i++) r[i] = tw[(i + 1) % L];
    return r;
  endfunction

  // ---------------- test-per-scan checks ----------------
  int caps = 0;
  logic [C*L-1:0] prev_cells;
  always @(negedge clk) if (rst_n && tps_scan_capture) begin
    int s, t;
    logic [63:0] sd, tw;
    logic [C*L-1:0] e;
    s = caps / (2 * L);
    t = caps % (2 * L) + 1;
    sd = ref_seed(2, W, s + 1);
    tw = ref_johnson(L, t);
    for (int k = 0; k < C; k++) e[k*L +: L] = sd[k] ? ~L'(rot1(tw)) : L'(rot1(tw));
    check(tps_cut_pi == W'(sd) && tps_scan_cells == e, $sformatf("TPS capture %0d", caps));
    if (t > 1)
      for (int k = 0; k < C; k++)
        check(popcount(64'(tps_scan_cells[k*L +: L] ^ prev_cells[k*L +: L])) == 1, "TPS single bit change");
    prev_cells = tps_scan_cells;
    caps++;
  end

  function automatic logic [63:0] tps_ref_signature(int seeds);
    logic [63:0] r, cells, sd, tw, in, ppo;
    logic [C-1:0] so;
    r = 0;
    cells = 0;
    for (int s = 0; s < seeds; s++) begin
      sd = ref_seed(2, W, s + 1);
      for (int t = 1; t <= 2 * L; t++) begin
        tw = ref_johnson(L, t);
        for (int h = 0; h < L; h++) begin
          for (int k = 0; k < C; k++) begin
            so[k] = cells[k*L + L - 1];
            cells[k*L +: L] = {cells[k*L +: L-1], sd[k] ^ tw[(L - h) % L]};
          end
          r = ref_misr(NPO + C, r, 64'(so));
        end
        in = (cells << W) | (sd & wmask(W));
        ppo = cut_ppo(in, C * L);
        r = ref_misr(NPO + C, r, 64'(cut_po(in)) << C);
        cells = ppo;
      end
    end
    for (int h = 0; h < L; h++) begin
      for (int k = 0; k < C; k++) begin
        so[k] = cells[k*L + L - 1];
        cells[k*L +: L] = {cells[k*L +: L-1], 1'b0};
      end
      r = ref_misr(NPO + C, r, 64'(so));
    end
    return r;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_tpc, t_tps;
    t_tpc = -1; t_tps = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    tpc_start = 1;
    tps_start = 1;
    @(negedge clk);
    tpc_start = 0;
    tps_start = 0;
    t0 = cyc;
    while (t_tpc < 0 || t_tps < 0) begin
      if (tpc_done && t_tpc < 0) t_tpc = cyc - t0;
      if (tps_done && t_tps < 0) t_tps = cyc - t0;
      @(negedge clk);
    end
    check(t_tpc == N + 1 + SEEDS * (1 + 2 * N), $sformatf("TPC cycles %0d", t_tpc));
    check(t_tps == L + 1 + SEEDS * (2 * L * (L + 2) + 1) + L, $sformatf("TPS cycles %0d", t_tps));
    check(vecs == SEEDS * 2 * N, "TPC vector count");
    check(caps == SEEDS * 2 * L, "TPS capture count");
    check(tpc_signature == NPO'(tpc_ref_sig), "TPC signature");
    check(tps_signature == (NPO+C)'(tps_ref_signature(SEEDS)), "TPS signature");
    $display("TPC: %0d vectors in %0d cycles, signature %h", vecs, t_tpc, tpc_signature);
    $display("TPS: %0d scan loads in %0d cycles, signature %h", caps, t_tps, tps_signature);
    $display("mechanisms: clear %0d normal %0d circular %0d capture %0d unload %0d seed %0d lp_intermediate %0d misr %0d",
             n_clear, n_normal, n_circ, n_capture, n_unload, n_seed, n_lp_mid, n_misr);
    check(n_clear > 0, "Start-mode clear happened");
    check(n_normal > 0, "Normal-mode step happened");
    check(n_circ > 0, "circular shift happened");
    check(n_capture > 0, "capture happened");
    check(n_unload > 0, "unload shift happened");
    check(n_seed > 0, "seed update happened");
    check(n_lp_mid > 0, "low-power intermediate pattern happened");
    check(n_misr > 0, "MISR update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
