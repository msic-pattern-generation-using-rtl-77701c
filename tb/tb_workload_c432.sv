// tb_workload_c432: the six C432-sized configurations side by side:
// test-per-clock and test-per-scan, each with LFSR, bit-swapping LFSR and
// low-power LFSR seeds, at the default sizes (36 CUT inputs, 7 outputs) and
// a 252-seed test. A stand-in CUT function answers on the 36 inputs.
//
// As a measure of switching activity it counts bit toggles on the CUT
// inputs (per applied pattern) and on the seed lines (per Clock1 pulse) and
// prints them as a table. Checked:
//  * every configuration finishes in the scheduled number of cycles;
//  * test-per-clock input toggles equal the value worked out from the
//    reference seeds (M per counter step plus the seed changes);
//  * the bit-swapping and the low-power seed circuits toggle their seed
//    lines less per seed than the plain LFSR.
module tb_workload_c432;
  import tb_ref_pkg::*;
  import msic_pkg::*;

  localparam int M = 6, N = 6, W = 6, C = 6, L = 5, NPO = 7, SEEDS = 252;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_seeds = 16'(SEEDS);
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [5:0] all_done;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- test-per-clock, three seed kinds ----------------
  for (genvar g = 0; g < 3; g++) begin : g_tpc
    logic [M*N-1:0] pi, prev;
    logic [NPO-1:0] po, sig;
    logic vv, busy, done;
    logic [M-1:0] seed, prev_seed;
    logic [N-1:0] j;
    int in_toggles = 0, vecs = 0, seed_toggles = 0, t_done = -1;

    msic_tpc #(.KIND(seed_kind_e'(g))) dut (
      .clk, .rst_n, .start, .n_seeds, .cut_pi(pi), .cut_po(po), .vec_valid(vv),
      .busy, .done, .signature(sig), .seed, .j);

    assign po = cut_po(64'(pi));
    assign all_done[g] = done;

    always @(negedge clk) if (rst_n) begin
      if (vv) begin
        if (vecs > 0) in_toggles += popcount(64'(pi ^ prev));
        prev = pi;
        vecs++;
      end
      if (busy) seed_toggles += popcount(64'(seed ^ prev_seed));
      prev_seed = seed;
      if (done && t_done < 0) t_done = cyc;
    end
  end

  // ---------------- test-per-scan, three seed kinds ----------------
  for (genvar g = 0; g < 3; g++) begin : g_tps
    logic [W-1:0] pi;
    logic [C*L-1:0] cells, ppo;
    logic [NPO-1:0] po;
    logic [NPO+C-1:0] sig;
    logic cap, busy, done;
    logic [L-1:0] j;
    logic [W+C*L-1:0] prev;
    int in_toggles = 0, caps = 0, t_done = -1;

    msic_tps #(.KIND(seed_kind_e'(g))) dut (
      .clk, .rst_n, .start, .n_seeds, .cut_pi(pi), .scan_cells(cells), .cut_po(po),
      .cut_ppo(ppo), .scan_capture(cap), .busy, .done, .signature(sig), .j);

    assign po  = cut_po(64'({cells, pi}));
    assign ppo = (C*L)'(cut_ppo(64'({cells, pi}), C * L));
    assign all_done[3 + g] = done;

    always @(negedge clk) if (rst_n) begin
      if (busy) in_toggles += popcount(64'({cells, pi} ^ prev));
      prev = {cells, pi};
      if (cap) caps++;
      if (done && t_done < 0) t_done = cyc;
    end
  end

  // Expected test-per-clock input toggles for seed kind g.
  function automatic int tpc_expected(int g);
    int t;
    logic [63:0] sp, sn;
    t = SEEDS * (2 * N - 1) * M;
    for (int s = 1; s < SEEDS; s++) begin
      sp = ref_seed(g, M, s) & wmask(M);
      sn = ref_seed(g, M, s + 1) & wmask(M);
      // last vector of a seed: only row N-1 inverted; first vector: no row inverted
      t += (N - 1) * popcount(sp ^ sn) + (M - popcount(sp ^ sn));
    end
    return t;
  endfunction

  function automatic int seed_toggles_ref(int g);
    int t;
    t = 0;
    for (int s = 0; s < SEEDS; s++) t += popcount((ref_seed(g, M, s) ^ ref_seed(g, M, s + 1)) & wmask(M));
    return t;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    string nm [3];
    nm = '{"LFSR   ", "BS-LFSR", "LP-LFSR"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    wait (all_done == 6'h3f);
    repeat (2) @(negedge clk);
    check(g_tpc[0].t_done - t0 == N + 1 + SEEDS * (2 * N + 1), "TPC LFSR cycles");
    check(g_tpc[1].t_done - t0 == N + 1 + SEEDS * (2 * N + 1), "TPC BS cycles");
    check(g_tpc[2].t_done - t0 == N + 1 + SEEDS * (2 * N + 1), "TPC LP cycles");
    check(g_tps[0].t_done - t0 == L + 1 + SEEDS * (2 * L * (L + 2) + 1) + L, $sformatf("TPS LFSR cycles %0d", g_tps[0].t_done - t0));
    check(g_tps[1].t_done - t0 == L + 1 + SEEDS * (2 * L * (L + 2) + 1) + L, "TPS BS cycles");
    check(g_tps[2].t_done - t0 == L + 1 + SEEDS * (2 * L * (L + 2) + 1) + L, "TPS LP cycles");
    check(g_tpc[0].in_toggles == tpc_expected(0), $sformatf("TPC LFSR toggles %0d exp %0d", g_tpc[0].in_toggles, tpc_expected(0)));
    check(g_tpc[1].in_toggles == tpc_expected(1), $sformatf("TPC BS toggles %0d exp %0d", g_tpc[1].in_toggles, tpc_expected(1)));
    check(g_tpc[2].in_toggles == tpc_expected(2), $sformatf("TPC LP toggles %0d exp %0d", g_tpc[2].in_toggles, tpc_expected(2)));
    check(g_tpc[0].seed_toggles == seed_toggles_ref(0), "LFSR seed toggles");
    check(g_tpc[1].seed_toggles == seed_toggles_ref(1), "BS seed toggles");
    check(g_tpc[2].seed_toggles == seed_toggles_ref(2), "LP seed toggles");
    check(g_tpc[1].seed_toggles < g_tpc[0].seed_toggles, "BS-LFSR seeds toggle less than LFSR seeds");
    check(g_tpc[2].seed_toggles < g_tpc[0].seed_toggles, "LP-LFSR seeds toggle less than LFSR seeds");
    $display("C432-sized test, %0d seeds: toggles on the 36 CUT inputs per applied pattern", SEEDS);
    $display("  seed circuit  seed-line toggles/seed  TPC toggles/vector  TPS toggles/scan load");
    $display("  %s       %5.2f                 %5.2f               %6.2f", nm[0],
             real'(g_tpc[0].seed_toggles) / SEEDS, real'(g_tpc[0].in_toggles) / (g_tpc[0].vecs - 1),
             real'(g_tps[0].in_toggles) / g_tps[0].caps);
    $display("  %s       %5.2f                 %5.2f               %6.2f", nm[1],
             real'(g_tpc[1].seed_toggles) / SEEDS, real'(g_tpc[1].in_toggles) / (g_tpc[1].vecs - 1),
             real'(g_tps[1].in_toggles) / g_tps[1].caps);
    $display("  %s       %5.2f                 %5.2f               %6.2f", nm[2],
             real'(g_tpc[2].seed_toggles) / SEEDS, real'(g_tpc[2].in_toggles) / (g_tpc[2].vecs - 1),
             real'(g_tps[2].in_toggles) / g_tps[2].caps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
