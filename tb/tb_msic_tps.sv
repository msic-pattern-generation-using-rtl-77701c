// tb_msic_tps: end-to-end check of the test-per-scan generator with a
// stand-in CUT (36 inputs: 6 primary inputs from the seed, 30 scan cells;
// 7 primary outputs; 30 next-state bits), for all three seed circuits.
// At every capture the primary inputs must equal the reference seed and cell
// i of chain k must equal seed[k] XOR counter stage J(((i+1) mod 5)+1) of
// the current twisted vector (the vector rotated by one place);
// between consecutive captures of one seed every chain's load must change in
// exactly one bit; the cycles to done must match the schedule; the final
// MISR signature must equal that of a reference model of shifting,
// capturing and compacting written independently of the RTL's timing.
module tb_msic_tps;
  import tb_ref_pkg::*;
  import msic_pkg::*;

  localparam int W = 6, C = 6, L = 5, NPO = 7, SEEDS = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_seeds = 16'(SEEDS);
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [2:0] all_done;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected chain load for twisted vector tw: cell i holds J(((i+1) mod L)+1).
  function automatic logic [63:0] rot1(logic [63:0] tw);
    logic [63:0] r;
    r = 0;
    for (int i = 0; i < L; i++) r[i] = tw[(i + 1) % L];
    return r;
  endfunction

  // Reference signature of a whole test with seed circuit kind g.
  function automatic logic [63:0] ref_signature(int g, int seeds);
    logic [63:0] r, cells, sd, tw, in, ppo;
    logic [NPO-1:0] po;
    logic [C-1:0] so;
    r = 0;
    cells = 0;
    for (int s = 0; s < seeds; s++) begin
      sd = ref_seed(g, W, s + 1);
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
        po = cut_po(in);
        ppo = cut_ppo(in, C * L);
        r = ref_misr(NPO + C, r, 64'(po) << C);
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

  for (genvar g = 0; g < 3; g++) begin : g_kind
    localparam seed_kind_e K = seed_kind_e'(g);
    logic [W-1:0] pi;
    logic [C*L-1:0] cells, ppo;
    logic [NPO-1:0] po;
    logic [NPO+C-1:0] sig;
    logic cap, busy, done;
    logic [L-1:0] j;

    msic_tps #(.KIND(K), .SEED_W(W), .CHAINS(C), .LEN(L), .NPO(NPO)) dut (
      .clk, .rst_n, .start, .n_seeds, .cut_pi(pi), .scan_cells(cells), .cut_po(po),
      .cut_ppo(ppo), .scan_capture(cap), .busy, .done, .signature(sig), .j);

    assign po  = cut_po(64'({cells, pi}));
    assign ppo = (C*L)'(cut_ppo(64'({cells, pi}), C * L));
    assign all_done[g] = done;

    int caps = 0;
    logic [C*L-1:0] prev;

    always @(negedge clk) begin
      if (rst_n && cap) begin
        int s, t;
        logic [63:0] sd, tw;
        logic [C*L-1:0] e;
        s = caps / (2 * L);
        t = caps % (2 * L) + 1;
        sd = ref_seed(g, W, s + 1);
        tw = ref_johnson(L, t);
        for (int k = 0; k < C; k++) e[k*L +: L] = sd[k] ? ~L'(rot1(tw)) : L'(rot1(tw));
        check(pi == W'(sd), $sformatf("kind %0d capture %0d seed", g, caps));
        check(cells == e, $sformatf("kind %0d capture %0d cells %h exp %h", g, caps, cells, e));
        if (t > 1)
          for (int k = 0; k < C; k++)
            check(popcount(64'(cells[k*L +: L] ^ prev[k*L +: L])) == 1,
                  $sformatf("kind %0d chain %0d single bit change", g, k));
        prev = cells;
        caps++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    wait (all_done == 3'b111);
    @(negedge clk);
    check(cyc - t0 == L + 1 + SEEDS * (2 * L * (L + 2) + 1) + L, $sformatf("cycles to done %0d", cyc - t0));
    check(g_kind[0].caps == SEEDS * 2 * L && g_kind[1].caps == SEEDS * 2 * L && g_kind[2].caps == SEEDS * 2 * L,
          "capture count");
    check(g_kind[0].sig == (NPO+C)'(ref_signature(0, SEEDS)), "LFSR signature");
    check(g_kind[1].sig == (NPO+C)'(ref_signature(1, SEEDS)), "BS-LFSR signature");
    check(g_kind[2].sig == (NPO+C)'(ref_signature(2, SEEDS)), "LP-LFSR signature");
    $display("signatures: LFSR %h BS %h LP %h", g_kind[0].sig, g_kind[1].sig, g_kind[2].sig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
