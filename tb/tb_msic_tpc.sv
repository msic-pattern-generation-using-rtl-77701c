// tb_msic_tpc: end-to-end check of the test-per-clock generator with a
// stand-in combinational CUT, for all three seed circuits (LFSR, bit-swapping,
// low-power) side by side, 6 x 6 grid, 7 outputs.
// Every applied vector must equal seed XOR twisted vector as computed by the
// reference models; consecutive vectors of one seed must differ in exactly
// one grid row (one bit per column); the number of vectors and the cycles to
// done must match the schedule; the final MISR signature must equal the
// reference signature of the stand-in CUT's responses.
module tb_msic_tpc;
  import tb_ref_pkg::*;
  import msic_pkg::*;

  localparam int M = 6, N = 6, NPO = 7, SEEDS = 10;

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

  for (genvar g = 0; g < 3; g++) begin : g_kind
    localparam seed_kind_e K = seed_kind_e'(g);
    logic [M*N-1:0] pi;
    logic [NPO-1:0] po, sig;
    logic vv, busy, done;
    logic [M-1:0] seed;
    logic [N-1:0] j;

    msic_tpc #(.KIND(K), .M(M), .N(N), .NPO(NPO)) dut (
      .clk, .rst_n, .start, .n_seeds, .cut_pi(pi), .cut_po(po), .vec_valid(vv),
      .busy, .done, .signature(sig), .seed, .j);

    assign po = cut_po(64'(pi));
    assign all_done[g] = done;

    int vecs = 0;
    logic [63:0] ref_sig = 0;
    logic [M*N-1:0] prev;

    always @(negedge clk) begin
      if (rst_n && vv) begin
        int s, v;
        logic [63:0] sd, jj;
        logic [M*N-1:0] e;
        s = vecs / (2 * N);
        v = vecs % (2 * N);
        sd = ref_seed(g, M, s + 1);
        jj = ref_johnson(N, v);
        for (int r = 0; r < N; r++) e[r*M +: M] = jj[r] ? ~M'(sd) : M'(sd);
        check(pi == e, $sformatf("kind %0d vector %0d: %h exp %h", g, vecs, pi, e));
        if (v != 0) begin
          int rows;
          rows = 0;
          for (int r = 0; r < N; r++)
            if (pi[r*M +: M] != prev[r*M +: M]) begin
              rows++;
              check((pi[r*M +: M] ^ prev[r*M +: M]) == '1, "whole row flips");
            end
          check(rows == 1, $sformatf("kind %0d single row change, %0d rows", g, rows));
        end
        ref_sig = ref_misr(NPO, ref_sig, 64'(cut_po(64'(e))));
        prev = pi;
        vecs++;
      end
    end
  end

  initial begin
    #1000000;
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
    check(cyc - t0 == N + 1 + SEEDS * (1 + 2 * N), $sformatf("cycles to done %0d", cyc - t0));
    check(g_kind[0].vecs == SEEDS * 2 * N && g_kind[1].vecs == SEEDS * 2 * N && g_kind[2].vecs == SEEDS * 2 * N, "vector count");
    check(g_kind[0].sig == NPO'(g_kind[0].ref_sig), "LFSR signature");
    check(g_kind[1].sig == NPO'(g_kind[1].ref_sig), "BS-LFSR signature");
    check(g_kind[2].sig == NPO'(g_kind[2].ref_sig), "LP-LFSR signature");
    $display("signatures: LFSR %h BS %h LP %h", g_kind[0].sig, g_kind[1].sig, g_kind[2].sig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
