// tb_driver_tpc: checks the test-per-clock control sequence cycle by cycle.
// After start: N+1 cycles of Start-mode Clock2, then per seed one Clock1
// cycle followed by 2N Normal-mode Clock2 cycles with vec_valid, then done.
// Runs tests of 3, 1 and 0 seeds and checks the total cycle count of each.
module tb_driver_tpc;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_seeds;
  logic clk1_en, clk2_en, rj_mode, init, vec_valid, busy, done;
  int checks = 0, failures = 0;

  driver_tpc #(.N(N)) dut (.clk, .rst_n, .start, .n_seeds, .clk1_en, .clk2_en,
                           .rj_mode, .init, .vec_valid, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected outputs {clk1_en, clk2_en, rj_mode, init, vec_valid, busy}
  task automatic expect_cycle(logic [5:0] e, string what);
    check({clk1_en, clk2_en, rj_mode, init, vec_valid, busy} == e,
          $sformatf("%s: got %b exp %b", what, {clk1_en, clk2_en, rj_mode, init, vec_valid, busy}, e));
  endtask

  task automatic run(int seeds);
    int cycles;
    n_seeds = 16'(seeds);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    for (int c = 0; c <= N; c++) begin expect_cycle(6'b011001, "clear"); @(negedge clk); cycles++; end
    for (int s = 0; s < seeds; s++) begin
      expect_cycle(6'b100101, "seed"); @(negedge clk); cycles++;
      for (int v = 0; v < 2 * N; v++) begin expect_cycle(6'b010111, "run"); @(negedge clk); cycles++; end
    end
    check(done && !busy, "done after test");
    check(cycles == N + 1 + seeds * (1 + 2 * N), "cycle count");
    repeat (3) @(negedge clk);
    check(done && !clk1_en && !clk2_en, "done holds, generator idle");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_seeds = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && !clk1_en && !clk2_en, "idle after reset");
    run(3);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
