// tb_driver_tps: checks the test-per-scan control sequence cycle by cycle.
// After start: LEN+1 Start-mode Clock2 cycles; per seed one Clock1 cycle and
// 2*LEN times {one Normal-mode Clock2 cycle, LEN Circular-shift Clock2
// cycles with scan shift and MISR, one capture cycle with MISR on the
// primary outputs}; finally LEN unload shifts and done. Tests of 2 and 1
// seeds, with the total cycle count checked.
module tb_driver_tps;
  localparam int L = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_seeds;
  logic clk1_en, clk2_en, rj_mode, init, scan_shift, scan_capture, misr_en, misr_po, busy, done;
  int checks = 0, failures = 0;

  driver_tps #(.LEN(L)) dut (.clk, .rst_n, .start, .n_seeds, .clk1_en, .clk2_en, .rj_mode, .init,
                             .scan_shift, .scan_capture, .misr_en, .misr_po, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // {clk1_en, clk2_en, rj_mode, init, scan_shift, scan_capture, misr_en, misr_po, busy}
  task automatic expect_cycle(logic [8:0] e, string what);
    logic [8:0] g;
    g = {clk1_en, clk2_en, rj_mode, init, scan_shift, scan_capture, misr_en, misr_po, busy};
    check(g == e, $sformatf("%s: got %b exp %b", what, g, e));
  endtask

  task automatic run(int seeds);
    int cycles;
    n_seeds = 16'(seeds);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    for (int c = 0; c <= L; c++) begin expect_cycle(9'b0_1_10_0000_1, "clear"); @(negedge clk); cycles++; end
    for (int s = 0; s < seeds; s++) begin
      expect_cycle(9'b1_0_01_0000_1, "seed"); @(negedge clk); cycles++;
      for (int t = 0; t < 2 * L; t++) begin
        expect_cycle(9'b0_1_01_0000_1, "twist"); @(negedge clk); cycles++;
        for (int h = 0; h < L; h++) begin expect_cycle(9'b0_1_11_1010_1, "shift"); @(negedge clk); cycles++; end
        expect_cycle(9'b0_0_01_0111_1, "capture"); @(negedge clk); cycles++;
      end
    end
    for (int h = 0; h < L; h++) begin expect_cycle(9'b0_0_01_1010_1, "unload"); @(negedge clk); cycles++; end
    check(done && !busy, "done after test");
    check(cycles == L + 1 + seeds * (2 * L * (L + 2) + 1) + L, "cycle count");
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
    check(!busy && !done, "idle after reset");
    run(2);
    repeat (2) @(negedge clk);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
