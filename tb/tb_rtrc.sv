// tb_rtrc: checks the three modes of the reconfigurable twisted ring counter
// (LEN = 6). Normal mode must give 2*LEN distinct vectors, one bit change per
// clock, matching the closed-form sequence; Circular shift must rotate the
// vector and give it back after LEN clocks; Start mode must clear the counter
// from any vector within LEN clocks; en=0 must hold.
module tb_rtrc;
  import tb_ref_pkg::*;

  localparam int L = 6;
  logic clk = 0, rst_n = 0, en = 0, rj_mode = 0, init = 1;
  logic [L-1:0] j;
  int checks = 0, failures = 0;

  rtrc #(.LEN(L)) dut (.clk, .rst_n, .en, .rj_mode, .init, .j);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    en = 1;
    @(negedge clk);
    en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] v, prev;
    automatic bit seen[64] = '{default: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(j == '0, "reset to 0");
    // Normal mode
    rj_mode = 0; init = 1;
    for (int t = 1; t <= 2 * L; t++) begin
      prev = j;
      step();
      check(j == L'(ref_johnson(L, t)), $sformatf("normal step %0d j=%b", t, j));
      check(popcount(64'(j ^ prev)) == 1, "single input change");
      check(!seen[j], "distinct normal vectors");
      seen[j] = 1;
    end
    check(j == '0, "period 2L");
    // Circular shift from each twisted vector
    for (int t = 1; t < 2 * L; t++) begin
      rj_mode = 0; init = 1;
      step();
      v = j;
      rj_mode = 1; init = 1;
      for (int s = 1; s <= L; s++) begin
        prev = j;
        step();
        check(j == {prev[L-2:0], prev[L-1]}, $sformatf("rotate %0d/%0d", t, s));
      end
      check(j == v, "vector back after L rotations");
      // hold
      rj_mode = $urandom_range(1);
      repeat (2) @(negedge clk);
      check(j == v, "hold with en=0");
    end
    // Start mode clears from a non-zero vector
    rj_mode = 0; init = 1;
    repeat (4) step();
    check(j != '0, "non-zero before clear");
    rj_mode = 1; init = 0;
    for (int s = 1; s <= L + 1; s++) begin
      step();
      check((j & L'((1 << s) - 1)) == '0, $sformatf("clear step %0d j=%b", s, j));
    end
    check(j == '0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
