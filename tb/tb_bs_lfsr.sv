// tb_bs_lfsr: checks the 4-bit bit-swapping LFSR.
// Over a full period the register must follow the reference LFSR, the
// outputs must equal the register when the last stage is 0 and the
// pair-swapped register when it is 1. Over the period the swapped outputs
// must show fewer bit transitions than the register itself. Because the
// select bit is itself one of the swapped bits, two register states can give
// the same output; the number of distinct outputs is reported.
module tb_bs_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] q, state;
  int checks = 0, failures = 0;

  bs_lfsr dut (.clk, .rst_n, .en, .q, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit seen[16] = '{default: 1'b0};
    automatic int tq = 0, ts = 0, distinct = 0;
    logic [3:0] pq, ps;
    repeat (2) @(posedge clk);
    rst_n = 1;
    en = 1;
    for (int i = 0; i < 15; i++) begin
      @(negedge clk);
      // values printed after i+1 steps
      check(state == 4'(ref_lfsr(4, i + 1)), $sformatf("state step %0d", i + 1));
      check(q == 4'(ref_swap(4, ref_lfsr(4, i + 1))), $sformatf("q step %0d q=%b s=%b", i + 1, q, state));
      if (state[0] == 1'b0) check(q == state, "no swap when last stage is 0");
      else check(q == {state[2], state[3], state[0], state[1]}, "pair swap when last stage is 1");
      if (!seen[q]) distinct++;
      seen[q] = 1;
      if (i > 0) begin
        tq += popcount(64'(q ^ pq));
        ts += popcount(64'(state ^ ps));
      end
      pq = q;
      ps = state;
    end
    $display("transitions over one period: swapped outputs %0d, register %0d; %0d distinct outputs", tq, ts, distinct);
    check(tq < ts, "bit swapping reduces transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
