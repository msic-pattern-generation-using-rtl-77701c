// tb_lp_lfsr: checks the low-power LFSR.
// Instance A starts from 1010_0011 and must reproduce the worked example of
// the scheme: T1 = 10100011, T1k = 101000R1, T2k = 10100001, T3k = RRRR0001,
// T2 = 01010001, with R = 1 (the last bit of T1). Instance B runs 255 LFSR
// steps (1020 patterns) against the reference model and checks that within
// every step each changing bit flips exactly once, so the four output
// transitions of a step add up to the Hamming distance of T1 and T2.
module tb_lp_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] qa, qb;
  logic [1:0] pa, pb;
  int checks = 0, failures = 0;

  lp_lfsr #(.WIDTH(8), .INIT(8'b1010_0011)) dut_a (.clk, .rst_n, .en, .q(qa), .phase(pa));
  lp_lfsr #(.WIDTH(8))                      dut_b (.clk, .rst_n, .en, .q(qb), .phase(pb));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] fig [5];
    logic [7:0] prev;
    int flips, step_flips;
    fig = '{8'b1010_0011, 8'b1010_0011, 8'b1010_0001, 8'b1111_0001, 8'b0101_0001};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(qa == fig[0] && pa == 2'd0, "example T1");
    check(qb == 8'd1, "B reset T1");
    prev = qb;
    step_flips = 0;
    en = 1;
    for (int i = 1; i <= 1020; i++) begin
      @(negedge clk);
      if (i <= 4) check(qa == fig[i], $sformatf("example pattern %0d: %b", i, qa));
      check(pb == 2'(i % 4), "phase");
      check(qb == 8'(ref_seed(2, 8, i)), $sformatf("B pattern %0d: %b exp %b", i, qb, 8'(ref_seed(2, 8, i))));
      flips = popcount(64'(qb ^ prev));
      step_flips += flips;
      if (i % 4 == 0) begin
        logic [7:0] t1, t2;
        t1 = 8'(ref_lfsr(8, i / 4 - 1));
        t2 = 8'(ref_lfsr(8, i / 4));
        check(step_flips == popcount(64'(t1 ^ t2)), $sformatf("step %0d flips %0d", i / 4, step_flips));
        step_flips = 0;
      end
      prev = qb;
    end
    check(qb == 8'd1, "B back to start after 255 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
