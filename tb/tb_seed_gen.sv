// tb_seed_gen: runs the seed circuit in all three kinds (LFSR, bit-swapping,
// low-power; 6 bits) for 100 Clock1 pulses, with idle cycles in between,
// and compares every seed with the reference sequences.
module tb_seed_gen;
  import tb_ref_pkg::*;
  import msic_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [5:0] s_lfsr, s_bs, s_lp;
  int checks = 0, failures = 0;

  seed_gen #(.KIND(SEED_LFSR), .WIDTH(6)) dut_l (.clk, .rst_n, .en, .seed(s_lfsr));
  seed_gen #(.KIND(SEED_BS),   .WIDTH(6)) dut_b (.clk, .rst_n, .en, .seed(s_bs));
  seed_gen #(.KIND(SEED_LP),   .WIDTH(6)) dut_p (.clk, .rst_n, .en, .seed(s_lp));

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i <= 100; i++) begin
      @(negedge clk);
      check(s_lfsr == 6'(ref_seed(0, 6, i)), $sformatf("LFSR seed %0d", i));
      check(s_bs   == 6'(ref_seed(1, 6, i)), $sformatf("BS seed %0d", i));
      check(s_lp   == 6'(ref_seed(2, 6, i)), $sformatf("LP seed %0d", i));
      en = 1;
      @(negedge clk);
      en = 0;
      repeat (i % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
