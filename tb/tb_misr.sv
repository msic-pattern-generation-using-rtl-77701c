// tb_misr: feeds random words into a 7-bit and a 13-bit MISR, with random
// enable, and compares the signature every cycle with the reference; also
// checks clear and reset.
module tb_misr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [6:0] d7, s7;
  logic [12:0] d13, s13;
  int checks = 0, failures = 0;

  misr #(.WIDTH(7))  dut7  (.clk, .rst_n, .clear, .en, .d(d7),  .sig(s7));
  misr #(.WIDTH(13)) dut13 (.clk, .rst_n, .clear, .en, .d(d13), .sig(s13));

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
    logic [63:0] r7, r13;
    r7 = 0; r13 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(s7 == 0 && s13 == 0, "reset");
    for (int n = 0; n < 400; n++) begin
      en = ($urandom_range(3) != 0);
      clear = (n == 200);
      d7 = 7'($urandom); d13 = 13'($urandom);
      @(negedge clk);
      if (clear) begin r7 = 0; r13 = 0; end
      else if (en) begin
        r7 = ref_misr(7, r7, 64'(d7));
        r13 = ref_misr(13, r13, 64'(d13));
      end
      check(s7 == 7'(r7), $sformatf("sig7 cycle %0d", n));
      check(s13 == 13'(r13), $sformatf("sig13 cycle %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
