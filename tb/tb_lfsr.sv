// tb_lfsr: checks the conventional LFSR against the reference model.
// Runs a 6-bit and an 8-bit register through a whole period: every state
// must match the reference, the period must be 2**W-1 with no repeat before,
// and en=0 must hold the state.
module tb_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [5:0] q6;
  logic [7:0] q8;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(6)) dut6 (.clk, .rst_n, .en, .q(q6));
  lfsr #(.WIDTH(8)) dut8 (.clk, .rst_n, .en, .q(q8));

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
    automatic bit seen6[64] = '{default: 1'b0};
    automatic bit seen8[256] = '{default: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q6 == 6'd1 && q8 == 8'd1, "reset value");
    en = 1;
    for (int i = 1; i <= 255; i++) begin
      @(negedge clk);
      if (i <= 63) begin
        check(q6 == 6'(ref_lfsr(6, i)), $sformatf("w6 step %0d q=%h", i, q6));
        if (i < 63) begin
          check(!seen6[q6] && q6 != 6'd1, $sformatf("w6 repeat at %0d", i));
          seen6[q6] = 1;
        end else check(q6 == 6'd1, "w6 period 63");
      end
      check(q8 == 8'(ref_lfsr(8, i)), $sformatf("w8 step %0d q=%h", i, q8));
      if (i < 255) begin
        check(!seen8[q8] && q8 != 8'd1, $sformatf("w8 repeat at %0d", i));
        seen8[q8] = 1;
      end else check(q8 == 8'd1, "w8 period 255");
    end
    en = 0;
    repeat (3) @(negedge clk);
    check(q8 == 8'd1 && q6 == 6'(ref_lfsr(6, 255)), "hold with en=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
