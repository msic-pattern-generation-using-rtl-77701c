// tb_scan_chains: 6 chains of 5 cells. Random shift, capture and idle cycles
// against an array model of the chains; cells and scan-outs checked every
// cycle.
module tb_scan_chains;
  localparam int C = 6, L = 5;
  logic clk = 0, rst_n = 0, shift = 0, capture = 0;
  logic [C-1:0] scan_in, scan_out;
  logic [C*L-1:0] cap_d, cells;
  int checks = 0, failures = 0;

  scan_chains #(.CHAINS(C), .LEN(L)) dut (.clk, .rst_n, .shift, .capture, .scan_in, .cap_d, .scan_out, .cells);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m [C][L];
    for (int k = 0; k < C; k++) for (int i = 0; i < L; i++) m[k][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int op;
      op = $urandom_range(3);
      shift = (op == 1 || op == 2);
      capture = (op == 3);
      scan_in = C'($urandom);
      cap_d = (C*L)'({$urandom, $urandom});
      @(negedge clk);
      for (int k = 0; k < C; k++) begin
        if (shift) begin
          for (int i = L - 1; i > 0; i--) m[k][i] = m[k][i-1];
          m[k][0] = scan_in[k];
        end else if (capture) begin
          for (int i = 0; i < L; i++) m[k][i] = cap_d[k*L + i];
        end
      end
      for (int k = 0; k < C; k++) begin
        for (int i = 0; i < L; i++) begin
          checks++;
          if (cells[k*L + i] !== m[k][i]) begin
            failures++;
            $display("FAIL: cycle %0d chain %0d cell %0d", n, k, i);
          end
        end
        checks++;
        if (scan_out[k] !== m[k][L-1]) begin failures++; $display("FAIL: scan_out %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
