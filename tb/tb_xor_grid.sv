// tb_xor_grid: random seeds and counter vectors on a 6 x 6 grid and on a
// 5-column x 3-row grid; every grid output must equal seed bit XOR row bit.
module tb_xor_grid;
  logic [5:0] seed_a, j_a;
  logic [35:0] x_a;
  logic [4:0] seed_b;
  logic [2:0] j_b;
  logic [14:0] x_b;
  int checks = 0, failures = 0;

  xor_grid #(.M(6), .N(6)) dut_a (.seed(seed_a), .j_in(j_a), .x(x_a));
  xor_grid #(.M(5), .N(3)) dut_b (.seed(seed_b), .j_in(j_b), .x(x_b));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [35:0] ea;
      logic [14:0] eb;
      seed_a = 6'($urandom); j_a = 6'($urandom);
      seed_b = 5'($urandom); j_b = 3'($urandom);
      #1;
      for (int r = 0; r < 6; r++) ea[r*6 +: 6] = j_a[r] ? ~seed_a : seed_a;
      for (int r = 0; r < 3; r++) eb[r*5 +: 5] = j_b[r] ? ~seed_b : seed_b;
      checks += 2;
      if (x_a !== ea) begin failures++; $display("FAIL: grid A %h exp %h", x_a, ea); end
      if (x_b !== eb) begin failures++; $display("FAIL: grid B %h exp %h", x_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
