// tb_ri_cell: exhaustive check of the R-injector: equal inputs pass through,
// different inputs give the injected value.
module tb_ri_cell;
  logic d, q, r_sel, r;
  int checks = 0, failures = 0;

  ri_cell dut (.d, .q, .r_sel, .r);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {d, q, r_sel} = 3'(v);
      #1;
      exp = (v[2] == v[1]) ? v[1] : v[0];
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL: d=%b q=%b sel=%b r=%b", d, q, r_sel, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
