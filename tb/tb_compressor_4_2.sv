// tb_compressor_4_2: exhaustive check of the (4:2) compressor over its 32
// input combinations: sum + 2*(carry + cout) must equal the number of ones
// among x1..x4 and cin, and cout must not depend on cin.
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      {x1, x2, x3, x4} = 4'(v);
      for (int c = 0; c < 2; c++) begin
        int ones;
        cin = 1'(c);
        #1;
        ones = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
        check(int'(sum) + 2 * (int'(carry) + int'(cout)) == ones,
              $sformatf("x=%b cin=%b -> sum=%b carry=%b cout=%b", 4'(v), cin, sum, carry, cout));
        if (c == 0) cout0 = cout;
        else check(cout == cout0, $sformatf("cout depends on cin for x=%b", 4'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
