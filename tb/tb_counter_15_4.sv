// tb_counter_15_4: applies all 32768 input vectors to the (15,4) counter.
// In precharge all outputs must read 1 and completion must be low; after
// evaluation y must equal the number of ones and completion must be high.
module tb_counter_15_4;
  logic e, eb;
  logic [14:0] x;
  logic [3:0] y;
  logic e_out, eb_out;
  int checks = 0, failures = 0;

  counter_15_4 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < 15; i++) ones += (v >> i) & 1;
      e = 1'b1; eb = 1'b0; x = 15'(v);
      #1;
      check(y == 4'b1111 && e_out && !eb_out, $sformatf("precharge x=%b", x));
      e = 1'b0; eb = 1'b1;
      #1;
      check(y == 4'(ones), $sformatf("x=%b y=%0d expected %0d", x, y, ones));
      check(!e_out && eb_out, $sformatf("completion x=%b", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
