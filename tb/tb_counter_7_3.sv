// tb_counter_7_3: applies all 128 input vectors to the (7,3) counter. In
// precharge all outputs must read 1 and completion must be low; after
// evaluation y must equal the number of ones (counted here bit by bit) and
// completion must be high.
module tb_counter_7_3;
  logic e, eb;
  logic [6:0] x;
  logic [2:0] y;
  logic e_out, eb_out;
  int checks = 0, failures = 0;

  counter_7_3 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < 7; i++) ones += (v >> i) & 1;
      e = 1'b1; eb = 1'b0; x = 7'(v);
      #1;
      check(y == 3'b111 && e_out && !eb_out, $sformatf("precharge x=%b", x));
      e = 1'b0; eb = 1'b1;
      #1;
      check(y == 3'(ones), $sformatf("x=%b y=%0d expected %0d", x, y, ones));
      check(!e_out && eb_out, $sformatf("completion x=%b", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
