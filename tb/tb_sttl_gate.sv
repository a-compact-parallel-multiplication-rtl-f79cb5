// tb_sttl_gate: checks the STTL gate model over all values of a 4-bit sum
// and threshold in both phases. Precharge (e = 1) must give q = qb = 1 and
// next-stage enables e_next = 1, eb_next = 0. Evaluate (e = 0) must give
// q = (i1 >= i2), qb = !q, e_next = 0, eb_next = 1.
module tb_sttl_gate;
  localparam int W = 5;
  logic e, eb;
  logic [W-1:0] i1, i2;
  logic q, qb, e_next, eb_next;
  int checks = 0, failures = 0;

  sttl_gate #(.W(W)) dut (.*);

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
    for (int x = 0; x < 16; x++) begin
      for (int t = 0; t < 16; t++) begin
        i1 = W'(x); i2 = W'(t);
        e = 1'b1; eb = 1'b0;
        #1;
        check(q && qb && e_next && !eb_next, $sformatf("precharge x=%0d t=%0d", x, t));
        e = 1'b0; eb = 1'b1;
        #1;
        check(q == (x >= t) && qb == (x < t), $sformatf("evaluate x=%0d t=%0d q=%b", x, t, q));
        check(!e_next && eb_next, $sformatf("enable out x=%0d t=%0d", x, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
