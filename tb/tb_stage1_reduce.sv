// tb_stage1_reduce: random partial product matrices (each bit random, not
// only AND-array patterns) into Stage I. After evaluation completion must be
// high, no column may hold bits above position 9 (the Stage II height of
// 10), and the weighted sum of the Stage II matrix must equal the weighted
// sum of the input rows. In precharge completion must be low.
module tb_stage1_reduce;
  import mult_pkg::*;

  logic              e, eb;
  logic [MULT_N-1:0] pp      [MULT_N];
  logic [HMAX-1:0]   col_out [NCOL];
  logic              e_done, eb_done;
  int checks = 0, failures = 0;

  stage1_reduce dut (.*);

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
    for (int n = 0; n < 3000; n++) begin
      logic [NCOL+5:0] sum_in, sum_out;
      bit tall;
      sum_in = '0;
      for (int i = 0; i < MULT_N; i++) begin
        pp[i] = $urandom;
        if (n == 0) pp[i] = '1;
        if (n % 3 == 1) pp[i] = pp[i] | $urandom;
        sum_in += (NCOL+6)'(pp[i]) << i;
      end
      e = 1'b1; eb = 1'b0;
      #1;
      check(!eb_done && e_done, "completion low during precharge");
      e = 1'b0; eb = 1'b1;
      #1;
      check(eb_done && !e_done, "completion after evaluation");
      sum_out = '0;
      tall = 1'b0;
      for (int c = 0; c < NCOL; c++)
        for (int s = 0; s < HMAX; s++) begin
          sum_out += (NCOL+6)'(col_out[c][s]) << c;
          if (s >= 10 && col_out[c][s]) tall = 1'b1;
        end
      check(!tall, "Stage II column taller than 10");
      check(sum_out == sum_in, $sformatf("weighted sum %h expected %h", sum_out, sum_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
