// tb_stage3_compress: random bits in the Stage III matrix (column heights
// of the 32x32 scheme, at most 4). The two output rows added together must
// equal the weighted sum of the input bits modulo 2^64. Also checks that the
// stage uses 60 compressors and that the matrix is at most 4 bits high.
module tb_stage3_compress;
  import mult_pkg::*;

  logic [HOUT-1:0] col_in [NCOL];
  logic [NCOL-1:0] row_s, row_c;
  int checks = 0, failures = 0;

  stage3_compress #(.PROFILE(PROF_STAGE3)) dut (.*);

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
    check(count_compressors(PROF_STAGE3) == 60, "60 compressors");
    check(max_height(PROF_STAGE3) == 4, "height 4");
    for (int n = 0; n < 5000; n++) begin
      logic [NCOL-1:0] sum_in, sum_out;
      sum_in = '0;
      for (int c = 0; c < NCOL; c++) begin
        col_in[c] = HOUT'($urandom);
        if (n == 0) col_in[c] = '1;
        for (int s = 0; s < col_height(PROF_STAGE3, c); s++)
          sum_in += NCOL'(col_in[c][s]) << c;
      end
      #1;
      sum_out = row_s + row_c;
      check(sum_out == sum_in, $sformatf("rows %h expected %h", sum_out, sum_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
