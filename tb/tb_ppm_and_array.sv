// tb_ppm_and_array: random operands into the 32x32 AND array. Each bit
// pp[i][j] must be a[j] & b[i], and the rows summed with their shifts must
// give a*b.
module tb_ppm_and_array;
  localparam int N = 32;
  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  ppm_and_array #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [2*N-1:0] acc;
      a = $urandom; b = $urandom;
      if (n == 0) begin a = '1; b = '1; end
      #1;
      acc = '0;
      for (int i = 0; i < N; i++) begin
        acc += {{N{1'b0}}, pp[i]} << i;
        for (int j = 0; j < N; j++) begin
          checks++;
          if (pp[i][j] != (a[j] & b[i])) begin
            failures++;
            if (failures <= 10) $display("FAIL: pp[%0d][%0d]", i, j);
          end
        end
      end
      checks++;
      if (acc != {{N{1'b0}}, a} * {{N{1'b0}}, b}) begin
        failures++;
        if (failures <= 10) $display("FAIL: row sum a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
