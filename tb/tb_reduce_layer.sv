// tb_reduce_layer: one counter layer over its default matrix, the Stage I
// group of rows 0-14 (column c holds min(c+1, 15, 46-c) bits). Random bits
// fill the columns. Checks: the height profile the layer uses matches that
// formula; in precharge completion is low; after evaluation completion is
// high, no output column has a bit above the 4 allowed, and the weighted
// sum of the outputs equals the weighted sum of the inputs. Dense inputs
// (all ones) are included so that every counter sees its largest count.
module tb_reduce_layer;
  import mult_pkg::*;

  logic            e, eb;
  logic [HMAX-1:0] col_in  [NCOL];
  logic [HOUT-1:0] col_out [NCOL];
  logic            e_done, eb_done;
  int checks = 0, failures = 0;

  reduce_layer #(.PROFILE(0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int group0_height(int c);
    int h;
    h = c + 1;
    if (h > GROUP_ROWS) h = GROUP_ROWS;
    if (46 - c < h) h = 46 - c;
    return (h > 0) ? h : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCOL; c++)
      check(col_height(0, c) == group0_height(c), $sformatf("height of column %0d", c));

    for (int n = 0; n < 3000; n++) begin
      logic [NCOL+3:0] sum_in, sum_out;
      sum_in = '0;
      for (int c = 0; c < NCOL; c++) begin
        logic [HMAX-1:0] bits;
        bits = HMAX'($urandom);
        if (n == 0) bits = '1;
        if (n % 3 == 1) bits = bits | HMAX'($urandom);
        col_in[c] = bits;   // bits above the column's height must be ignored
        for (int s = 0; s < group0_height(c); s++)
          sum_in += (NCOL+4)'(bits[s]) << c;
      end
      e = 1'b1; eb = 1'b0;
      #1;
      check(!eb_done && e_done, "completion low during precharge");
      e = 1'b0; eb = 1'b1;
      #1;
      check(eb_done && !e_done, "completion after evaluation");
      sum_out = '0;
      for (int c = 0; c < NCOL; c++)
        for (int s = 0; s < HOUT; s++)
          sum_out += (NCOL+4)'(col_out[c][s]) << c;
      check(sum_out == sum_in, $sformatf("weighted sum %h expected %h", sum_out, sum_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
