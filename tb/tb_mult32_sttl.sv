// tb_mult32_sttl: end-to-end test of the 32x32 STTL multiplier at its
// default size.
//
// Each operation precharges (e = 1), checks that the completion pair reports
// "not evaluated", applies the operands, releases the enable (e = 0) and
// checks that completion is reported and that row_s + row_c equals a*b
// modulo 2^64, computed here with a 64-bit multiply. Operands: corner cases
// (zero, one, all ones, single bits, alternating patterns) and random
// values. It also checks the reduction structure against the published cell
// counts (85 (15,4), 46 (7,3), 17 full adders, 60 (4:2) compressors, 1354
// equivalent threshold gates) and the stage heights (10 and 4), and counts
// how often each mechanism occurred: precharge, evaluation with completion,
// all-ones operands (every counter input in use).
module tb_mult32_sttl;
  import mult_pkg::*;

  localparam int NRAND = 20000;

  logic [MULT_N-1:0] a, b;
  logic              e, eb;
  logic [NCOL-1:0]   row_s, row_c;
  logic              e_done, eb_done;

  int checks = 0, failures = 0;
  int n_precharge = 0, n_eval = 0, n_full = 0;

  mult32_sttl dut (
    .a(a), .b(b), .e(e), .eb(eb),
    .row_s(row_s), .row_c(row_c), .e_done(e_done), .eb_done(eb_done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_op(input logic [MULT_N-1:0] x, input logic [MULT_N-1:0] y);
    logic [NCOL-1:0] expect_p, got;
    e = 1'b1; eb = 1'b0;
    a = x; b = y;
    #1;
    check(eb_done == 1'b0 && e_done == 1'b1, "completion low during precharge");
    n_precharge++;
    e = 1'b0; eb = 1'b1;
    #1;
    check(eb_done == 1'b1 && e_done == 1'b0, "completion after evaluation");
    n_eval += int'(eb_done);
    expect_p = NCOL'(x) * NCOL'(y);
    got      = row_s + row_c;
    check(got == expect_p,
          $sformatf("a=%h b=%h rows sum %h expected %h", x, y, got, expect_p));
    if (x == '1 && y == '1) n_full++;
  endtask

  initial begin
    #(10 * (NRAND + 100));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1'b1; eb = 1'b0; a = '0; b = '0;
    #1;

    // Structure of the reduction scheme against the published figures.
    check(total_cells(CELL_C154) == 85, "85 (15,4) counters");
    check(total_cells(CELL_C73)  == 46, "46 (7,3) counters");
    check(total_cells(CELL_FA)   == 17, "17 full adders");
    check(count_compressors(PROF_STAGE3) == 60, "60 (4:2) compressors");
    check(10 * total_cells(CELL_C154) + 5 * total_cells(CELL_C73)
          + 2 * total_cells(CELL_FA) + 4 * count_compressors(PROF_STAGE3) == 1354,
          "1354 equivalent threshold gates");
    check(max_height(PROF_STAGE2) == 10, "Stage II height 10");
    check(max_height(PROF_STAGE3) == 4, "Stage III height 4");

    run_op('0, '0);
    run_op('1, '1);
    run_op('1, 32'd1);
    run_op(32'd1, '1);
    run_op(32'hAAAA_AAAA, 32'h5555_5555);
    run_op(32'hFFFF_0000, 32'h0000_FFFF);
    for (int i = 0; i < MULT_N; i++) begin
      run_op(32'(1) << i, '1);
      run_op('1, 32'(1) << i);
      run_op(32'(1) << i, 32'(1) << (MULT_N - 1 - i));
    end
    for (int n = 0; n < NRAND; n++) begin
      logic [MULT_N-1:0] x, y;
      x = $urandom; y = $urandom;
      // Dense operands exercise tall columns, sparse ones short columns.
      case (n % 4)
        1: begin x = x | $urandom; y = y | $urandom; end
        2: begin x = x & $urandom; y = y & $urandom; end
        default: ;
      endcase
      run_op(x, y);
    end

    $display("mechanisms: precharge=%0d evaluate=%0d all_ones=%0d",
             n_precharge, n_eval, n_full);
    check(n_precharge > 0, "precharge phase exercised");
    check(n_eval > 0, "evaluation with completion exercised");
    check(n_full > 0, "all counter inputs in use exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
