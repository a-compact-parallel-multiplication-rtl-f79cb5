// mult32_sttl: 32x32 unsigned multiplier array whose partial product matrix
// is reduced by self-timed threshold logic (STTL) counters in three stages.
//
//   AND array  -> 32 rows of 32 bits (ppm_and_array)
//   Stage I    -> rows 0-14 and 15-29 each reduced by (15,4), (7,3)
//                 counters and full adders; rows 30-31 carried: the matrix
//                 is then at most 10 bits high (stage1_reduce)
//   Stage II   -> one more counter layer: at most 4 bits high (reduce_layer)
//   Stage III  -> a row of 60 static (4:2) compressors: two rows
//                 (stage3_compress)
// row_s + row_c (mod 2^64) is the product a*b. The final carry-propagate
// adder is not part of this block.
//
// Cell totals: 85 (15,4) counters, 46 (7,3) counters, 17 full adders and
// 60 (4:2) compressors, as in the published comparison. Each STTL counter
// has a logic depth of two threshold gates, so the two counter stages are
// four gate delays, and the compressors add less than two more.
//
// Timing: there is no clock. e/eb is the dual-rail enable of Stage I. While
// e = 1 (eb = 0) all STTL gates precharge; on e = 0, eb = 1 Stage I
// evaluates, its completion enables Stage II, and eb_done = 1 / e_done = 0
// signal that Stage II has evaluated. row_s/row_c are valid from then on
// until the next precharge. Return e to 1 to start the next operation.
module mult32_sttl
  import mult_pkg::*;
(
  input  logic [MULT_N-1:0] a,
  input  logic [MULT_N-1:0] b,
  input  logic              e,
  input  logic              eb,
  output logic [NCOL-1:0]   row_s,
  output logic [NCOL-1:0]   row_c,
  output logic              e_done,
  output logic              eb_done
);

  logic [MULT_N-1:0] pp      [MULT_N];
  logic [HMAX-1:0]   s2_cols [NCOL];
  logic [HOUT-1:0]   s3_cols [NCOL];
  logic              s1_e, s1_eb;

  ppm_and_array #(.N(MULT_N)) u_ppm (.a(a), .b(b), .pp(pp));

  stage1_reduce u_stage1 (
    .e(e), .eb(eb), .pp(pp), .col_out(s2_cols), .e_done(s1_e), .eb_done(s1_eb)
  );

  reduce_layer #(.PROFILE(PROF_STAGE2)) u_stage2 (
    .e(s1_e), .eb(s1_eb), .col_in(s2_cols), .col_out(s3_cols),
    .e_done(e_done), .eb_done(eb_done)
  );

  stage3_compress #(.PROFILE(PROF_STAGE3)) u_stage3 (
    .col_in(s3_cols), .row_s(row_s), .row_c(row_c)
  );

endmodule
