// stage1_reduce: first reduction stage of the 32x32 multiplier.
//
// The N rows of the partial product matrix are split into groups of
// GROUP_ROWS consecutive rows: rows 0-14 and 15-29 for N = 32. Each full
// group is reduced on its own by one counter layer (reduce_layer) to at most
// 4 bits per column. The rows left over (30 and 31) are carried on
// unchanged. The results are stacked column by column into the Stage II
// matrix, whose tallest column is 4 + 4 + 2 = 10 bits. In column c, group
// g's bits start at stage2_base(g, c).
//
// Interface: pp[i][j] has weight 2^(i+j); col_out[c] holds the Stage II
// bits of weight 2^c in its low col_height(PROF_STAGE2, c) positions, the
// rest 0. Timing: all group layers share the enable e/eb; eb_done rises
// once every counter of the stage has evaluated. The grouping follows the
// described reduction scheme (it gives the described cell counts).
module stage1_reduce
  import mult_pkg::*;
(
  input  logic              e,
  input  logic              eb,
  input  logic [MULT_N-1:0] pp      [MULT_N],
  output logic [HMAX-1:0]   col_out [NCOL],
  output logic              e_done,
  output logic              eb_done
);

  if (max_height(PROF_STAGE2) > HMAX || HOUT * NGROUPS + REM_ROWS > HMAX) begin : g_check
    $error("stage1_reduce: Stage II matrix too tall for one counter layer");
  end

  // gcol[g]: the matrix of group g (g == PROF_REM: the rows left over).
  logic [HMAX-1:0] gcol [PROF_REM+1][NCOL];

  for (genvar i = 0; i < MULT_N; i++) begin : g_row
    for (genvar j = 0; j < MULT_N; j++) begin : g_bit
      localparam int G    = (i / GROUP_ROWS < NGROUPS) ? i / GROUP_ROWS : PROF_REM;
      localparam int SLOT = i - low_row(G, i + j);
      assign gcol[G][i+j][SLOT] = pp[i][j];
    end
  end
  for (genvar g = 0; g <= PROF_REM; g++) begin : g_grp_pad
    for (genvar c = 0; c < NCOL; c++) begin : g_col
      for (genvar s = rows_height(g, c); s < HMAX; s++) begin : g_pad
        assign gcol[g][c][s] = 1'b0;
      end
    end
  end

  logic [HOUT-1:0]    gout [NGROUPS][NCOL];
  logic [NGROUPS-1:0] g_e, g_eb;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_layer
    reduce_layer #(.PROFILE(g)) u_layer (
      .e(e), .eb(eb), .col_in(gcol[g]), .col_out(gout[g]),
      .e_done(g_e[g]), .eb_done(g_eb[g])
    );
  end

  // Stack the group results and the carried rows into the Stage II matrix.
  for (genvar c = 0; c < NCOL; c++) begin : g_merge
    for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
      localparam int BASE = stage2_base(g, c);
      for (genvar s = 0; s < out_height(g, c); s++) begin : g_bit
        assign col_out[c][BASE + s] = gout[g][c][s];
      end
    end
    localparam int REM_BASE = stage2_base(PROF_REM, c);
    for (genvar s = 0; s < rows_height(PROF_REM, c); s++) begin : g_rem
      assign col_out[c][REM_BASE + s] = gcol[PROF_REM][c][s];
    end
    for (genvar s = s2_height(c); s < HMAX; s++) begin : g_pad
      assign col_out[c][s] = 1'b0;
    end
  end

  assign eb_done = &g_eb;
  assign e_done  = ~eb_done;

  logic unused;
  assign unused = ^g_e;

endmodule
