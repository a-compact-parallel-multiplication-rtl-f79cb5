// mult_pkg: sizes, cell types and elaboration-time helpers shared by the
// multiplier's reduction stages.
//
// The partial product matrix (PPM) is handled as an array of columns. A
// column is a packed vector of bits of equal weight; its "height" is the
// number of bits in it that can be non-zero. All heights are known when the
// design is elaborated, so the reduction structure is computed here by
// constant functions from the height profile of each stage:
//
//   * cell_for_height() picks the counter for one column. A column of 8..15
//     bits gets a (15,4) counter, 4..7 bits a (7,3) counter, 2..3 bits a full
//     adder, a single bit is passed on a wire. Unused counter inputs are tied
//     to 0. With this rule the 32x32 scheme uses exactly the cell counts of
//     the published comparison: 85 (15,4), 46 (7,3), 17 full adders and 60
//     (4:2) compressors; the rule itself is this design's reading of how
//     those counts arise.
//   * Output bit k of the cell in column c has weight 2^(c+k) and goes to
//     column c+k. Each column holds one cell, so a layer's output is at most
//     4 bits high. out_slot() gives the bit position a contribution takes in
//     its destination column.
//
// A matrix is named by a profile number instead of being passed as an array:
// 0..NGROUPS-1 are the Stage I row groups, PROF_REM the rows Stage I leaves
// alone, PROF_STAGE2 and PROF_STAGE3 the matrices entering those stages.
// col_height(p, c) gives column c's height of profile p in closed form.
package mult_pkg;

  // Operand width of the multiplier and the row grouping of Stage I.
  localparam int MULT_N     = 32;
  localparam int GROUP_ROWS = 15;
  // Product width, and so the number of matrix columns.
  localparam int NCOL = 2 * MULT_N;
  // Tallest column one counter layer accepts (inputs of a (15,4) counter).
  localparam int HMAX = 15;
  // Tallest column a layer produces (outputs of a (15,4) counter).
  localparam int HOUT = 4;
  // Threshold-gate value width: enough for 0..15 plus feedback terms.
  localparam int TL_W = 5;

  typedef enum logic [2:0] {
    CELL_NONE,   // empty column
    CELL_WIRE,   // one bit, passed on unchanged
    CELL_FA,     // (3,2) counter
    CELL_C73,    // (7,3) STTL counter
    CELL_C154    // (15,4) STTL counter
  } cell_e;

  // Stage I: full groups of GROUP_ROWS rows are reduced, the remaining rows
  // (fewer than a group) are carried into Stage II unchanged.
  localparam int NGROUPS  = MULT_N / GROUP_ROWS;
  localparam int REM_ROWS = MULT_N % GROUP_ROWS;

  localparam int PROF_REM    = NGROUPS;
  localparam int PROF_STAGE2 = NGROUPS + 1;
  localparam int PROF_STAGE3 = NGROUPS + 2;

  function automatic cell_e cell_for_height(int h);
    if (h >= 8) return CELL_C154;
    if (h >= 4) return CELL_C73;
    if (h >= 2) return CELL_FA;
    if (h == 1) return CELL_WIRE;
    return CELL_NONE;
  endfunction

  // Number of output bits of a cell.
  function automatic int cell_width(cell_e t);
    case (t)
      CELL_WIRE: return 1;
      CELL_FA:   return 2;
      CELL_C73:  return 3;
      CELL_C154: return 4;
      default:   return 0;
    endcase
  endfunction

  // First row of profile p (a Stage I group or the remainder rows).
  function automatic int rows_first(int p);
    return p * GROUP_ROWS;
  endfunction

  function automatic int rows_last(int p);
    return (p < NGROUPS) ? (p + 1) * GROUP_ROWS - 1 : MULT_N - 1;
  endfunction

  // Lowest row of profile p that has a bit in column c. Row i is a*b[i],
  // shifted left by i, so it covers columns i..i+MULT_N-1.
  function automatic int low_row(int p, int c);
    return (c - (MULT_N - 1) > rows_first(p)) ? c - (MULT_N - 1) : rows_first(p);
  endfunction

  function automatic int high_row(int p, int c);
    return (c < rows_last(p)) ? c : rows_last(p);
  endfunction

  function automatic int rows_height(int p, int c);
    int n;
    n = high_row(p, c) - low_row(p, c) + 1;
    return (n > 0) ? n : 0;
  endfunction

  // The helpers below come in one set per level (Stage I groups, Stage II)
  // so that no function calls itself, directly or through another.

  // Output bits of the Stage I cell in column c of group p.
  function automatic int g_width(int p, int c);
    if (c < 0 || c >= NCOL) return 0;
    return cell_width(cell_for_height(rows_height(p, c)));
  endfunction

  // Bit position, in column c of the layer output, of output bit k of the
  // cell in column c-k. Contributions stack by increasing k.
  function automatic int g_slot(int p, int c, int k);
    int s = 0;
    for (int j = 0; j < k; j++)
      if (g_width(p, c - j) > j) s++;
    return s;
  endfunction

  // First bit position of part g (Stage I group g, or the remainder rows
  // for g == PROF_REM) in Stage II column c; g == PROF_REM + 1 gives the
  // column's full height.
  function automatic int stage2_base(int g, int c);
    int s = 0;
    for (int j = 0; j < g; j++)
      s += (j < NGROUPS) ? g_slot(j, c, HOUT) : rows_height(j, c);
    return s;
  endfunction

  function automatic int s2_height(int c);
    if (c < 0 || c >= NCOL) return 0;
    return stage2_base(PROF_REM + 1, c);
  endfunction

  function automatic int s2_width(int c);
    return cell_width(cell_for_height(s2_height(c)));
  endfunction

  function automatic int s2_slot(int c, int k);
    int s = 0;
    for (int j = 0; j < k; j++)
      if (s2_width(c - j) > j) s++;
    return s;
  endfunction

  // Column c's height in profile p.
  function automatic int col_height(int p, int c);
    if (c < 0 || c >= NCOL) return 0;
    if (p <= PROF_REM)    return rows_height(p, c);
    if (p == PROF_STAGE2) return s2_height(c);
    return s2_slot(c, HOUT);
  endfunction

  // Slot of output bit k of the cell in column c-k, for a counter layer over
  // profile p (a Stage I group or the Stage II matrix).
  function automatic int out_slot(int p, int c, int k);
    if (p < NGROUPS) return g_slot(p, c, k);
    return s2_slot(c, k);
  endfunction

  // Height of column c after one counter layer over profile p.
  function automatic int out_height(int p, int c);
    return out_slot(p, c, HOUT);
  endfunction

  function automatic int max_height(int p);
    int m = 0;
    for (int c = 0; c < NCOL; c++) if (col_height(p, c) > m) m = col_height(p, c);
    return m;
  endfunction

  // Cells of type t in one layer over profile p.
  function automatic int count_cells(int p, cell_e t);
    int n = 0;
    for (int c = 0; c < NCOL; c++) if (cell_for_height(col_height(p, c)) == t) n++;
    return n;
  endfunction

  // Cells of type t in the whole of Stage I and Stage II.
  function automatic int total_cells(cell_e t);
    int n = 0;
    for (int g = 0; g < NGROUPS; g++) n += count_cells(g, t);
    return n + count_cells(PROF_STAGE2, t);
  endfunction

  // Stage III: a column gets a (4:2) compressor when it holds 2 or more bits.
  function automatic bit uses_compressor(int p, int c);
    return col_height(p, c) >= 2;
  endfunction

  function automatic int count_compressors(int p);
    int n = 0;
    for (int c = 0; c < NCOL; c++) if (col_height(p, c) >= 2) n++;
    return n;
  endfunction

endpackage
