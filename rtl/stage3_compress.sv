// stage3_compress: last reduction stage, from at most 4 bits per column down
// to the two rows that a carry-propagate adder would add.
//
// Every column holding 2 or more bits gets a static (4:2) compressor (empty
// inputs tied to 0); for the 32x32 multiplier these are columns 3..62, 60
// compressors. Compressor c puts its sum into row_s[c] and its carry into
// row_c[c+1]; its cout is the cin of compressor c+1. Columns of 0 or 1 bits
// pass their bit into row_s; the column just above the last compressor takes
// that compressor's cout in row_s and its carry in row_c. The cout chain does
// not ripple (cout is independent of cin). Fully combinational, no enable.
// The use of (4:2) compressors in this stage follows the described scheme;
// the column bookkeeping is this design's.
module stage3_compress
  import mult_pkg::*;
#(
  parameter int PROFILE = PROF_STAGE3
) (
  input  logic [HOUT-1:0] col_in [NCOL],
  output logic [NCOL-1:0] row_s,
  output logic [NCOL-1:0] row_c
);

  logic [NCOL:0] chain;   // chain[c]: cout of column c-1, cin of column c
  logic [NCOL:0] carry;   // carry[c]: carry of column c-1, weight 2^c

  assign chain[0] = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int H    = col_height(PROFILE, c);
    localparam bit USE  = (H >= 2);
    localparam bit PREV = (c > 0) && (col_height(PROFILE, c - 1) >= 2);

    logic [HOUT-1:0] xin;
    for (genvar s = 0; s < HOUT; s++) begin : g_mask
      if (s < H) begin : g_bit
        assign xin[s] = col_in[c][s];
      end else begin : g_zero
        assign xin[s] = 1'b0;
      end
    end

    if (USE) begin : g_cmp
      compressor_4_2 u_cmp (
        .x1(xin[0]), .x2(xin[1]), .x3(xin[2]), .x4(xin[3]), .cin(chain[c]),
        .sum(row_s[c]), .carry(carry[c+1]), .cout(chain[c+1])
      );
      assign row_c[c] = carry[c];
    end else begin : g_pass
      if (PREV && H != 0) begin : g_bad
        $error("stage3_compress: column above a compressor must be empty");
      end
      assign chain[c+1] = 1'b0;
      assign carry[c+1] = 1'b0;
      assign row_s[c]   = PREV ? chain[c] : xin[0];
      assign row_c[c]   = carry[c];
    end
  end

  // Weight 2^(2N): always 0.
  logic unused;
  assign unused = ^{chain[NCOL], carry[NCOL], col_in[0][3:1]};

endmodule
