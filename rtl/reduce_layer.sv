// reduce_layer: one layer of column compression of the partial product
// matrix, as used by Stage I (once per row group) and by Stage II.
//
// The input matrix is given column by column: col_in[c] holds the bits of
// weight 2^c, of which the lowest col_height(PROFILE, c) can be non-zero
// (higher bits are masked to 0 here). Every column gets exactly one cell,
// chosen by its height: a (15,4) STTL counter for 8..15 bits, a (7,3) STTL
// counter for 4..7, a full adder for 2..3, a wire for a single bit. Unused
// counter inputs are tied to 0. Output bit k of the cell in column c goes to
// column c+k of col_out, stacked in order of increasing k, so no output
// column is taller than 4 bits. Bits that would land beyond the product
// width are dropped: their weight is 2^(2N) or more and they are always 0.
//
// Timing: the STTL counters of the layer share the dual-rail enable e/eb.
// eb_done rises (and e_done falls) once every counter of the layer has
// evaluated, which is the enable the next STTL stage needs; full adders and
// wires are static and take no part. A layer without counters passes e/eb
// on. The cell-choice rule reproduces the described cell counts; the
// completion rule (all counters of the stage must have evaluated) is this
// design's choice.
module reduce_layer
  import mult_pkg::*;
#(
  parameter int PROFILE = 0    // matrix profile number (see mult_pkg)
) (
  input  logic            e,
  input  logic            eb,
  input  logic [HMAX-1:0] col_in  [NCOL],
  output logic [HOUT-1:0] col_out [NCOL],
  output logic            e_done,
  output logic            eb_done
);

  logic [HOUT-1:0] cy     [NCOL];   // cell outputs; bit k has weight 2^(c+k)
  logic [NCOL-1:0] col_eb;          // per column: counter has evaluated
  logic [NCOL-1:0] col_e;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int    H    = col_height(PROFILE, c);
    localparam cell_e CELL = cell_for_height(H);

    if (H > HMAX) begin : g_too_tall
      $error("reduce_layer: column taller than a (15,4) counter");
    end

    logic [HMAX-1:0] xin;
    for (genvar s = 0; s < HMAX; s++) begin : g_mask
      if (s < H) begin : g_bit
        assign xin[s] = col_in[c][s];
      end else begin : g_zero
        assign xin[s] = 1'b0;
      end
    end

    if (CELL == CELL_C154) begin : g_c154
      counter_15_4 u_cnt (
        .e(e), .eb(eb), .x(xin[14:0]), .y(cy[c]),
        .e_out(col_e[c]), .eb_out(col_eb[c])
      );
    end else if (CELL == CELL_C73) begin : g_c73
      counter_7_3 u_cnt (
        .e(e), .eb(eb), .x(xin[6:0]), .y(cy[c][2:0]),
        .e_out(col_e[c]), .eb_out(col_eb[c])
      );
      assign cy[c][3] = 1'b0;
    end else if (CELL == CELL_FA) begin : g_fa
      full_adder u_fa (
        .a(xin[0]), .b(xin[1]), .ci(xin[2]), .s(cy[c][0]), .co(cy[c][1])
      );
      assign cy[c][3:2] = '0;
      assign col_eb[c]  = 1'b1;
      assign col_e[c]   = 1'b0;
    end else begin : g_wire
      assign cy[c]     = {3'b000, xin[0]};
      assign col_eb[c] = 1'b1;
      assign col_e[c]  = 1'b0;
    end

    // Route the cell outputs of columns c, c-1, c-2, c-3 into column c.
    localparam int OH = out_height(PROFILE, c);
    for (genvar k = 0; k < HOUT; k++) begin : g_in
      if (c - k >= 0) begin : g_src
        localparam int SW = cell_width(cell_for_height(col_height(PROFILE, c - k)));
        localparam int SLOT = out_slot(PROFILE, c, k);
        if (SW > k) begin : g_take
          assign col_out[c][SLOT] = cy[c-k][k];
        end
      end
    end
    for (genvar s = OH; s < HOUT; s++) begin : g_pad
      assign col_out[c][s] = 1'b0;
    end
  end

  assign eb_done = eb & (&col_eb);
  assign e_done  = ~eb_done;

  // col_e mirrors col_eb; the top cell outputs fall outside the product.
  logic unused;
  assign unused = ^{col_e, cy[NCOL-1][3:1], cy[NCOL-2][3:2], cy[NCOL-3][3]};

endmodule
