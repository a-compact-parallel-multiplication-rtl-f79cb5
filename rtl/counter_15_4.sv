// counter_15_4: (15,4) parallel counter built as a depth-2 network of STTL
// gates (Minnick structure).
//
// y = number of ones in x, as a 4-bit binary number. The fifteen inputs,
// each of weight 1, are summed once (v) and v is the I1 input of every
// gate. The first layer has seven gates with thresholds 2, 4, ..., 14
// (written 2+ ... 14+); 8+ is the MSB y3. The second layer computes
//   y2 = [v - 4 - 8*(8+) >= 0]
//   y1 = [v - 2 - 4*(4+) - 4*(8+) - 4*(12+) >= 0]
//   y0 = [v - 1 - 2*(2+) - 2*(4+) - ... - 2*(14+) >= 0]
// with the negatively weighted first-layer outputs added on the threshold
// side (I2) of the second-layer gates.
//
// Interface and timing: e/eb is the dual-rail enable of the first layer
// (e = 1 precharges). The enable pair produced by the 8+ gate enables all
// three second-layer gates. eb_out goes high once all second-layer gates
// have evaluated; during precharge all outputs read 1. All seven first-layer
// gates are built even when a column leaves inputs at 0. Thresholds and
// weights follow the described counter; the choice of the 8+ gate as enable
// source and the completion rule are this design's choices.
module counter_15_4
  import mult_pkg::*;
(
  input  logic        e,
  input  logic        eb,
  input  logic [14:0] x,
  output logic [3:0]  y,
  output logic        e_out,
  output logic        eb_out
);
  localparam int unsigned W = mult_pkg::TL_W;

  logic [W-1:0] v;
  always_comb begin
    v = '0;
    for (int i = 0; i < 15; i++) v += W'(x[i]);
  end

  // First layer: q1[k] is the output of the gate with threshold 2*(k+1).
  logic [6:0] q1, q1b, e1, eb1;
  for (genvar k = 0; k < 7; k++) begin : g_l1
    sttl_gate #(.W(W)) u_gate (
      .e(e), .eb(eb), .i1(v), .i2(W'(2 * (k + 1))),
      .q(q1[k]), .qb(q1b[k]), .e_next(e1[k]), .eb_next(eb1[k])
    );
  end

  // Threshold side of the second layer: base threshold plus the negatively
  // weighted first-layer outputs.
  logic [W-1:0] t_y [3];
  always_comb begin
    t_y[2] = W'(4) + W'(8) * W'(q1[3]);
    t_y[1] = W'(2) + W'(4) * (W'(q1[1]) + W'(q1[3]) + W'(q1[5]));
    t_y[0] = W'(1);
    for (int k = 0; k < 7; k++) t_y[0] += W'(2) * W'(q1[k]);
  end

  logic [2:0] q2, q2b, e2, eb2;
  for (genvar k = 0; k < 3; k++) begin : g_l2
    sttl_gate #(.W(W)) u_gate (
      .e(e1[3]), .eb(eb1[3]), .i1(v), .i2(t_y[k]),
      .q(q2[k]), .qb(q2b[k]), .e_next(e2[k]), .eb_next(eb2[k])
    );
  end

  assign y      = {q1[3], q2};
  assign eb_out = &eb2;
  assign e_out  = ~eb_out;

  logic unused;
  assign unused = ^{q1b, e1[2:0], e1[6:4], eb1[2:0], eb1[6:4], q2b, e2};

endmodule
