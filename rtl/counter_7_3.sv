// counter_7_3: (7,3) parallel counter built as a depth-2 network of STTL
// gates (Minnick structure).
//
// y = number of ones in x, as a 3-bit binary number. The seven inputs, each
// of weight 1, are summed once (v, the shared capacitive network) and v is
// the I1 input of every gate. The first layer holds gates with thresholds
// 2, 4 and 6 (written 2+, 4+, 6+); 4+ is already the MSB y2. The second layer
// computes
//   y1 = [v - 2 - 4*(4+) >= 0]
//   y0 = [v - 1 - 2*(2+) - 2*(4+) - 2*(6+) >= 0]
// where the negatively weighted first-layer outputs raise the threshold
// side (I2) of the second-layer gates.
//
// Interface and timing: e/eb is the dual-rail enable of the first layer
// (e = 1 precharges). The enable pair produced by the 4+ gate enables both
// second-layer gates, so they evaluate only after the first layer has. The
// counter's completion pair e_out/eb_out goes to evaluated (eb_out = 1) when
// both second-layer gates have evaluated; during precharge all outputs read
// 1. The gate thresholds and weights follow the described counter; which
// first-layer gate supplies the second-layer enable, and how completion is
// formed, are this design's choices.
module counter_7_3
  import mult_pkg::*;
(
  input  logic       e,
  input  logic       eb,
  input  logic [6:0] x,
  output logic [2:0] y,
  output logic       e_out,
  output logic       eb_out
);
  localparam int unsigned W = mult_pkg::TL_W;

  logic [W-1:0] v;
  always_comb begin
    v = '0;
    for (int i = 0; i < 7; i++) v += W'(x[i]);
  end

  // First layer: q1[k] is the output of the gate with threshold 2*(k+1).
  logic [2:0] q1, q1b, e1, eb1;
  for (genvar k = 0; k < 3; k++) begin : g_l1
    sttl_gate #(.W(W)) u_gate (
      .e(e), .eb(eb), .i1(v), .i2(W'(2 * (k + 1))),
      .q(q1[k]), .qb(q1b[k]), .e_next(e1[k]), .eb_next(eb1[k])
    );
  end

  // Second layer, enabled by the 4+ gate.
  logic [W-1:0] t_y1, t_y0;
  assign t_y1 = W'(2) + W'(4) * W'(q1[1]);
  assign t_y0 = W'(1) + W'(2) * (W'(q1[0]) + W'(q1[1]) + W'(q1[2]));

  logic q_y1, qb_y1, e_y1, eb_y1;
  logic q_y0, qb_y0, e_y0, eb_y0;

  sttl_gate #(.W(W)) u_y1 (
    .e(e1[1]), .eb(eb1[1]), .i1(v), .i2(t_y1),
    .q(q_y1), .qb(qb_y1), .e_next(e_y1), .eb_next(eb_y1)
  );
  sttl_gate #(.W(W)) u_y0 (
    .e(e1[1]), .eb(eb1[1]), .i1(v), .i2(t_y0),
    .q(q_y0), .qb(qb_y0), .e_next(e_y0), .eb_next(eb_y0)
  );

  assign y      = {q1[1], q_y1, q_y0};
  assign eb_out = eb_y1 & eb_y0;
  assign e_out  = ~eb_out;

  // Complement rails are not used further inside the counter.
  logic unused;
  assign unused = ^{q1b, e1[0], e1[2], eb1[0], eb1[2], qb_y1, qb_y0, e_y1, e_y0};

endmodule
