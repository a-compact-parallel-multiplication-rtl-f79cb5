// sttl_gate: logic-level model of one Self-Timed Threshold Logic (STTL) gate.
//
// A threshold gate outputs 1 when the weighted sum of its inputs reaches its
// threshold T. In the STTL circuit the weighted sum is a voltage phi formed
// by a capacitive network on a floating gate, and a differential sense
// amplifier compares it with the threshold voltage T. Here both arrive as
// unsigned integers in units of the unit weight: i1 is phi (the gate's I1
// input), i2 is T (I2). Negative input weights are folded into i2 by the
// instantiating counter, as the circuit does with capacitors on the
// threshold side.
//
// Two phases, selected by the dual-rail enable pair:
//   precharge (e = 1, eb = 0): both sense nodes A and B are held low, so the
//     buffered outputs are q = qb = 1 and the next-stage enable is
//     e_next = 1, eb_next = 0; the next stage stays in precharge too.
//   evaluate  (e = 0, eb = 1): exactly one sense node rises. i1 >= i2 gives
//     q = 1, qb = 0, otherwise q = 0, qb = 1. eb_next = NAND(q, qb) goes
//     high and e_next low, releasing the next stage.
// Q is the inverted node B and Qb the inverted node A, as in the circuit.
//
// Timing: the model has no delay; the self-timed order of evaluation is
// carried by e_next/eb_next. The circuit latches its decision through the
// cross-coupled pair; the model instead assumes that i1 and i2 stay steady
// while the gate is in evaluate, which the enable chain guarantees for the
// counters built from it. The mapping of phi and T to integers and that
// assumption are choices of this model; the phases and enable generation
// follow the described circuit.
module sttl_gate #(
  parameter int unsigned W = 5     // width of the sum and threshold values
) (
  input  logic         e,
  input  logic         eb,
  input  logic [W-1:0] i1,
  input  logic [W-1:0] i2,
  output logic         q,
  output logic         qb,
  output logic         e_next,
  output logic         eb_next
);

  logic node_a, node_b;
  logic evaluate;

  assign evaluate = eb & ~e;

  always_comb begin
    node_a = evaluate &  (i1 >= i2);
    node_b = evaluate & ~(i1 >= i2);
  end

  assign qb      = ~node_a;
  assign q       = ~node_b;
  assign eb_next = ~(q & qb);
  assign e_next  = ~eb_next;

  // The enable pair is dual rail: E and Eb are complements of each other.
  always_comb begin
    assert (e == ~eb) else $error("sttl_gate: e and eb are not complementary");
  end

endmodule
