// full_adder: (3,2) counter. Adds three bits of equal weight into a sum bit
// of the same weight and a carry of twice the weight. Used in the reduction
// stages for columns of 2 or 3 bits (a missing input is tied to 0). It is
// static logic with no enable: its outputs follow its inputs. The function
// is the standard one; the gate-level form is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
