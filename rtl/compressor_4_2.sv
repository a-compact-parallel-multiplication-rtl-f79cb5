// compressor_4_2: static (4:2) compressor for the last reduction stage.
//
// Adds four bits x1..x4 of weight 1 and a lateral carry-in cin into a sum of
// weight 1 and two bits of weight 2, carry and cout:
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// cout does not depend on cin, so a row of compressors linked cout -> cin
// has no rippling carry. Structure: the first level forms x1^x2 and
// x1^x2^x3^x4; cout = x3 when x1^x2, else x1; sum = (x1^x2^x3^x4) ^ cin;
// carry = cin when x1^x2^x3^x4, else x4. The longest path is three XOR
// delays, as required of the compressor used by the multiplier; this gate
// structure is the standard one and is this design's choice.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic p12, p34, p;

  assign p12   = x1 ^ x2;
  assign p34   = x3 ^ x4;
  assign p     = p12 ^ p34;
  assign cout  = p12 ? x3 : x1;
  assign sum   = p ^ cin;
  assign carry = p ? cin : x4;
endmodule
