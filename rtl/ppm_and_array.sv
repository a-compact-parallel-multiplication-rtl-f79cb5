// ppm_and_array: partial product matrix of an N x N unsigned multiplication,
// formed by an array of AND gates. Row i is the multiplicand gated by
// multiplier bit b[i]: pp[i][j] = a[j] & b[i], of weight 2^(i+j). Purely
// combinational. Matches the described AND-array generator.
module ppm_and_array #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    assign pp[i] = a & {N{b[i]}};
  end
endmodule
