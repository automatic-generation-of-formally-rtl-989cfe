// mastrovito_matrix_op: matrix operation of a Mastrovito GF(2^m) multiplier.
//
// Given the matrix columns g_i = a * beta^i from the matrix generator and the
// operand b, forms the partial results w_i = g_i * b_i (each bit of g_i ANDed
// with the single coefficient b_i, the "MO" nodes) and adds them all with one
// GF(2^m) adder (the "GFA" node, bitwise XOR):
//   c = sum_{i=0}^{m-1} b_i * g_i = a * b mod IP.
//
// Interface: g[m] columns and b (m bits) in, c (m bits) out.
// Timing: purely combinational.
module mastrovito_matrix_op #(
  parameter int unsigned M = 256
) (
  input  logic [M-1:0][M-1:0] g,
  input  logic [M-1:0]        b,
  output logic [M-1:0]        c
);

  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < M; i++) begin
      c ^= g[i] & {M{b[i]}};
    end
  end

endmodule
