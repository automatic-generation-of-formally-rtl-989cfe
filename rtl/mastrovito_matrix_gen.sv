// mastrovito_matrix_gen: matrix generator of a Mastrovito GF(2^m) multiplier.
//
// Produces the m columns g_i = a * beta^i (i = 0 .. m-1) of the product
// matrix of operand a.  g_0 is a itself; each following column is the
// previous one multiplied by beta: shift up by one bit and, when the bit
// shifted out (coefficient of beta^(m-1)) is set, add (XOR) the low terms
// of the irreducible polynomial.  This is the chain of "MG" nodes of the
// hierarchical description of the multiplier; for m = 2 and
// IP = x^2 + x + 1 the single step is g_1 = (g_0[0] ^ g_0[1], g_0[1]).
//
// Interface: a (m bits) in, g[m] (m columns of m bits) out.
// Timing: purely combinational.
module mastrovito_matrix_gen #(
  parameter int unsigned    M  = 256,
  // Irreducible polynomial without the x^M term (bit i = coefficient of x^i).
  parameter logic [M-1:0]   IP = M'(gms_pkg::default_ip(M))
) (
  input  logic [M-1:0]         a,
  output logic [M-1:0][M-1:0]  g
);

  // One multiply-by-beta stage per column: col runs through a * beta^i.
  always_comb begin
    logic [M-1:0] col;
    col = a;
    for (int unsigned i = 0; i < M; i++) begin
      g[i] = col;
      col  = {col[M-2:0], 1'b0} ^ (col[M-1] ? IP : '0);
    end
  end

endmodule
