// mastrovito_mult: unmasked bit-parallel Mastrovito multiplier over GF(2^m).
//
// Computes c = a * b modulo the irreducible polynomial IP.  It is built from
// a matrix generator, which turns a into the m columns a * beta^i, and a
// matrix operation, which selects the columns with the bits of b and adds
// them.  In the masked multiplier this block is the sub-multiplier of the
// nonlinear layer, one instance per pair of shares (a_i, b_j).
//
// Interface: a, b (m bits each) in, c (m bits) out.  IP excludes the x^M
// term.  Timing: purely combinational.
module mastrovito_mult #(
  parameter int unsigned    M  = 256,
  parameter logic [M-1:0]   IP = M'(gms_pkg::default_ip(M))
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);

  logic [M-1:0][M-1:0] g;

  mastrovito_matrix_gen #(.M(M), .IP(IP)) u_mg (
    .a (a),
    .g (g)
  );

  mastrovito_matrix_op #(.M(M)) u_mo (
    .g (g),
    .b (b),
    .c (c)
  );

endmodule
