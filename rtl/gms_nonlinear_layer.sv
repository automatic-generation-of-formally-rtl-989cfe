// gms_nonlinear_layer: nonlinear layer N of a d-th order GMS multiplier.
//
// Multiplies every input share of a with every input share of b:
//   p[i][j] = a_i * b_j   (0 <= i, j <= s-1, s = 2d+1)
// using s^2 independent Mastrovito sub-multipliers over GF(2^m).  No product
// combines more than one share of each operand, so each output depends on
// one share index of a and one of b only.
//
// Interface: a_sh[s], b_sh[s] (m bits each) in, p[s][s] out (first index is
// the share of a, second the share of b).  Timing: purely combinational.
module gms_nonlinear_layer #(
  parameter  int unsigned  M  = 256,
  parameter  int unsigned  D  = 5,
  parameter  logic [M-1:0] IP = M'(gms_pkg::default_ip(M)),
  localparam int unsigned  S  = gms_pkg::in_shares(D)
) (
  input  logic [S-1:0][M-1:0]         a_sh,
  input  logic [S-1:0][M-1:0]         b_sh,
  output logic [S-1:0][S-1:0][M-1:0]  p
);

  for (genvar i = 0; i < S; i++) begin : g_a
    for (genvar j = 0; j < S; j++) begin : g_b
      mastrovito_mult #(.M(M), .IP(IP)) u_mult (
        .a (a_sh[i]),
        .b (b_sh[j]),
        .c (p[i][j])
      );
    end
  end

endmodule
