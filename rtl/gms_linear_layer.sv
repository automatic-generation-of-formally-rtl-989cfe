// gms_linear_layer: linear layer L of a d-th order GMS multiplier.
//
// Reduces the s^2 partial products p[i][j] = a_i b_j to s' = d(2d+1) sums
// l_k with GF(2^m) adders (bitwise XOR).  Each adder takes one cross pair
//   a_x b_y + a_y b_x
// and, for s of the s' adders, also one diagonal product a_x b_x.  Thus every
// l_k depends on only two share indices {x, y}, and any d of the outputs
// depend on at most 2d < s share indices of each operand (d-th order
// noncompleteness).  The grouping is gms_pkg::l_term(); for d = 1 it gives
//   l_0 = a2b1+a2b2+a1b2, l_1 = a0b2+a0b0+a2b0, l_2 = a1b0+a1b1+a0b1.
//
// Interface: p[s][s] in, l[s'] out.  Timing: purely combinational.
module gms_linear_layer #(
  parameter  int unsigned M  = 256,
  parameter  int unsigned D  = 5,
  localparam int unsigned S  = gms_pkg::in_shares(D),
  localparam int unsigned SP = gms_pkg::out_shares(D)
) (
  input  logic [S-1:0][S-1:0][M-1:0] p,
  output logic [SP-1:0][M-1:0]       l
);

  for (genvar k = 0; k < SP; k++) begin : g_add
    localparam gms_pkg::l_term_t T = gms_pkg::l_term(D, k);
    localparam int unsigned X = int'(T.x);
    localparam int unsigned Y = int'(T.y);
    if (T.diag) begin : g_l0
      assign l[k] = p[X][Y] ^ p[X][X] ^ p[Y][X];
    end else begin : g_l1
      assign l[k] = p[X][Y] ^ p[Y][X];
    end
  end

endmodule
