// gms_mult: d-th order GMS-masked multiplier over GF(2^m) (top level).
//
// Computes c = a * b with every operand held as s = 2d+1 random shares
// (a = sum a_i, b = sum b_j, c = sum c_i, "+" is XOR).  The datapath is
//   N  nonlinear layer   s^2 Mastrovito sub-multipliers, p_ij = a_i b_j
//   L  linear layer      s' = d(2d+1) noncomplete sums of two share indices
//   R  refreshing layer  ring of s' fresh masks z_k, r_k = l_k+z_k+1+z_k+2
//      register          r_k stored (glitch barrier)
//   C  compression layer c_i = sum of d consecutive registered r's
// Any d of the registered shares depend on at most 2d of the 2d+1 share
// indices, so the circuit is meant to resist d-th order DPA.  The layer
// structure, share counts, ring refresh and compression formula follow the
// GMS construction; the register reset, valid flag and default irreducible
// polynomials are this implementation's choices.
//
// Interface: clk, rst_ni (async, active low), in_valid, a_sh[s], b_sh[s],
// z[s'] (fresh masks, m bits each) in; out_valid, c_sh[s] out.
// Timing: one clock of latency (out_valid/c_sh follow in_valid/a_sh/b_sh/z
// by one rising edge); one multiplication per cycle.
module gms_mult #(
  parameter  int unsigned  M  = 256,
  parameter  int unsigned  D  = 5,
  parameter  logic [M-1:0] IP = M'(gms_pkg::default_ip(M)),
  localparam int unsigned  S  = gms_pkg::in_shares(D),
  localparam int unsigned  SP = gms_pkg::out_shares(D)
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic                 in_valid,
  input  logic [S-1:0][M-1:0]  a_sh,
  input  logic [S-1:0][M-1:0]  b_sh,
  input  logic [SP-1:0][M-1:0] z,
  output logic                 out_valid,
  output logic [S-1:0][M-1:0]  c_sh
);

  logic [S-1:0][S-1:0][M-1:0] p;
  logic [SP-1:0][M-1:0]       l;
  logic [SP-1:0][M-1:0]       r;
  logic [SP-1:0][M-1:0]       r_q;

  gms_nonlinear_layer #(.M(M), .D(D), .IP(IP)) u_n (
    .a_sh (a_sh),
    .b_sh (b_sh),
    .p    (p)
  );

  gms_linear_layer #(.M(M), .D(D)) u_l (
    .p (p),
    .l (l)
  );

  gms_refresh_layer #(.M(M), .D(D)) u_r (
    .l (l),
    .z (z),
    .r (r)
  );

  gms_share_reg #(.M(M), .D(D)) u_reg (
    .clk       (clk),
    .rst_ni    (rst_ni),
    .in_valid  (in_valid),
    .r         (r),
    .out_valid (out_valid),
    .r_q       (r_q)
  );

  gms_compression_layer #(.M(M), .D(D)) u_c (
    .r (r_q),
    .c (c_sh)
  );

endmodule
