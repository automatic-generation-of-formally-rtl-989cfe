// gms_refresh_layer: refreshing layer R of a d-th order GMS multiplier.
//
// Adds fresh random masks z_k to the linear-layer outputs in a ring:
//   r_k = l_k + z_{(k+1) mod s'} + z_{(k+2) mod s'}
// Every mask enters exactly two outputs, so the masks cancel in the sum of
// all r_k (correctness is kept) while each output is re-randomised, which
// restores a uniform share distribution.  Each r_k still depends on the same
// two share indices as l_k (noncompleteness is kept).
//
// Interface: l[s'], z[s'] (m bits each) in, r[s'] out.  z must be fresh,
// uniformly random values for every multiplication.
// Timing: purely combinational; the outputs must be registered before any
// further combination (see gms_share_reg).
module gms_refresh_layer #(
  parameter  int unsigned M  = 256,
  parameter  int unsigned D  = 5,
  localparam int unsigned SP = gms_pkg::out_shares(D)
) (
  input  logic [SP-1:0][M-1:0] l,
  input  logic [SP-1:0][M-1:0] z,
  output logic [SP-1:0][M-1:0] r
);

  for (genvar k = 0; k < SP; k++) begin : g_ring
    assign r[k] = l[k] ^ z[(k + 1) % SP] ^ z[(k + 2) % SP];
  end

endmodule
