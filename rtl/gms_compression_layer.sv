// gms_compression_layer: compression layer C of a d-th order GMS multiplier.
//
// Reduces the s' = d*s registered shares to s output shares by adding d
// consecutive ones:
//   c_i = sum_{e=0}^{d-1} r_{i*d+e}   (0 <= i <= s-1)
// For d = 1 (s' = s) it is plain wiring.
//
// Interface: r[s'] in, c[s] out (m bits each).
// Timing: purely combinational; the inputs must come from registers.
module gms_compression_layer #(
  parameter  int unsigned M  = 256,
  parameter  int unsigned D  = 5,
  localparam int unsigned S  = gms_pkg::in_shares(D),
  localparam int unsigned SP = gms_pkg::out_shares(D)
) (
  input  logic [SP-1:0][M-1:0] r,
  output logic [S-1:0][M-1:0]  c
);

  always_comb begin
    for (int unsigned i = 0; i < S; i++) begin
      c[i] = '0;
      for (int unsigned e = 0; e < D; e++) begin
        c[i] ^= r[i*D + e];
      end
    end
  end

endmodule
