// gms_share_reg: register stage between the refreshing and compression
// layers of a GMS multiplier.
//
// Stores the s' refreshed shares r_k on every rising clock edge.  The
// register stops glitches of the nonlinear/linear/refresh logic from
// propagating into the compression adders, which would otherwise combine
// shares and break noncompleteness.  A valid flag travels alongside.
//
// Interface: clk, rst_ni (asynchronous, active low: clears shares and flag),
// in_valid/r[s'] in, out_valid/r_q[s'] out.
// Timing: one cycle of latency, a new set of shares is accepted every cycle.
module gms_share_reg #(
  parameter  int unsigned M  = 256,
  parameter  int unsigned D  = 5,
  localparam int unsigned SP = gms_pkg::out_shares(D)
) (
  input  logic                 clk,
  input  logic                 rst_ni,
  input  logic                 in_valid,
  input  logic [SP-1:0][M-1:0] r,
  output logic                 out_valid,
  output logic [SP-1:0][M-1:0] r_q
);

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned k = 0; k < SP; k++) r_q[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      r_q       <= r;
      out_valid <= in_valid;
    end
  end

endmodule
