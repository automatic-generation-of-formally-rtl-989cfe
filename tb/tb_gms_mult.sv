// tb_gms_mult: end-to-end test of the masked multiplier.  Runs
// tb_gms_mult_run on GF(2^8) for every order d = 1 .. 5, on GF(2^16) with
// d = 2 and on GF(2^128) (x^128+x^7+x^2+x+1) with d = 1, and requires that
// every mechanism (back-to-back results at one cycle of latency, idle
// cycles, mask refresh, compression of d > 1 shares) occurred.
module tb_gms_mult;

  localparam int NR = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [NR], f [NR], b2b [NR], rf [NR], cmp [NR], idl [NR];
  logic dn [NR];

  tb_gms_mult_run #(.M(8),   .D(1)) u0 (clk, c[0], f[0], b2b[0], rf[0], cmp[0], idl[0], dn[0]);
  tb_gms_mult_run #(.M(8),   .D(2)) u1 (clk, c[1], f[1], b2b[1], rf[1], cmp[1], idl[1], dn[1]);
  tb_gms_mult_run #(.M(8),   .D(3)) u2 (clk, c[2], f[2], b2b[2], rf[2], cmp[2], idl[2], dn[2]);
  tb_gms_mult_run #(.M(8),   .D(4)) u3 (clk, c[3], f[3], b2b[3], rf[3], cmp[3], idl[3], dn[3]);
  tb_gms_mult_run #(.M(8),   .D(5)) u4 (clk, c[4], f[4], b2b[4], rf[4], cmp[4], idl[4], dn[4]);
  tb_gms_mult_run #(.M(16),  .D(2)) u5 (clk, c[5], f[5], b2b[5], rf[5], cmp[5], idl[5], dn[5]);
  tb_gms_mult_run #(.M(128), .D(1), .N_OPS(50)) u6 (clk, c[6], f[6], b2b[6], rf[6], cmp[6], idl[6], dn[6]);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_b2b, tot_rf, tot_cmp, tot_idl;
    @(posedge clk);
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5] && dn[6]);
    tot_b2b = 0; tot_rf = 0; tot_cmp = 0; tot_idl = 0;
    for (int i = 0; i < NR; i++) begin
      checks   += c[i];
      failures += f[i];
      tot_b2b += b2b[i]; tot_rf += rf[i]; tot_cmp += cmp[i]; tot_idl += idl[i];
      if (f[i] != 0) $display("FAIL run %0d: %0d failures", i, f[i]);
    end
    $display("mechanisms: back_to_back=%0d refresh=%0d compression=%0d idle=%0d",
             tot_b2b, tot_rf, tot_cmp, tot_idl);
    checks += 4;
    if (tot_b2b == 0) failures++;
    if (tot_rf == 0)  failures++;
    if (tot_cmp == 0) failures++;
    if (tot_idl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
