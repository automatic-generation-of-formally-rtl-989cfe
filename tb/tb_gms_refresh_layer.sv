// tb_gms_refresh_layer: test of the ring refresh for d = 1 (s' = 3) and
// d = 2 (s' = 10).  Checks r_k = l_k + z_(k+1) + z_(k+2) (indices mod s'),
// that the masks cancel in the sum of all outputs, and that changing one
// mask z_q changes exactly two outputs.
module tb_gms_refresh_layer;

  int checks = 0, failures = 0;

  logic [2:0][7:0] l1, z1, r1;
  logic [9:0][7:0] l2, z2, r2;

  gms_refresh_layer #(.M(8), .D(1)) u1 (.l(l1), .z(z1), .r(r1));
  gms_refresh_layer #(.M(8), .D(2)) u2 (.l(l2), .z(z2), .r(r2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [7:0] sl, sr;
      logic [9:0][7:0] r2_ref;
      for (int k = 0; k < 3; k++) begin l1[k] = 8'($urandom); z1[k] = 8'($urandom); end
      for (int k = 0; k < 10; k++) begin l2[k] = 8'($urandom); z2[k] = 8'($urandom); end
      #1;
      checks += 3;
      if (r1[0] !== (l1[0] ^ z1[1] ^ z1[2])) failures++;
      if (r1[1] !== (l1[1] ^ z1[2] ^ z1[0])) failures++;
      if (r1[2] !== (l1[2] ^ z1[0] ^ z1[1])) failures++;
      sl = '0; sr = '0;
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (r2[k] !== (l2[k] ^ z2[(k + 1) % 10] ^ z2[(k + 2) % 10])) failures++;
        sl ^= l2[k]; sr ^= r2[k];
      end
      checks++;
      if (sl !== sr) failures++;
      r2_ref = r2;
      for (int q = 0; q < 10; q++) begin
        int changed;
        z2[q] = ~z2[q];
        #1;
        changed = 0;
        for (int k = 0; k < 10; k++) if (r2[k] !== r2_ref[k]) changed++;
        checks++;
        if (changed != 2) failures++;
        z2[q] = ~z2[q];
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
