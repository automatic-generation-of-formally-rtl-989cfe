// tb_gms_compression_layer: test of the compression layer for d = 1 (plain
// wiring, c_i = r_i) and d = 2 (c_i = r_2i + r_2i+1), with the sum of the
// output shares compared with the sum of the input shares.
module tb_gms_compression_layer;

  int checks = 0, failures = 0;

  logic [2:0][7:0] r1, c1;
  logic [9:0][7:0] r2;
  logic [4:0][7:0] c2;

  gms_compression_layer #(.M(8), .D(1)) u1 (.r(r1), .c(c1));
  gms_compression_layer #(.M(8), .D(2)) u2 (.r(r2), .c(c2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] sr, sc;
      for (int k = 0; k < 3; k++) r1[k] = 8'($urandom);
      for (int k = 0; k < 10; k++) r2[k] = 8'($urandom);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (c1[i] !== r1[i]) failures++;
      end
      sr = '0; sc = '0;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (c2[i] !== (r2[2*i] ^ r2[2*i + 1])) failures++;
        sc ^= c2[i];
      end
      for (int k = 0; k < 10; k++) sr ^= r2[k];
      checks++;
      if (sc !== sr) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
