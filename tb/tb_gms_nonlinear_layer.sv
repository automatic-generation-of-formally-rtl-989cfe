// tb_gms_nonlinear_layer: checks every partial product p[i][j] = a_i * b_j
// of the nonlinear layer against the reference multiplier, for d = 1 over
// GF(2^8) and d = 2 over GF(2^16), on random shares.
module tb_gms_nonlinear_layer;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0][7:0]        a1, b1;
  logic [2:0][2:0][7:0]   p1;
  logic [4:0][15:0]       a2, b2;
  logic [4:0][4:0][15:0]  p2;

  gms_nonlinear_layer #(.M(8),  .D(1)) u1 (.a_sh(a1), .b_sh(b1), .p(p1));
  gms_nonlinear_layer #(.M(16), .D(2)) u2 (.a_sh(a2), .b_sh(b2), .p(p2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 3; i++) begin a1[i] = 8'($urandom); b1[i] = 8'($urandom); end
      for (int i = 0; i < 5; i++) begin a2[i] = 16'($urandom); b2[i] = 16'($urandom); end
      #1;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (256'(p1[i][j]) !== gf_mul(256'(a1[i]), 256'(b1[j]), 8, 256'h1b)) failures++;
        end
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          checks++;
          if (256'(p2[i][j]) !== gf_mul(256'(a2[i]), 256'(b2[j]), 16, 256'h2b)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
