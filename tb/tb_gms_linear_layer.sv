// tb_gms_linear_layer: test of the linear layer L.
// For d = 1 every output is compared with the first-order equations
//   l_0 = a2b1 + a2b2 + a1b2, l_1 = a0b2 + a0b0 + a2b0, l_2 = a1b0 + a1b1 + a0b1.
// For d = 1 .. 5 tb_linear_dep_check verifies correctness and the
// two-index dependence of each output (noncompleteness).
module tb_gms_linear_layer;

  int checks = 0, failures = 0;

  logic [2:0][2:0][7:0] p;
  logic [2:0][7:0]      l;

  gms_linear_layer #(.M(8), .D(1)) u1 (.p(p), .l(l));

  int   c_d [1:5];
  int   f_d [1:5];
  logic done_d [1:5];

  for (genvar d = 1; d <= 5; d++) begin : g_d
    tb_linear_dep_check #(.D(d)) u_chk (.checks(c_d[d]), .failures(f_d[d]), .done(done_d[d]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = 8'($urandom);
      #1;
      checks += 3;
      if (l[0] !== (p[2][1] ^ p[2][2] ^ p[1][2])) failures++;
      if (l[1] !== (p[0][2] ^ p[0][0] ^ p[2][0])) failures++;
      if (l[2] !== (p[1][0] ^ p[1][1] ^ p[0][1])) failures++;
    end
    wait (done_d[1] && done_d[2] && done_d[3] && done_d[4] && done_d[5]);
    for (int d = 1; d <= 5; d++) begin
      checks += c_d[d];
      failures += f_d[d];
      if (f_d[d] != 0) $display("FAIL order %0d: %0d failures", d, f_d[d]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
