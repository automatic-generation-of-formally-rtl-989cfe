// tb_linear_dep_check: property checker for one gms_linear_layer instance
// of order D (used by tb_gms_linear_layer).
//
// With random partial products it checks
//   * correctness: the XOR of all s' outputs equals the XOR of all s^2 inputs;
//   * noncompleteness: changing every product with share a_q (row q), each
//     in a different bit so that no change can cancel, changes exactly the
//     outputs that read a_q; likewise for b_q (column q).  Each output must
//     read the same two indices of a and b, so any D outputs depend on at
//     most 2D < s share indices;
//   * each of the C(s,2) index pairs is used by exactly one output.
// It raises done when finished and reports its counts on its ports.
module tb_linear_dep_check #(
  parameter int unsigned D = 1
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned M  = 16;
  localparam int unsigned S  = 2 * D + 1;
  localparam int unsigned SP = D * (2 * D + 1);

  logic [S-1:0][S-1:0][M-1:0] p;
  logic [SP-1:0][M-1:0]       l;

  gms_linear_layer #(.M(M), .D(D)) dut (.p(p), .l(l));

  initial begin
    logic [SP-1:0][M-1:0] l_ref;
    logic [SP-1:0][S-1:0] dep;    // output k depends on b_q
    logic [SP-1:0][S-1:0] dep_a;  // output k depends on a_q
    logic [M-1:0]         sum_p, sum_l;
    int                   pair_used [S][S];
    checks = 0; failures = 0; done = 1'b0;
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < S; i++) for (int j = 0; j < S; j++) p[i][j] = M'($urandom);
      #1;
      sum_p = '0; sum_l = '0;
      for (int i = 0; i < S; i++) for (int j = 0; j < S; j++) sum_p ^= p[i][j];
      for (int k = 0; k < SP; k++) sum_l ^= l[k];
      checks++;
      if (sum_l !== sum_p) failures++;
      l_ref = l;
      dep = '0;
      dep_a = '0;
      for (int q = 0; q < S; q++) begin
        logic [S-1:0][S-1:0][M-1:0] p_save;
        p_save = p;
        // Share a_q: change every product a_q b_i, each in a different bit.
        for (int i = 0; i < S; i++) p[q][i] ^= M'(1) << i;
        #1;
        for (int k = 0; k < SP; k++) if (l[k] !== l_ref[k]) dep_a[k][q] = 1'b1;
        p = p_save;
        // Share b_q: change every product a_i b_q, each in a different bit.
        for (int i = 0; i < S; i++) p[i][q] ^= M'(1) << i;
        #1;
        for (int k = 0; k < SP; k++) if (l[k] !== l_ref[k]) dep[k][q] = 1'b1;
        p = p_save;
        #1;
      end
      for (int k = 0; k < SP; k++) begin
        checks++;
        if (dep[k] !== dep_a[k]) failures++;
      end
      for (int i = 0; i < S; i++) for (int j = 0; j < S; j++) pair_used[i][j] = 0;
      for (int k = 0; k < SP; k++) begin
        int x, y, cnt;
        cnt = 0; x = -1; y = -1;
        for (int q = 0; q < S; q++) if (dep[k][q]) begin
          cnt++;
          if (x < 0) x = q; else y = q;
        end
        checks++;
        if (cnt != 2)failures++;
        else pair_used[x][y]++;
      end
      for (int i = 0; i < S; i++)
        for (int j = i + 1; j < S; j++) begin
          checks++;
          if (pair_used[i][j] != 1) failures++;
        end
    end
    done = 1'b1;
  end
endmodule
