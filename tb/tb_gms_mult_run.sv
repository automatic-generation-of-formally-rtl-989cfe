// tb_gms_mult_run: end-to-end stimulus and checker for one gms_mult
// instance (used by tb_gms_mult and tb_gms_mult_full).
//
// Streams N_OPS multiplications with fresh random sharings of random a and b
// and fresh random masks, one per cycle with occasional idle cycles, and
// checks after each rising edge (with the inputs already changed again)
// that out_valid repeats the previous cycle's in_valid and that the XOR of the output shares equals the reference
// product a*b.  It then runs the refresh experiment: the same input shares
// with two different mask sets must give different output shares with the
// same sum.  For D = 1 each output share is also compared with the
// first-order share equations
//   c_0 = a1b2+a2b2+a2b1+z1+z2, c_1 = a0b2+a0b0+a2b0+z0+z2,
//   c_2 = a0b1+a1b1+a1b0+z0+z1.
// Counts how often each mechanism was exercised: back-to-back results,
// refresh, compression of d > 1 registered shares, idle cycles.
module tb_gms_mult_run #(
  parameter int unsigned M      = 8,
  parameter int unsigned D      = 1,
  parameter int unsigned N_OPS  = 200,
  parameter logic [255:0] IP256 = gms_pkg::default_ip(M)
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_back_to_back,
  output int   n_refresh,
  output int   n_compress,
  output int   n_idle,
  output logic done
);
  import gf_ref_pkg::*;

  localparam int unsigned S  = 2 * D + 1;
  localparam int unsigned SP = D * (2 * D + 1);

  logic                 rst_ni;
  logic                 in_valid, out_valid;
  logic [S-1:0][M-1:0]  a_sh, b_sh, c_sh;
  logic [SP-1:0][M-1:0] z;

  gms_mult #(.M(M), .D(D), .IP(IP256[M-1:0])) dut (
    .clk(clk), .rst_ni(rst_ni), .in_valid(in_valid),
    .a_sh(a_sh), .b_sh(b_sh), .z(z),
    .out_valid(out_valid), .c_sh(c_sh)
  );

  function automatic fe_t sum_shares(logic [S-1:0][M-1:0] sh);
    fe_t acc = '0;
    for (int i = 0; i < S; i++) acc ^= fe_t'(sh[i]);
    return acc;
  endfunction

  // Applies one set of shares and masks and returns the output shares of the
  // following rising edge.
  task automatic apply(output logic [S-1:0][M-1:0] c_out);
    @(negedge clk);
    in_valid = 1'b1;
    @(posedge clk); #1;
    c_out = c_sh;
  endtask

  initial begin
    fe_t                  exp_prod, a, b;
    logic                 exp_valid, last_valid;
    logic [S-1:0][M-1:0]  c_first, c_second;
    logic [S-1:0][M-1:0]  sa, sb;
    logic [SP-1:0][M-1:0] sz;
    checks = 0; failures = 0; n_back_to_back = 0; n_refresh = 0;
    n_compress = 0; n_idle = 0; done = 1'b0;
    rst_ni = 1'b0; in_valid = 1'b0; a_sh = '0; b_sh = '0; z = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) failures++;
    @(negedge clk) rst_ni = 1'b1;
    last_valid = 1'b0;
    for (int n = 0; n < int'(N_OPS); n++) begin
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      for (int i = 0; i < int'(S); i++) begin
        a_sh[i] = M'(rand_fe(M));
        b_sh[i] = M'(rand_fe(M));
      end
      for (int k = 0; k < int'(SP); k++) z[k] = M'(rand_fe(M));
      a = sum_shares(a_sh);
      b = sum_shares(b_sh);
      exp_prod  = gf_mul(a, b, M, fe_t'(IP256[M-1:0]));
      exp_valid = in_valid;
      if (!in_valid) n_idle++;
      sa = a_sh; sb = b_sh; sz = z;
      @(posedge clk); #1;
      // New inputs right after the edge: the outputs must hold the
      // registered result, not follow the inputs.
      for (int i = 0; i < int'(S); i++) begin
        a_sh[i] = M'(rand_fe(M));
        b_sh[i] = M'(rand_fe(M));
      end
      for (int k = 0; k < int'(SP); k++) z[k] = M'(rand_fe(M));
      #1;
      checks++;
      if (out_valid !== exp_valid) failures++;
      if (exp_valid) begin
        checks++;
        if (sum_shares(c_sh) !== exp_prod) begin
          failures++;
          if (failures < 5) $display("FAIL M=%0d D=%0d: product mismatch", M, D);
        end else if (D > 1) n_compress++;
        if (last_valid) n_back_to_back++;
        if (D == 1) begin
          checks += 3;
          if (c_sh[0] !== M'(gf_mul(fe_t'(sa[1]), fe_t'(sb[2]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[2]), fe_t'(sb[2]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[2]), fe_t'(sb[1]), M, fe_t'(IP256[M-1:0]))
                          ^ fe_t'(sz[1]) ^ fe_t'(sz[2]))) failures++;
          if (c_sh[1] !== M'(gf_mul(fe_t'(sa[0]), fe_t'(sb[2]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[0]), fe_t'(sb[0]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[2]), fe_t'(sb[0]), M, fe_t'(IP256[M-1:0]))
                          ^ fe_t'(sz[0]) ^ fe_t'(sz[2]))) failures++;
          if (c_sh[2] !== M'(gf_mul(fe_t'(sa[0]), fe_t'(sb[1]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[1]), fe_t'(sb[1]), M, fe_t'(IP256[M-1:0]))
                          ^ gf_mul(fe_t'(sa[1]), fe_t'(sb[0]), M, fe_t'(IP256[M-1:0]))
                          ^ fe_t'(sz[0]) ^ fe_t'(sz[1]))) failures++;
        end
      end
      last_valid = exp_valid;
    end
    // Refresh: same input shares, two different mask sets.
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      for (int i = 0; i < int'(S); i++) begin
        a_sh[i] = M'(rand_fe(M));
        b_sh[i] = M'(rand_fe(M));
      end
      for (int k = 0; k < int'(SP); k++) z[k] = M'(rand_fe(M));
      apply(c_first);
      @(negedge clk);
      for (int k = 0; k < int'(SP); k++) z[k] = M'(rand_fe(M));
      apply(c_second);
      checks += 2;
      if (sum_shares(c_first) !== sum_shares(c_second)) failures++;
      if (c_first === c_second) failures++;
      else n_refresh++;
    end
    @(negedge clk) in_valid = 1'b0;
    done = 1'b1;
  end
endmodule
