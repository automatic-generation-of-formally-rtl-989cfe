// tb_gms_mult_full: the masked multiplier at its default size, fifth order
// over GF(2^256) with x^256+x^10+x^5+x^2+1 (11 shares per operand, 55 fresh
// masks, 121 sub-multipliers).  Streams random masked multiplications one
// per cycle, checks the one-cycle latency of out_valid and that the XOR of
// the output shares is the reference product, then repeats one set of input
// shares with new random masks (refresh: new output shares, same product).
module tb_gms_mult_full;
  import gf_ref_pkg::*;

  localparam int unsigned M  = 256;
  localparam int unsigned D  = 5;
  localparam int unsigned S  = 2 * D + 1;
  localparam int unsigned SP = D * (2 * D + 1);
  localparam fe_t         IP = fe_t'(16'h0425);

  int checks = 0, failures = 0, n_back_to_back = 0, n_refresh = 0;

  logic                 clk = 1'b0;
  logic                 rst_ni, in_valid, out_valid;
  logic [S-1:0][M-1:0]  a_sh, b_sh, c_sh;
  logic [SP-1:0][M-1:0] z;

  gms_mult dut (
    .clk(clk), .rst_ni(rst_ni), .in_valid(in_valid),
    .a_sh(a_sh), .b_sh(b_sh), .z(z),
    .out_valid(out_valid), .c_sh(c_sh)
  );

  always #5 clk = ~clk;

  function automatic fe_t sum_shares(logic [S-1:0][M-1:0] sh);
    fe_t acc = '0;
    for (int i = 0; i < S; i++) acc ^= sh[i];
    return acc;
  endfunction

  task automatic randomize_inputs();
    for (int i = 0; i < S; i++) begin
      a_sh[i] = rand_fe(M);
      b_sh[i] = rand_fe(M);
    end
    for (int k = 0; k < SP; k++) z[k] = rand_fe(M);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t                 exp_prod;
    logic [S-1:0][M-1:0] c_first;
    rst_ni = 1'b0; in_valid = 1'b0; a_sh = '0; b_sh = '0; z = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_ni = 1'b1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      randomize_inputs();
      exp_prod = gf_mul(sum_shares(a_sh), sum_shares(b_sh), M, IP);
      @(posedge clk); #1;
      randomize_inputs();   // outputs must not follow the inputs
      #1;
      checks += 2;
      if (out_valid !== 1'b1) failures++;
      if (sum_shares(c_sh) !== exp_prod) failures++;
      if (n > 0) n_back_to_back++;
    end
    // Refresh: one set of input shares, applied with two mask sets.
    @(negedge clk);
    randomize_inputs();
    exp_prod = gf_mul(sum_shares(a_sh), sum_shares(b_sh), M, IP);
    @(posedge clk); #1;
    c_first = c_sh;
    @(negedge clk);
    for (int k = 0; k < SP; k++) z[k] = rand_fe(M);
    @(posedge clk); #1;
    checks += 3;
    if (sum_shares(c_first) !== exp_prod) failures++;
    if (sum_shares(c_sh) !== exp_prod) failures++;
    if (c_sh === c_first) failures++;
    else n_refresh++;
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0) failures++;
    $display("mechanisms: back_to_back=%0d refresh=%0d compression=%0d",
             n_back_to_back, n_refresh, n_back_to_back + 1);
    checks++;
    if (n_back_to_back == 0 || n_refresh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
