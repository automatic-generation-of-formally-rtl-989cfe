// tb_mastrovito_matrix_gen: checks that column i of the matrix generator
// equals a * beta^i (reference product with the monomial x^i), exhaustively
// over a for GF(2^8) and on random a for GF(2^256).
module tb_mastrovito_matrix_gen;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]              a8;
  logic [7:0][7:0]         g8;
  logic [255:0]            a256;
  logic [255:0][255:0]     g256;

  mastrovito_matrix_gen #(.M(8)) u8   (.a(a8),   .g(g8));
  mastrovito_matrix_gen          u256 (.a(a256), .g(g256));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      a8 = 8'(x); #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (256'(g8[i]) !== gf_mul(fe_t'(x), fe_t'(1) << i, 8, fe_t'(8'h1b))) failures++;
      end
    end
    for (int n = 0; n < 20; n++) begin
      a256 = rand_fe(256); #1;
      for (int i = 0; i < 256; i++) begin
        checks++;
        if (g256[i] !== gf_mul(a256, fe_t'(1) << i, 256, fe_t'(16'h0425))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
