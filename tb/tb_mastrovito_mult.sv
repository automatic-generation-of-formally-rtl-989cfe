// tb_mastrovito_mult: self-checking test of the unmasked Mastrovito
// multiplier.  GF(2^2) with x^2+x+1 and GF(2^8) with the AES polynomial are
// checked exhaustively, GF(2^256) with x^256+x^10+x^5+x^2+1 on random
// operands, all against the reference product of gf_ref_pkg.  Includes the
// known AES value 0x57 * 0x83 = 0xc1.
module tb_mastrovito_mult;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0]   a2, b2, c2;
  logic [7:0]   a8, b8, c8;
  logic [255:0] a256, b256, c256;

  mastrovito_mult #(.M(2), .IP(2'b11)) u2 (.a(a2), .b(b2), .c(c2));
  mastrovito_mult #(.M(8))             u8 (.a(a8), .b(b8), .c(c8));
  mastrovito_mult                      u256 (.a(a256), .b(b256), .c(c256));

  task automatic check(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a2 = 2'(x); b2 = 2'(y); #1;
        check(256'(c2), gf_mul(fe_t'(x), fe_t'(y), 2, fe_t'(3)), "GF(2^2)");
      end
    end
    a8 = 8'h57; b8 = 8'h83; #1;
    check(256'(c8), 256'hc1, "AES 57*83");
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); #1;
        check(256'(c8), gf_mul(fe_t'(x), fe_t'(y), 8, fe_t'(8'h1b)), "GF(2^8)");
      end
    end
    for (int n = 0; n < 200; n++) begin
      a256 = rand_fe(256); b256 = rand_fe(256);
      if (n == 0) a256 = 256'b10;          // beta * b: one shift and reduction
      #1;
      check(c256, gf_mul(a256, b256, 256, fe_t'(16'h0425)), "GF(2^256)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
