// tb_mastrovito_matrix_op: drives random matrices g and operands b into the
// matrix operation and checks every output bit t against the parity of row t
// of the matrix masked by b (a row-wise view of the column-wise sum).
module tb_mastrovito_matrix_op;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0][7:0]     g8;
  logic [7:0]          b8, c8;
  logic [255:0][255:0] g256;
  logic [255:0]        b256, c256;

  mastrovito_matrix_op #(.M(8)) u8   (.g(g8),   .b(b8),   .c(c8));
  mastrovito_matrix_op          u256 (.g(g256), .b(b256), .c(c256));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] row;
      for (int i = 0; i < 8; i++) g8[i] = 8'($urandom);
      b8 = 8'($urandom); #1;
      for (int t = 0; t < 8; t++) begin
        for (int i = 0; i < 8; i++) row[i] = g8[i][t];
        checks++;
        if (c8[t] !== ^(row & b8)) failures++;
      end
    end
    for (int n = 0; n < 10; n++) begin
      logic [255:0] row;
      for (int i = 0; i < 256; i++) g256[i] = rand_fe(256);
      b256 = rand_fe(256); #1;
      for (int t = 0; t < 256; t++) begin
        for (int i = 0; i < 256; i++) row[i] = g256[i][t];
        checks++;
        if (c256[t] !== ^(row & b256)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
