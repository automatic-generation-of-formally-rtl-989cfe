// tb_gms_share_reg: test of the share register.  Checks that reset clears
// shares and valid, that outputs hold the inputs of the previous rising edge
// (one cycle of latency) with a new value taken every cycle, and that
// in_valid is delayed by the same cycle.
module tb_gms_share_reg;

  int checks = 0, failures = 0;

  logic            clk = 1'b0;
  logic            rst_ni;
  logic            in_valid, out_valid;
  logic [9:0][7:0] r, r_q;

  gms_share_reg #(.M(8), .D(2)) dut (
    .clk(clk), .rst_ni(rst_ni), .in_valid(in_valid), .r(r),
    .out_valid(out_valid), .r_q(r_q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0][7:0] prev_r;
    logic            prev_v;
    rst_ni = 1'b0; in_valid = 1'b1; r = '1;
    #12;
    checks += 2;
    if (r_q !== '0) failures++;
    if (out_valid !== 1'b0) failures++;
    @(negedge clk) rst_ni = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int k = 0; k < 10; k++) r[k] = 8'($urandom);
      in_valid = 1'($urandom);
      prev_r = r; prev_v = in_valid;
      @(posedge clk); #1;
      checks += 2;
      if (r_q !== prev_r) failures++;
      if (out_valid !== prev_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
