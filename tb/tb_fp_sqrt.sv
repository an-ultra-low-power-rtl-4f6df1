// tb_fp_sqrt: self-checking test of the binary32 square root against
// $sqrt (two units in the last place), with even and odd exponents, exact
// squares and the zero, negative and infinity cases.
module tb_fp_sqrt;
  import tb_fp_pkg::*;

  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_sqrt dut (.a, .y);

  task automatic check_exact(string what, logic [31:0] exp_v);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      $display("FAIL %s: a=%h y=%h expected %h", what, a, y, exp_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int i = 0; i < 4000; i++) begin
      a = {1'b0, rand_fp(1, 254)};
      a[31] = 1'b0;
      #1;
      r = $sqrt(fp2real(a));
      checks++;
      if (!close(y, r, pow2(-22), 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt a=%h y=%h ref=%g", a, y, r);
      end
    end
    a = 32'h4080_0000; check_exact("sqrt 4", 32'h4000_0000);
    a = 32'h4110_0000; check_exact("sqrt 9", 32'h4040_0000);
    a = 32'h3E80_0000; check_exact("sqrt 0.25", 32'h3F00_0000);
    a = 32'h0;         check_exact("sqrt 0", 32'h0);
    a = 32'hBF80_0000; check_exact("sqrt -1", 32'h7FC0_0000);
    a = 32'h7F80_0000; check_exact("sqrt inf", 32'h7F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
