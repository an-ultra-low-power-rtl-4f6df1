// tb_fp_exp: self-checking test of the binary32 exponential against $exp.
// Covers the kernel's range (negative arguments down to -80), positive
// arguments, tiny arguments, and the overflow / underflow / NaN limits.
module tb_fp_exp;
  import tb_fp_pkg::*;

  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_exp dut (.a, .y);

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
    real r, x;
    for (int i = 0; i < 4000; i++) begin
      x = (i % 2 == 0) ? -80.0 * real'($urandom_range(0, 100000)) / 100000.0
                       : 160.0 * real'($urandom_range(0, 100000)) / 100000.0 - 80.0;
      if (i % 10 == 0) x = x * 1e-6;
      a = real2fp(x);
      #1;
      r = $exp(fp2real(a));
      checks++;
      if (!close(y, r, 3.0e-7, 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL exp a=%h y=%h ref=%g got=%g", a, y, r, fp2real(y));
      end
    end
    a = 32'h0;         check_exact("exp 0", 32'h3F80_0000);
    a = 32'h3F31_7218; check_exact("exp ln2", 32'h4000_0000);
    a = 32'h42C8_0000; check_exact("exp 100", 32'h7F80_0000);
    a = 32'hC2C8_0000; check_exact("exp -100", 32'h0);
    a = 32'h7FC0_0000; check_exact("exp NaN", 32'h7FC0_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
