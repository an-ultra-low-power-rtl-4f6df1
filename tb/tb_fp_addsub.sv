// tb_fp_addsub: self-checking test of the binary32 adder/subtractor.
// Random operands with nearby and distant exponents (including heavy
// cancellation) are checked against real arithmetic within two units in the
// last place; zero, infinity and NaN cases are checked bit-exactly.
module tb_fp_addsub;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a, .b, .sub, .y);

  task automatic check_exact(string what, logic [31:0] exp_v);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sub=%0b y=%h expected %h", what, a, b, sub, y, exp_v);
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
      a   = rand_fp(110, 140);
      b   = (i % 4 == 0) ? {a[31:8], 8'($urandom)} : rand_fp(110, 140);
      sub = 1'($urandom);
      #1;
      r = sub ? fp2real(a) - fp2real(b) : fp2real(a) + fp2real(b);
      checks++;
      if (!close(y, r, pow2(-22), 1e-37)) begin
        failures++;
        if (failures < 10) $display("FAIL add a=%h b=%h sub=%0b y=%h ref=%g", a, b, sub, y, r);
      end
    end
    a = 32'h3F80_0000; b = 32'h3F80_0000; sub = 1'b1; check_exact("x-x", 32'h0);
    a = 32'h3F80_0000; b = 32'h3F80_0000; sub = 1'b0; check_exact("1+1", 32'h4000_0000);
    a = 32'h4049_0FDB; b = 32'h0;         sub = 1'b0; check_exact("x+0", 32'h4049_0FDB);
    a = 32'h0;         b = 32'h4049_0FDB; sub = 1'b1; check_exact("0-x", 32'hC049_0FDB);
    a = 32'h7F80_0000; b = 32'h7F80_0000; sub = 1'b1; check_exact("inf-inf", 32'h7FC0_0000);
    a = 32'h7F80_0000; b = 32'h3F80_0000; sub = 1'b0; check_exact("inf+1", 32'h7F80_0000);
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; sub = 1'b0; check_exact("overflow", 32'h7F80_0000);
    a = 32'h3FC0_0000; b = 32'h3F80_0000; sub = 1'b1; check_exact("1.5-1", 32'h3F00_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
