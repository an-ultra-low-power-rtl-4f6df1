// tb_fp_div: self-checking test of the binary32 divider against real
// arithmetic (two units in the last place) and its special cases.
module tb_fp_div;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_div dut (.a, .b, .y);

  task automatic check_exact(string what, logic [31:0] exp_v);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      $display("FAIL %s: a=%h b=%h y=%h expected %h", what, a, b, y, exp_v);
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
      a = rand_fp(80, 170);
      b = rand_fp(80, 170);
      #1;
      r = fp2real(a) / fp2real(b);
      checks++;
      if (!close(y, r, pow2(-22), 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL div a=%h b=%h y=%h ref=%g", a, b, y, r);
      end
    end
    a = 32'h40C0_0000; b = 32'h4000_0000; check_exact("6/2", 32'h4040_0000);
    a = 32'h3F80_0000; b = 32'hC080_0000; check_exact("1/-4", 32'hBE80_0000);
    a = 32'h3F80_0000; b = 32'h0;         check_exact("1/0", 32'h7F80_0000);
    a = 32'h0;         b = 32'h0;         check_exact("0/0", 32'h7FC0_0000);
    a = 32'h0;         b = 32'h4000_0000; check_exact("0/2", 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
