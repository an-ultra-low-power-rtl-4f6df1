// tb_svm_kernel_unit: random samples, support vectors and coefficients
// (every fourth coefficient is -100) are checked against the real-valued
// term alpha * exp(-(dx0^2 + dx1^2)), within a tolerance that grows with the
// exponent's argument, and identical sample and support
// vector must give exactly alpha. The reference is computed in a separate
// combinational process from the binary32 inputs.
module tb_svm_kernel_unit;
  import tb_fp_pkg::*;

  logic [31:0] x [2];
  logic [31:0] sv [2];
  logic [31:0] alpha, y;
  int checks = 0, failures = 0;
  real ref_y, d0, d1;

  svm_kernel_unit dut (.x, .sv, .alpha, .y);

  always_comb begin
    d0    = fp2real(x[0]) - fp2real(sv[0]);
    d1    = fp2real(x[1]) - fp2real(sv[1]);
    ref_y = fp2real(alpha) * $exp(-(d0 * d0 + d1 * d1));
  end

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x[0]  = rand_fp(120, 128);
      x[1]  = rand_fp(120, 128);
      sv[0] = rand_fp(120, 128);
      sv[1] = rand_fp(120, 128);
      alpha = (i % 4 == 0) ? 32'hC2C8_0000 : rand_fp(120, 130);
      #1;
      checks++;
      // a rounding error of one unit in |x-sv|^2 is scaled by the argument
      if (!close(y, ref_y, 2e-6 + 5e-7 * (d0 * d0 + d1 * d1), 1e-30)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h,%h sv=%h,%h alpha=%h y=%h ref=%g", x[0], x[1], sv[0], sv[1], alpha, y, ref_y);
      end
    end
    x[0] = 32'h3F80_0000; x[1] = 32'hC000_0000; sv = x; alpha = 32'h42C8_0000;
    #1;
    checks++;
    if (y !== 32'h42C8_0000) begin failures++; $display("FAIL x==sv gives %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
