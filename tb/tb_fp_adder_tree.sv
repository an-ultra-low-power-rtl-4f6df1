// tb_fp_adder_tree: sums 55 random binary32 words of mixed sign and
// magnitude with the adder tree and compares with a real-valued sum,
// within a tolerance set by the sum of magnitudes (each of the 54 additions
// may lose one unit in the last place).
module tb_fp_adder_tree;
  import tb_fp_pkg::*;
  localparam int N = 55;

  logic [31:0] din [N];
  logic [31:0] sum;
  int checks = 0, failures = 0;
  real ref_sum, ref_abs;

  fp_adder_tree dut (.din, .sum);

  always_comb begin
    ref_sum = 0.0;
    ref_abs = 0.0;
    for (int i = 0; i < N; i++) begin
      ref_sum = ref_sum + fp2real(din[i]);
      ref_abs = ref_abs + ((fp2real(din[i]) < 0.0) ? -fp2real(din[i]) : fp2real(din[i]));
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < N; i++) din[i] = (t % 5 == 0 && i % 3 == 0) ? 32'h0 : rand_fp(100, 134);
      #1;
      checks++;
      if (!close(sum, ref_sum, 0.0, 6.0 * pow2(-23) * ref_abs)) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%g ref=%g", fp2real(sum), ref_sum);
      end
    end
    // exact case: 55 ones
    for (int i = 0; i < N; i++) din[i] = 32'h3F80_0000;
    #1;
    checks++;
    if (sum !== 32'h425C_0000) begin failures++; $display("FAIL 55 ones gives %h", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
