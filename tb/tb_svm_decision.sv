// tb_svm_decision: feeds random sets of 55 kernel terms, some with a
// positive and some with a negative total, and checks that on an enabled
// edge the registered decision value matches a real-valued sum and the flag
// equals (sum > 0), and that both hold while en is low. Both flag values
// must be seen.
module tb_svm_decision;
  import tb_fp_pkg::*;
  localparam int N = 55;

  logic clk = 0, rst = 1, en = 0;
  logic [31:0] k [N];
  logic [31:0] sum, sum_prev;
  logic flag, flag_prev;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  real ref_sum, ref_abs;

  svm_decision dut (.clk, .rst, .en, .k, .sum, .flag);

  always #5 clk = ~clk;

  always_comb begin
    ref_sum = 0.0;
    ref_abs = 0.0;
    for (int i = 0; i < N; i++) begin
      ref_sum = ref_sum + fp2real(k[i]);
      ref_abs = ref_abs + ((fp2real(k[i]) < 0.0) ? -fp2real(k[i]) : fp2real(k[i]));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, a;
    for (int i = 0; i < N; i++) k[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) k[i] = rand_fp(110, 133);
      en = (t % 4 != 3);
      sum_prev = sum; flag_prev = flag;
      #1;
      r = ref_sum; a = ref_abs;
      @(posedge clk); #1;
      checks++;
      if (en) begin
        if (!close(sum, r, 0.0, 6.0 * pow2(-23) * a) || (flag != (r > 0.0) && (r > 1e-5 * a || r < -1e-5 * a))) begin
          failures++;
          if (failures < 10) $display("FAIL sum=%g ref=%g flag=%0b", fp2real(sum), r, flag);
        end
        if (flag) n_pos++; else n_neg++;
      end else if (sum !== sum_prev || flag !== flag_prev) begin
        failures++;
        $display("FAIL output changed without en");
      end
      en = 0;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL flag classes %0d/%0d", n_pos, n_neg); end
    $display("flag=1: %0d  flag=0: %0d", n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
