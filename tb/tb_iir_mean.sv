// tb_iir_mean: checks the single-pole running mean against a real-valued
// model of y[n] = 0.01 x[n] + 0.99 y[n-1], checks that the state holds while
// en is low, and that a constant input converges toward its value.
module tb_iir_mean;
  import tb_fp_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [31:0] x = '0, y;
  int checks = 0, failures = 0;
  real ref_state = 0.0, r;

  iir_mean dut (.clk, .rst, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      x  = (i < 1000) ? real2fp(real'($urandom_range(0, 4000)) / 1000.0 - 1.0) : 32'h4040_0000;  // 3.0
      en = (i % 5 != 4);
      #1;
      r = 0.01 * fp2real(x) + 0.99 * ref_state;
      checks++;
      if (!close(y, r, 1e-4, 1e-6)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%g ref=%g", i, fp2real(y), r);
      end
      @(posedge clk);
      if (en) ref_state = r;
    end
    // after 500 samples of 3.0 (with 1 in 5 skipped: 400) the mean is near 3
    checks++;
    if (!close(y, 3.0, 0.05, 0.0)) begin
      failures++;
      $display("FAIL convergence y=%g", fp2real(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
