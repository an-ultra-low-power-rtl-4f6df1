// tb_svm_serial_channel: runs the time-shared kernel channel with a slot
// counter like the timing controller's. A random model (55 support vectors
// of two features, coefficients including -100 and 100) and a new random
// sample per base period are applied; after each last-slot edge all 55
// parallel outputs must equal alpha_i * exp(-|x - sv_i|^2) for the sample
// of the period just ended, and they must not change at any other edge.
// Some cycles have the clock enable low; the period then stretches.
module tb_svm_serial_channel;
  import tb_fp_pkg::*;
  localparam int NS = 55, NF = 2;

  logic clk = 0, rst = 1, ce = 0;
  logic [5:0] cnt = '0;
  logic en_last;
  logic [31:0] x [NF];
  logic [31:0] sv [NS][NF];
  logic [31:0] alpha [NS];
  logic [31:0] k [NS];
  logic [31:0] k_prev [NS];
  real ref_k [NS];
  real snap [NS];
  int checks = 0, failures = 0, periods = 0, stalls = 0;

  svm_serial_channel dut (.clk, .rst, .ce, .en_last, .cnt, .x, .sv, .alpha, .k);

  always #5 clk = ~clk;

  assign en_last = ce && (cnt == 6'd54);

  always_ff @(posedge clk)
    if (rst) cnt <= '0;
    else if (ce) cnt <= (cnt == 6'd54) ? 6'd0 : cnt + 6'd1;

  always_comb begin
    real d0, d1;
    for (int i = 0; i < NS; i++) begin
      d0 = fp2real(x[0]) - fp2real(sv[i][0]);
      d1 = fp2real(x[1]) - fp2real(sv[i][1]);
      ref_k[i] = fp2real(alpha[i]) * $exp(-(d0 * d0 + d1 * d1));
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic was_last;
    for (int i = 0; i < NS; i++) begin
      sv[i][0] = rand_fp(123, 128);
      sv[i][1] = rand_fp(123, 128);
      alpha[i] = (i == 0) ? 32'hC2C8_0000 : (i == NS - 1) ? 32'h42C8_0000 : rand_fp(120, 133);
    end
    x[0] = rand_fp(123, 128); x[1] = rand_fp(123, 128);
    repeat (2) @(posedge clk);
    rst <= 0;
    while (periods < 30) begin
      @(negedge clk);
      ce = ($urandom_range(0, 7) != 0);
      if (!ce) stalls++;
      was_last = ce && (cnt == 6'd54);
      for (int i = 0; i < NS; i++) begin snap[i] = ref_k[i]; k_prev[i] = k[i]; end
      @(posedge clk); #1;
      if (was_last) begin
        for (int i = 0; i < NS; i++) begin
          checks++;
          if (!close(k[i], snap[i], 2e-5, 1e-30)) begin
            failures++;
            if (failures < 10) $display("FAIL period %0d k[%0d]=%g ref=%g", periods, i, fp2real(k[i]), snap[i]);
          end
        end
        periods++;
        // new sample for the next period
        x[0] = rand_fp(123, 128); x[1] = rand_fp(123, 128);
      end else begin
        checks++;
        for (int i = 0; i < NS; i++)
          if (k[i] !== k_prev[i]) begin failures++; $display("FAIL k[%0d] changed outside the last slot", i); break; end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no clock-enable stall exercised"); end
    $display("periods=%0d stalled cycles=%0d", periods, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
