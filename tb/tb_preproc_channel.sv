// tb_preproc_channel: streams random samples with an offset and scale into
// one preprocessing channel and checks each registered output against a
// real-valued model of (x - m) / sqrt(q - m^2) with running mean m and
// running mean square q (a = 0.01). Also checks that the output only
// changes on enabled edges and that a zero input after reset gives 0.
module tb_preproc_channel;
  import tb_fp_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [31:0] x = '0, y, y_prev;
  int checks = 0, failures = 0;
  real m = 0.0, q = 0.0, r, v;

  preproc_channel dut (.clk, .rst, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // zero input with zero state: deviation is zero, output must be 0
    @(negedge clk); x = '0; en = 1;
    @(posedge clk); #1; en = 0;
    checks++;
    if (y !== 32'h0) begin failures++; $display("FAIL zero-deviation output %h", y); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x  = real2fp(5.0 + 2.0 * (real'($urandom_range(0, 10000)) / 5000.0 - 1.0));
      en = (i % 3 != 2);
      y_prev = y;
      @(posedge clk); #1;
      if (en) begin
        m = 0.01 * fp2real(x) + 0.99 * m;
        q = 0.01 * fp2real(x) * fp2real(x) + 0.99 * q;
        v = q - m * m;
        r = (fp2real(x) - m) / $sqrt(v);
        checks++;
        if (!close(y, r, 2e-3, 2e-3)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d y=%g ref=%g", i, fp2real(y), r);
        end
      end else begin
        checks++;
        if (y !== y_prev) begin failures++; $display("FAIL output changed without en"); end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
