// tb_deserializer: shifts in periods of 55 random words (with some idle
// cycles between shifts) and checks that the load in the last slot presents
// them in order on the parallel outputs, which then hold until the next load.
module tb_deserializer;
  localparam int N = 55;
  logic clk = 0, rst = 1, shift = 0, load = 0;
  logic [31:0] din = '0;
  logic [31:0] dout [N];
  logic [31:0] expv [N];
  int checks = 0, failures = 0;

  deserializer dut (.clk, .rst, .shift, .load, .din, .dout);

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
    for (int p = 0; p < 20; p++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        din = $urandom; shift = 1; load = (i == N - 1);
        expv[i] = din;
        @(posedge clk); #1;
        shift = 0; load = 0;
        if ($urandom_range(0, 4) == 0) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dout[i] !== expv[i]) begin
          failures++;
          if (failures < 10) $display("FAIL period %0d word %0d: %h vs %h", p, i, dout[i], expv[i]);
        end
      end
      // one more shift without load must not disturb the outputs
      @(negedge clk); din = $urandom; shift = 1;
      @(posedge clk); #1; shift = 0;
      checks++;
      if (dout[0] !== expv[0]) begin failures++; $display("FAIL output not held"); end
      // realign: the next period starts with a fresh shift register view
      for (int i = 0; i < N - 1; i++) begin
        @(negedge clk); din = $urandom; shift = 1;
        @(posedge clk); #1; shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
