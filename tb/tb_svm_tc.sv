// tb_svm_tc: checks the slot counter of the timing controller: it counts
// 0..54 and wraps, en_last is high exactly at 54 and en_first exactly at 0,
// the period is 55 enabled cycles, cycles with ce_in low are skipped, and
// ce_out follows ce_in.
module tb_svm_tc;
  logic clk = 0, rst = 1, ce_in = 0;
  logic ce_out, en_last, en_first;
  logic [5:0] cnt;
  int checks = 0, failures = 0;
  int exp_cnt = 0, last_seen = -1, cyc = 0, periods = 0;

  svm_tc dut (.clk, .rst, .ce_in, .ce_out, .en_last, .en_first, .cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int en_cycles;
    en_cycles = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ce_in = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (cnt != 6'(exp_cnt) || en_last != (ce_in && exp_cnt == 54) ||
          en_first != (ce_in && exp_cnt == 0) || ce_out != ce_in) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d cnt=%0d exp=%0d last=%0b first=%0b", i, cnt, exp_cnt, en_last, en_first);
      end
      if (en_last) begin
        if (last_seen >= 0) begin
          checks++;
          if (en_cycles != 55) begin failures++; $display("FAIL period %0d enabled cycles", en_cycles); end
          periods++;
        end
        last_seen = i;
        en_cycles = 0;
      end
      if (ce_in) begin
        en_cycles++;
        exp_cnt = (exp_cnt == 54) ? 0 : exp_cnt + 1;
      end
    end
    checks++;
    if (periods < 10) begin failures++; $display("FAIL only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
