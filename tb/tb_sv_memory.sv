// tb_sv_memory: writes random support vectors and coefficients through the
// load port in random order and checks every stored word against a
// shadow copy; also checks reset clearing and that an invalid select or
// address writes nothing.
module tb_sv_memory;
  localparam int NS = 55, NF = 2;
  logic clk = 0, rst = 1, wr_en = 0;
  logic [5:0] wr_addr = '0;
  logic [1:0] wr_sel = '0;
  logic [31:0] wr_data = '0;
  logic [31:0] sv [NS][NF];
  logic [31:0] alpha [NS];
  logic [31:0] sh_sv [NS][NF];
  logic [31:0] sh_a [NS];
  int checks = 0, failures = 0;

  sv_memory dut (.clk, .rst, .wr_en, .wr_addr, .wr_sel, .wr_data, .sv, .alpha);

  always #5 clk = ~clk;

  task automatic compare_all(string what);
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (alpha[i] !== sh_a[i] || sv[i][0] !== sh_sv[i][0] || sv[i][1] !== sh_sv[i][1]) begin
        failures++;
        if (failures < 10) $display("FAIL %s entry %0d", what, i);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) begin sh_a[i] = '0; sh_sv[i][0] = '0; sh_sv[i][1] = '0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    compare_all("reset");
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en   = 1;
      wr_addr = 6'($urandom_range(0, 63));
      wr_sel  = 2'($urandom_range(0, 3));
      wr_data = $urandom;
      @(posedge clk); #1;
      if (wr_addr < NS) begin
        if (wr_sel == 2) sh_a[wr_addr] = wr_data;
        else if (wr_sel < 2) sh_sv[wr_addr][wr_sel[0]] = wr_data;
      end
      wr_en = 0;
    end
    @(negedge clk);
    compare_all("writes");
    rst = 1;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < NS; i++) begin sh_a[i] = '0; sh_sv[i][0] = '0; sh_sv[i][1] = '0; end
    compare_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
