// tb_svm_top: end-to-end test of the detector at its default size
// (55 support vectors, two features, a = 0.01, Gamma = 1).
//
// A random model is loaded through the write port (support vector 0 has
// coefficient -100 and support vector 54 has +100). The raw inputs change
// every fast cycle, as a free-running sensor stream would; occasional bursts
// of large values stand in for motion artefacts. A real-valued reference
// model samples the same inputs on the same strobe, runs the running
// mean / deviation normalisation and the kernel sum, and each result the
// design reports is compared with it: decision value within a tolerance
// relative to the sum of the term magnitudes, flag wherever the reference
// decision is not within that tolerance of zero, and the latency of 56
// enabled clock cycles from sample strobe to result register. Flag
// mismatches are also tallied as an error count. The clock enable is
// dropped now and then. Each mechanism must occur: model loads, samples,
// both flag values, and clock-enable stalls.
module tb_svm_top;
  import tb_fp_pkg::*;
  localparam int NS = 55, NF = 2, NSAMPLES = 300;

  logic clk = 0, rst = 1, ce_in = 0;
  logic [31:0] raw_x [NF];
  logic wr_en = 0;
  logic [5:0] wr_addr = '0;
  logic [1:0] wr_sel = '0;
  logic [31:0] wr_data = '0;
  logic ce_out, sample_en, ma_flag, out_valid;
  logic [31:0] decision;

  svm_top dut (.clk, .rst, .ce_in, .raw_x, .wr_en, .wr_addr, .wr_sel, .wr_data,
               .ce_out, .sample_en, .ma_flag, .decision, .out_valid);

  always #5 clk = ~clk;

  // model copy and reference state
  logic [31:0] m_sv [NS][NF];
  logic [31:0] m_alpha [NS];
  real mean [NF], msq [NF];
  real exp_dec [$], exp_tol [$];
  longint exp_cyc [$];
  longint ecyc = 0;
  int checks = 0, failures = 0, error_count = 0;
  int n_samples = 0, n_results = 0, n_flag1 = 0, n_flag0 = 0, n_stall = 0, n_writes = 0, n_ambig = 0;

  // reference: runs at every sample strobe, untimed process
  always @(posedge clk) begin
    real xr, xn [NF], d, acc, mag, term, sd;
    if (!rst && ce_in) begin
      ecyc <= ecyc + 1;
      if (sample_en) begin
        for (int f = 0; f < NF; f++) begin
          xr = fp2real(raw_x[f]);
          mean[f] = 0.01 * xr + 0.99 * mean[f];
          msq[f]  = 0.01 * xr * xr + 0.99 * msq[f];
          sd = msq[f] - mean[f] * mean[f];
          sd = (sd > 0.0) ? $sqrt(sd) : 0.0;
          xn[f] = (sd > 0.0) ? (xr - mean[f]) / sd : 0.0;
        end
        acc = 0.0; mag = 0.0;
        for (int i = 0; i < NS; i++) begin
          d = 0.0;
          for (int f = 0; f < NF; f++)
            d = d + (xn[f] - fp2real(m_sv[i][f])) * (xn[f] - fp2real(m_sv[i][f]));
          term = fp2real(m_alpha[i]) * $exp(-d);
          acc = acc + term;
          mag = mag + ((term < 0.0) ? -term : term);
        end
        exp_dec.push_back(acc);
        exp_tol.push_back(2e-3 * mag + 1e-6);
        exp_cyc.push_back(ecyc);
        n_samples++;
      end
    end
  end

  // checker: the result registered at the previous edge
  always @(posedge clk) begin
    real r, tol, g;
    longint c;
    if (!rst && out_valid) begin
      if (exp_dec.size() == 0) begin
        failures++;
        $display("FAIL result without a sample");
      end else begin
        r = exp_dec.pop_front(); tol = exp_tol.pop_front(); c = exp_cyc.pop_front();
        n_results++;
        g = fp2real(decision);
        checks++;
        if (!close(decision, r, 0.0, tol)) begin
          failures++;
          if (failures < 10) $display("FAIL decision %g ref %g tol %g", g, r, tol);
        end
        checks++;
        // ecyc counts enabled edges before this one; the result register
        // was written on the 56th enabled edge after the strobe edge
        if (ecyc - c - 1 != 56) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d enabled cycles", ecyc - c - 1);
        end
        if (r > tol || r < -tol) begin
          checks++;
          if (ma_flag != (r > 0.0)) begin
            failures++;
            error_count++;
            $display("FAIL flag %0b ref decision %g", ma_flag, r);
          end
        end else n_ambig++;
        if (ma_flag) n_flag1++; else n_flag0++;
      end
    end
  end

  // free-running raw stream: a new value every fast cycle
  always @(negedge clk) begin
    for (int f = 0; f < NF; f++)
      raw_x[f] <= ($urandom_range(0, 19) == 0) ? rand_fp(129, 131) : rand_fp(124, 128);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin mean[f] = 0.0; msq[f] = 0.0; end
    for (int i = 0; i < NS; i++) begin
      m_sv[i][0] = rand_fp(123, 128);
      m_sv[i][1] = rand_fp(123, 128);
      m_alpha[i] = (i == 0) ? 32'hC2C8_0000 : (i == NS - 1) ? 32'h42C8_0000 : rand_fp(125, 133);
    end
    repeat (3) @(posedge clk);
    // load the model with the clock enable low, so no sample is taken yet
    rst <= 0;
    for (int i = 0; i < NS; i++)
      for (int s = 0; s <= NF; s++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 6'(i); wr_sel = 2'(s);
        wr_data = (s == NF) ? m_alpha[i] : m_sv[i][s];
        n_writes++;
      end
    @(negedge clk);
    wr_en = 0;
    // stream
    while (n_results < NSAMPLES) begin
      @(negedge clk);
      ce_in = ($urandom_range(0, 49) != 0);
      if (!ce_in) n_stall++;
    end
    $display("samples=%0d results=%0d flag1=%0d flag0=%0d ambiguous=%0d stalls=%0d writes=%0d error_count=%0d",
             n_samples, n_results, n_flag1, n_flag0, n_ambig, n_stall, n_writes, error_count);
    checks++;
    if (n_flag1 == 0 || n_flag0 == 0 || n_stall == 0 || n_writes == 0 || n_results < NSAMPLES) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
