// svm_top: real-time fNIRS motion-artefact detector, a Gaussian-RBF support
// vector machine with streaming preprocessing and one time-shared kernel
// channel.
//
// Data path, per sample of NUM_FEAT raw features:
//   preproc_channel (one per feature): centre and scale by running mean and
//       running standard deviation (single-pole IIR, a = 0.01);
//   svm_serial_channel: for i = 0..NUM_SV-1, one per fast cycle,
//       alpha_i * exp(-GAMMA * |x - sv_i|^2), collected by the deserializer;
//   svm_decision: adder tree over the NUM_SV terms, flag = (sum > 0).
// The trained model (support vectors and y_i*alpha_i) lives in sv_memory
// and is loaded through the wr_* port before use.
//
// Timing: one fast clock; svm_tc divides it into base periods of NUM_SV
// cycles (55 cycles, so 2.5 MHz gives 45.45 kHz samples). raw_x is taken on
// the edge where sample_en is high (slot NUM_SV-1). The flag and decision
// value for that sample appear NUM_SV + 1 cycles later, marked by a one-cycle
// out_valid pulse: one base period for the serial channel plus one cycle for
// the result register. The first period after reset carries no sample and
// raises no out_valid. ce_in gates the whole design (cycles with ce_in low
// are skipped); ce_out repeats it.
//
// The arrangement follows the document's oversampled single-channel
// architecture. The single-ended clock (the differential receiver is a pad
// outside the design), the model write port and out_valid are this design's
// own.
module svm_top
  import fp32_pkg::*;
#(
  parameter int unsigned NUM_SV   = NUM_SV_DEFAULT,
  parameter int unsigned NUM_FEAT = NUM_FEAT_DEFAULT,
  parameter logic [31:0] A        = IIR_A_DEFAULT,
  parameter logic [31:0] GAMMA    = GAMMA_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce_in,
  input  logic [31:0]                   raw_x [NUM_FEAT],
  // model load
  input  logic                          wr_en,
  input  logic [$clog2(NUM_SV)-1:0]     wr_addr,
  input  logic [$clog2(NUM_FEAT+1)-1:0] wr_sel,
  input  logic [31:0]                   wr_data,
  // results
  output logic                          ce_out,
  output logic                          sample_en,
  output logic                          ma_flag,
  output logic [31:0]                   decision,
  output logic                          out_valid
);

  logic                      en_last, en_first;
  logic [$clog2(NUM_SV)-1:0] cnt;
  logic [31:0]               xn    [NUM_FEAT];
  logic [31:0]               sv    [NUM_SV][NUM_FEAT];
  logic [31:0]               alpha [NUM_SV];
  logic [31:0]               k     [NUM_SV];
  logic [1:0]                periods;

  svm_tc #(.N(NUM_SV)) u_tc (
    .clk, .rst, .ce_in, .ce_out, .en_last, .en_first, .cnt
  );

  for (genvar f = 0; f < NUM_FEAT; f++) begin : g_pre
    preproc_channel #(.A(A)) u_pre (
      .clk, .rst, .en(en_last), .x(raw_x[f]), .y(xn[f])
    );
  end

  sv_memory #(.NUM_SV(NUM_SV), .NUM_FEAT(NUM_FEAT)) u_mem (
    .clk, .rst, .wr_en, .wr_addr, .wr_sel, .wr_data, .sv, .alpha
  );

  svm_serial_channel #(.NUM_SV(NUM_SV), .NUM_FEAT(NUM_FEAT), .GAMMA(GAMMA)) u_chan (
    .clk, .rst, .ce(ce_in), .en_last, .cnt, .x(xn), .sv, .alpha, .k
  );

  svm_decision #(.NUM_SV(NUM_SV)) u_dec (
    .clk, .rst, .en(en_first), .k, .sum(decision), .flag(ma_flag)
  );

  // out_valid: the deserializer holds a real sample from the second
  // sample strobe on
  always_ff @(posedge clk) begin
    if (rst) begin
      periods   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (en_last && periods != 2'd2) periods <= periods + 2'd1;
      out_valid <= en_first && (periods == 2'd2);
    end
  end

  assign sample_en = en_last;

endmodule
