// svm_serial_channel: the oversampled single kernel channel.
//
// Instead of NUM_SV parallel kernel channels, one svm_kernel_unit is
// time-shared. Each base period has NUM_SV fast cycles (slots); in slot i the
// serializer selects support vector i and its coefficient, the kernel unit
// computes alpha_i * K(sv_i, x) for the held sample x, and the result is
// shifted into the deserializer. At the last slot (en_last) the deserializer
// hands all NUM_SV products over in parallel, one base period after the
// sample was taken. This is the document's serial/deserial scheme; building
// the stages as one combinational chain with only the final deserializing
// delay line (rather than a delay line behind every stage) is this design's
// choice and keeps the extra latency at one base period.
//
// Interface: cnt is the slot index from svm_tc, ce the clock enable; x must
// be stable from slot 0 to slot NUM_SV-1 of a period.
module svm_serial_channel
  import fp32_pkg::*;
#(
  parameter int unsigned NUM_SV   = 55,
  parameter int unsigned NUM_FEAT = 2,
  parameter logic [31:0] GAMMA    = GAMMA_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      ce,
  input  logic                      en_last,
  input  logic [$clog2(NUM_SV)-1:0] cnt,
  input  logic [31:0]               x     [NUM_FEAT],
  input  logic [31:0]               sv    [NUM_SV][NUM_FEAT],
  input  logic [31:0]               alpha [NUM_SV],
  output logic [31:0]               k     [NUM_SV]
);

  logic [31:0] sel_sv [NUM_FEAT];
  logic [31:0] sel_alpha, prod;

  // serializer: one support vector and coefficient per slot
  always_comb begin
    sel_alpha = '0;
    for (int f = 0; f < NUM_FEAT; f++) sel_sv[f] = '0;
    if (32'(cnt) < NUM_SV) begin
      sel_alpha = alpha[cnt];
      for (int f = 0; f < NUM_FEAT; f++) sel_sv[f] = sv[cnt][f];
    end
  end

  svm_kernel_unit #(.NUM_FEAT(NUM_FEAT), .GAMMA(GAMMA)) u_kernel (
    .x(x), .sv(sel_sv), .alpha(sel_alpha), .y(prod)
  );

  deserializer #(.N(NUM_SV)) u_deser (
    .clk, .rst, .shift(ce), .load(en_last), .din(prod), .dout(k)
  );

endmodule
