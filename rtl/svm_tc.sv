// svm_tc: timing controller of the oversampled SVM channel.
//
// The whole detector runs from one fast clock. Each base-rate (sample)
// period is N fast cycles long, one per support vector. A counter runs
// 0..N-1 on cycles with ce_in high and wraps to 0. Two enables mark the
// period: en_last is high in the cycle the counter holds N-1 and en_first
// in the cycle it holds 0, both only when ce_in is high. ce_out repeats
// ce_in. cnt is the slot index used to pick the support vector. This is the
// document's controller; the gating of the enables with ce_in and the reset
// value 0 are this design's reading.
module svm_tc #(
  parameter int unsigned N = 55
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce_in,
  output logic                 ce_out,
  output logic                 en_last,
  output logic                 en_first,
  output logic [$clog2(N)-1:0] cnt
);

  always_ff @(posedge clk) begin
    if (rst)
      cnt <= '0;
    else if (ce_in)
      cnt <= (cnt >= ($clog2(N))'(N - 1)) ? '0 : cnt + 1'b1;
  end

  assign en_last  = ce_in && (cnt == ($clog2(N))'(N - 1));
  assign en_first = ce_in && (cnt == '0);
  assign ce_out   = ce_in;

endmodule
