// preproc_channel: real-time centring and scaling of one fNIRS feature.
//
// The SVM's RBF kernel expects zero-mean, unit-variance features, so each
// raw sample x is replaced by (x - m) / s, where
//   m  = running mean of x        (single-pole IIR, iir_mean)
//   q  = running mean of x*x      (second iir_mean fed by a squarer)
//   s  = sqrt(q - m*m)            (running standard deviation)
// This is the structure of the document's preprocessing channel: two
// filters, a squarer for the input and one for the mean, a subtractor,
// a square root and a divider, all binary32. The filters include the
// current sample. This design's own choices: a variance that rounding
// makes negative is clamped to zero, a zero deviation yields an output of
// 0 instead of inf/NaN, and the result is registered.
//
// Timing: on a clock edge with en high, both filter states advance and y
// takes the normalised value of the x presented in that cycle (one
// sample-rate cycle of latency). Between enables nothing changes.
module preproc_channel
  import fp32_pkg::*;
#(
  parameter logic [31:0] A = IIR_A_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] x,
  output logic [31:0] y
);

  logic [31:0] xsq, mean, msq, mean_sq, var_raw, var_c, sd, centred, scaled;

  fp_mul    u_sq_in   (.a(x), .b(x), .y(xsq));
  iir_mean  #(.A(A)) u_mean (.clk, .rst, .en, .x(x),   .y(mean));
  iir_mean  #(.A(A)) u_msq  (.clk, .rst, .en, .x(xsq), .y(msq));
  fp_mul    u_sq_mean (.a(mean), .b(mean), .y(mean_sq));
  fp_addsub u_var     (.a(msq), .b(mean_sq), .sub(1'b1), .y(var_raw));

  assign var_c = var_raw[31] ? FP_ZERO : var_raw;

  fp_sqrt   u_sqrt    (.a(var_c), .y(sd));
  fp_addsub u_centre  (.a(x), .b(mean), .sub(1'b1), .y(centred));
  fp_div    u_scale   (.a(centred), .b(sd), .y(scaled));

  always_ff @(posedge clk) begin
    if (rst)     y <= FP_ZERO;
    else if (en) y <= is_zero(fp32_t'(sd)) ? FP_ZERO : scaled;
  end

endmodule
