// iir_mean: single real-pole IIR filter, the exponentially weighted running
// mean of one signal.
//
//   y[n] = a * x[n] + (1 - a) * y[n-1],   H(z) = a / (1 - (1 - a) z^-1)
//
// with a = 0.01 by default (parameter A, a binary32 word; 1 - a is derived
// from it at elaboration as ONE_MINUS_A, also overridable). The output y is
// combinational from the current sample and the stored state; the state is
// replaced by y on every cycle with en high. Two fp_mul and one fp_addsub
// form the filter. The recursion and the value of a are those of the
// document; the zero reset state is this design's choice.
module iir_mean
  import fp32_pkg::*;
#(
  parameter logic [31:0] A           = IIR_A_DEFAULT,
  parameter logic [31:0] ONE_MINUS_A = 32'h3F7D_70A4   // 0.99
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] x,
  output logic [31:0] y
);

  logic [31:0] state, ax, bs;

  fp_mul  u_gain_in   (.a(x),     .b(A),           .y(ax));
  fp_mul  u_gain_fb   (.a(state), .b(ONE_MINUS_A), .y(bs));
  fp_addsub u_sum     (.a(ax),    .b(bs), .sub(1'b0), .y(y));

  always_ff @(posedge clk) begin
    if (rst)     state <= FP_ZERO;
    else if (en) state <= y;
  end

endmodule
