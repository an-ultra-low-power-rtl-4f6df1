// fp_div: single-precision floating-point divider.
//
// y = a / b, used by the preprocessing channel to scale the centred sample
// by its running standard deviation. The quotient of the two 24-bit
// mantissas is taken with an integer division to 25 bits and renormalised;
// the exponent is the difference of the operand exponents. The document only
// names a standalone divider, so this structure, truncation and
// flush-to-zero are this design's choices. x/0 gives infinity, 0/0 and
// inf/inf give a quiet NaN.
//
// Purely combinational.
module fp_div
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp32_t fa, fb;
  logic        s;
  logic [47:0] num;
  logic [24:0] q;
  logic signed [10:0] e;

  always_comb begin
    fa  = fp32_t'(a);
    fb  = fp32_t'(b);
    s   = fa.sign ^ fb.sign;
    num = {1'b1, fa.man, 24'd0};
    q   = 25'(num / 48'({1'b1, fb.man}));
    e   = 11'(fa.exp) - 11'(fb.exp) + 11'sd127;
    if (!q[24]) e = e - 11'sd1;

    if (is_nan(fa) || is_nan(fb))
      y = FP_QNAN;
    else if ((is_inf(fa) && is_inf(fb)) || (is_zero(fa) && is_zero(fb)))
      y = FP_QNAN;
    else if (is_inf(fa) || is_zero(fb))
      y = {s, 8'hFF, 23'd0};
    else if (is_zero(fa) || is_inf(fb))
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {s, 31'd0};
    else
      y = {s, e[7:0], q[24] ? q[23:1] : q[22:0]};
  end

endmodule
