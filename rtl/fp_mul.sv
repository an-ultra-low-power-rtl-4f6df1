// fp_mul: single-precision floating-point multiplier.
//
// y = a * b. Signs are XORed and exponents added; the 24x24-bit mantissa
// product is formed in two halves, following the "part multiplier, part
// add-shift" scheme: the upper 12 bits of b's mantissa go through an ordinary
// multiplier, the lower 12 bits through a shift-and-add loop, and the two
// partial products are summed. Where the halves are split, truncation of the
// result and flushing of subnormals are this design's choices. The unit is
// fed a constant on one input to form a gain and the same signal on both
// inputs to form a square.
//
// Purely combinational.
module fp_mul
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  fp32_t fa, fb;
  logic        s;
  logic [23:0] ma, mb;
  logic [47:0] p_hi, p_lo, p;
  logic signed [10:0] e;

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    s  = fa.sign ^ fb.sign;
    ma = {1'b1, fa.man};
    mb = {1'b1, fb.man};
    // multiplier half
    p_hi = (48'(ma) * 48'(mb[23:12])) << 12;
    // add-shift half
    p_lo = '0;
    for (int i = 0; i < 12; i++)
      p_lo = p_lo + ((48'(ma) << i) & {48{mb[i]}});
    p = p_hi + p_lo;
    e = 11'(fa.exp) + 11'(fb.exp) - 11'sd127;
    if (p[47]) e = e + 11'sd1;
    else       p = p << 1;

    if (is_nan(fa) || is_nan(fb))
      y = FP_QNAN;
    else if ((is_inf(fa) && is_zero(fb)) || (is_zero(fa) && is_inf(fb)))
      y = FP_QNAN;
    else if (is_inf(fa) || is_inf(fb))
      y = {s, 8'hFF, 23'd0};
    else if (is_zero(fa) || is_zero(fb))
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {s, 31'd0};
    else
      y = {s, e[7:0], p[46:24]};
  end

endmodule
