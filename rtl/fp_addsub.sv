// fp_addsub: single-precision floating-point adder / subtractor.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1). The operands are split
// into sign, exponent and mantissa; the smaller magnitude is aligned by a
// right shift, the mantissas are added or subtracted, and the result is
// renormalised by a six-step leading-zero shifter. This follows the description of
// the adder as field splitting, bit switching and shifting; the exact
// alignment width (24 extra bits), truncation instead of rounding and the
// flush-to-zero treatment of subnormals are this design's choices.
// Infinities and NaN propagate (inf - inf gives a quiet NaN).
//
// Purely combinational: no clock, result valid in the same cycle.
module fp_addsub
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  fp32_t fa, fb, hi_op, lo_op;
  logic        sb;
  logic [7:0]  d;
  logic [48:0] mhi, mlo, msum;
  logic [5:0]  lz;
  logic signed [9:0] e;

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    sb = fb.sign ^ sub;
    y  = FP_ZERO;
    hi_op = fa; lo_op = fb; d = '0;
    mhi = '0; mlo = '0; msum = '0; lz = '0; e = '0;

    if (is_nan(fa) || is_nan(fb)) begin
      y = FP_QNAN;
    end else if (is_inf(fa) || is_inf(fb)) begin
      if (is_inf(fa) && is_inf(fb) && (fa.sign != sb)) y = FP_QNAN;
      else if (is_inf(fa)) y = a;
      else y = {sb, 8'hFF, 23'd0};
    end else if (is_zero(fb)) begin
      y = is_zero(fa) ? {fa.sign & sb, 31'd0} : a;
    end else if (is_zero(fa)) begin
      y = {sb, b[30:0]};
    end else begin
      // order by magnitude
      if ({fa.exp, fa.man} >= {fb.exp, fb.man}) begin
        hi_op = fa; lo_op = fp32_t'({sb, b[30:0]});
      end else begin
        hi_op = fp32_t'({sb, b[30:0]}); lo_op = fa;
      end
      d      = hi_op.exp - lo_op.exp;
      mhi   = {1'b0, 1'b1, hi_op.man, 24'd0};
      mlo = (d > 8'd48) ? 49'd0 : ({1'b0, 1'b1, lo_op.man, 24'd0} >> d);
      e      = {2'b00, hi_op.exp};
      if (hi_op.sign == lo_op.sign) begin
        msum = mhi + mlo;
        if (msum[48]) begin
          msum = msum >> 1;
          e    = e + 10'sd1;
        end
      end else begin
        msum = mhi - mlo;
      end
      if (msum == '0) begin
        y = FP_ZERO;
      end else begin
        // normalise: shift the leading one up to bit 47 in six binary steps
        for (int st = 5; st >= 0; st--) begin
          if ((msum[47:0] >> (48 - (1 << st))) == 48'd0) begin
            msum = msum << (1 << st);
            lz   = lz + 6'(1 << st);
          end
        end
        e    = e - 10'(lz);
        if (e >= 10'sd255)     y = {hi_op.sign, 8'hFF, 23'd0};
        else if (e <= 10'sd0)  y = {hi_op.sign, 31'd0};
        else                   y = {hi_op.sign, e[7:0], msum[46:24]};
      end
    end
  end

endmodule
