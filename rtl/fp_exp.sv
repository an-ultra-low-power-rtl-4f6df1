// fp_exp: single-precision floating-point exponential, y = e^a.
//
// This is the kernel's most expensive operator. It is built from bit
// operations on the input's exponent and mantissa plus a short polynomial:
//   1. |a| is shifted into a fixed-point word with 7 integer and 25 fraction
//      bits (|a| >= 128 saturates to +inf or +0 directly);
//   2. it is multiplied by log2(e) in Q1.31, giving t = a*log2(e);
//   3. t is split into an integer n and a fraction f in [0,1) (for negative a,
//      n = -ceil(|t|) and f = 1 - frac(|t|));
//   4. 2^f = sum_k (ln 2)^k / k! * f^k, k = 0..9, is evaluated by Horner's
//      rule in unsigned Q2.30 (coefficients are floor(c_k * 2^30));
//   5. 2^f in [1,2) becomes the mantissa and n + 127 the exponent.
// The document only says the exponential is decomposed into simple bit
// operations on mantissa and exponent; the range reduction and polynomial
// above are this design's choices. The error is about one unit in the last
// place. Overflow gives +inf, results below the normal range give +0.
//
// Purely combinational.
module fp_exp
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] y
);

  localparam logic [31:0] LOG2E_Q31 = 32'hB8AA_3B29;
  localparam logic [31:0] C [10] = '{
    32'h4000_0000, 32'h2C5C_85FD, 32'h0F5F_DEFF, 32'h038D_611A, 32'h009D_955B,
    32'h0015_D87F, 32'h0002_8612, 32'h0000_3FF9, 32'h0000_058B, 32'h0000_006D
  };

  fp32_t fa;
  logic [23:0] m;
  logic signed [9:0] sh;
  logic [31:0] xfix;      // |a| in Q7.25
  logic [63:0] prod;
  logic [32:0] t;         // |a| * log2(e) in Q8.25
  logic [24:0] f25;
  logic signed [10:0] n;
  logic [31:0] p;         // 2^f in Q2.30
  logic [63:0] acc;
  logic [31:0] f32;

  always_comb begin
    fa   = fp32_t'(a);
    m    = {1'b1, fa.man};
    sh   = 10'(fa.exp) - 10'sd125;
    xfix = '0;
    if (sh >= 0 && sh <= 10'sd8) xfix = 32'(m) << sh;
    else if (sh < 0 && sh > -10'sd24) xfix = 32'(m >> (-sh));
    prod = 64'(xfix) * 64'(LOG2E_Q31);
    t    = 33'(prod >> 31);
    if (!fa.sign) begin
      n   = 11'(t[32:25]);
      f25 = t[24:0];
    end else begin
      n   = -(11'(t[32:25]) + ((t[24:0] != 25'd0) ? 11'sd1 : 11'sd0));
      f25 = -t[24:0];
    end
    f32 = {f25, 7'd0};
    p   = C[9];
    acc = '0;
    for (int k = 8; k >= 0; k--) begin
      acc = 64'(p) * 64'(f32);
      p   = 32'(acc >> 32) + C[k];
    end
    if (p[31]) begin
      p = p >> 1;
      n = n + 11'sd1;
    end

    if (is_nan(fa))
      y = FP_QNAN;
    else if (is_zero(fa))
      y = FP_ONE;
    else if (fa.exp >= 8'd134)            // |a| >= 128
      y = fa.sign ? FP_ZERO : FP_POS_INF;
    else if (n + 11'sd127 >= 11'sd255)
      y = FP_POS_INF;
    else if (n + 11'sd127 <= 11'sd0)
      y = FP_ZERO;
    else
      y = {1'b0, 8'(n + 11'sd127), p[29:7]};
  end

endmodule
