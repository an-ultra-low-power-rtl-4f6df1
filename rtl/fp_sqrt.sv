// fp_sqrt: single-precision floating-point square root.
//
// y = sqrt(a), used to turn the running variance into a standard deviation.
// The unbiased exponent is made even by moving one bit into the mantissa,
// halved, and the mantissa root is found with a restoring digit-by-digit
// integer square root producing 24 result bits. The document names a
// standalone square-root unit without its insides, so this structure,
// truncation and flush-to-zero are this design's choices. A negative
// non-zero input gives a quiet NaN; -0 gives -0.
//
// Purely combinational.
module fp_sqrt
  import fp32_pkg::*;
(
  input  logic [31:0] a,
  output logic [31:0] y
);

  fp32_t fa;
  logic signed [9:0] eu;
  logic [47:0] rad;       // radicand, 2 fractional bits per result bit
  logic [49:0] rem;
  logic [23:0] root;
  logic [49:0] trial;
  logic        ge;

  always_comb begin
    fa   = fp32_t'(a);
    eu   = 10'(fa.exp) - 10'sd127;
    if (eu[0]) begin
      rad = 48'({1'b1, fa.man}) << 24;  // mantissa * 2, aligned
      eu  = eu - 10'sd1;
    end else begin
      rad = 48'({1'b1, fa.man}) << 23;
    end
    rem  = '0;
    root = '0;
    trial = '0;
    ge    = 1'b0;
    for (int i = 23; i >= 0; i--) begin
      rem   = (rem << 2) | 50'(rad[2*i +: 2]);
      trial = {24'd0, root, 2'b01};
      ge    = (rem >= trial);
      rem   = ge ? rem - trial : rem;
      root  = {root[22:0], ge};
    end

    if (is_nan(fa))
      y = FP_QNAN;
    else if (is_zero(fa))
      y = {fa.sign, 31'd0};
    else if (fa.sign)
      y = FP_QNAN;
    else if (is_inf(fa))
      y = FP_POS_INF;
    else
      y = {1'b0, 8'((eu >>> 1) + 10'sd127), root[22:0]};
  end

endmodule
