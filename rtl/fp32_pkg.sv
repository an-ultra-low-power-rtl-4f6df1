// fp32_pkg: shared types and constants for the single-precision datapath.
//
// Every arithmetic unit in the detector works on IEEE-754 binary32 words,
// split into sign, biased exponent and 23-bit fraction. The package holds
// that field view, a few constants and the detector's default sizes: 55
// support vectors of two features, smoothing constant a = 0.01 and kernel
// coefficient Gamma = 1. Subnormal numbers are not supported anywhere in the
// design: they are read as zero and results that would be subnormal are
// flushed to zero; results are truncated (rounded toward zero). Both are
// choices of this implementation.
package fp32_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam logic [31:0] FP_ZERO    = 32'h0000_0000;
  localparam logic [31:0] FP_ONE     = 32'h3F80_0000;
  localparam logic [31:0] FP_QNAN    = 32'h7FC0_0000;
  localparam logic [31:0] FP_POS_INF = 32'h7F80_0000;

  // Detector defaults
  localparam int unsigned NUM_SV_DEFAULT   = 55;
  localparam int unsigned NUM_FEAT_DEFAULT = 2;
  localparam logic [31:0] IIR_A_DEFAULT    = 32'h3C23_D70A;  // 0.01
  localparam logic [31:0] GAMMA_DEFAULT    = 32'h3F80_0000;  // 1.0

  function automatic logic is_zero(fp32_t v);
    return v.exp == 8'd0;
  endfunction

  function automatic logic is_inf(fp32_t v);
    return v.exp == 8'hFF && v.man == 23'd0;
  endfunction

  function automatic logic is_nan(fp32_t v);
    return v.exp == 8'hFF && v.man != 23'd0;
  endfunction

endpackage
