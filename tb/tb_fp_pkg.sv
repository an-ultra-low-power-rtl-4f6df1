// tb_fp_pkg: reference helpers shared by the testbenches.
//
// Converts between binary32 bit patterns and real numbers using only real
// arithmetic on the fields (independent of the design's arithmetic), draws
// random binary32 values in a chosen exponent range, and compares a result
// with a real-valued reference within a relative and an absolute tolerance.
package tb_fp_pkg;

  function automatic real pow2(int e);
    real p;
    p = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) p = p * 2.0;
    else        for (int i = 0; i < -e; i++) p = p / 2.0;
    return p;
  endfunction

  function automatic real fp2real(logic [31:0] v);
    real m;
    int  e;
    if (v[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(v[22:0]) / 8388608.0;
    e = int'(v[30:23]) - 127;
    m = m * pow2(e);
    return v[31] ? -m : m;
  endfunction

  // real -> binary32, truncating (round toward zero), flush small values
  function automatic logic [31:0] real2fp(real r);
    logic s;
    int   e;
    real  m;
    s = (r < 0.0);
    m = s ? -r : r;
    if (m < 1.2e-38) return {s, 31'd0};
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  function automatic logic [31:0] rand_fp(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(0, emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic logic is_nan_bits(logic [31:0] v);
    return v[30:23] == 8'hFF && v[22:0] != 0;
  endfunction

  function automatic logic close(logic [31:0] got, real ref_val, real rel, real abs_tol);
    real g, d, mag;
    if (got[30:23] == 8'hFF) return 1'b0;
    g   = fp2real(got);
    d   = g - ref_val;
    if (d < 0.0) d = -d;
    mag = ref_val < 0.0 ? -ref_val : ref_val;
    return d <= rel * mag + abs_tol;
  endfunction

endpackage
