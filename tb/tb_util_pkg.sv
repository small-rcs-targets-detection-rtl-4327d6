// tb_util_pkg: testbench helpers for reading single-precision words as reals.
//
// fp_to_real decodes a binary32 bit pattern (normal numbers, zero) into a real
// by rebuilding mantissa and exponent, independently of the design's
// arithmetic; c_abs_real gives the magnitude of a complex word and rabs the
// absolute value of a real. Plain functions, no timing. Verification helpers
// only: nothing here comes from the radar specification.
package tb_util_pkg;
  import radar_pkg::*;

  function automatic real fp_to_real(input fp32_t f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127;
    m = (1.0 + real'(f[22:0]) / 8388608.0) * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic real c_abs_real(input cplx_t c);
    return $sqrt(fp_to_real(c.re) ** 2 + fp_to_real(c.im) ** 2);
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
endpackage
