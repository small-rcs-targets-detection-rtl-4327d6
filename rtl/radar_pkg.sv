// radar_pkg: types, constants and IEEE-754 single-precision arithmetic shared by
// the pulse-compression radar processor.
//
// All signal processing after the acquisition front end works on 32-bit
// single-precision floating point, and complex samples travel as a 64-bit
// real/imaginary pair (real in the upper word). The arithmetic functions below
// are combinational and synthesizable. They implement normal numbers with
// round-to-nearest-even; subnormal inputs and results are flushed to zero and
// overflow saturates to infinity. NaN and infinity inputs are not treated
// specially (the datapath never produces them from finite ADC data). These
// simplifications are this design's choice; the floating-point format itself
// follows the processor specification.
//
// fp_from_real() and the twiddle helpers are for elaboration-time constants only.
package radar_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  // Transmit code of the processor (105 chips, first chip = MSB).
  localparam logic [104:0] OPSL_CODE = 105'h1C6387FF5DA4FA325C895958DC5;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Detection record pushed into the target FIFO.
  typedef struct packed {
    logic [8:0] range_idx;    // fast-time cell
    logic [7:0] doppler_idx;  // Doppler FFT bin
    fp32_t      amplitude;    // CUT magnitude
  } detection_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic [26:0] shr_sticky27(input logic [26:0] x, input int unsigned d);
    logic lost;
    logic [26:0] r;
    lost = 1'b0;
    if (d >= 27) begin
      lost = |x;
      r = '0;
    end else begin
      for (int i = 0; i < 27; i++)
        if (i < d) lost |= x[i];
      r = x >> d;
    end
    r[0] = r[0] | lost;
    return r;
  endfunction

  // Round a 24-bit mantissa (leading one at bit 23) with guard and sticky,
  // then pack. e is the biased exponent before rounding.
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [23:0] m,
                                    input logic g, input logic st);
    logic [24:0] mr;
    int er;
    mr = {1'b0, m} + ((g && (st || m[0])) ? 25'd1 : 25'd0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0) return {s, 31'd0};
    if (er >= 255) return {s, 8'hFF, 23'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  // ---------------------------------------------------------------- add/sub
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t hi_op, lo_op;
    logic [23:0] mb, ms;
    logic [26:0] xb, xs;
    logic [27:0] sum;
    int e, d, lz;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? FP_ZERO : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin
      hi_op = a; lo_op = b;
    end else begin
      hi_op = b; lo_op = a;
    end
    mb = {1'b1, hi_op[22:0]};
    ms = {1'b1, lo_op[22:0]};
    e  = int'(hi_op[30:23]);
    d  = int'(hi_op[30:23]) - int'(lo_op[30:23]);
    xb = {mb, 3'b000};
    xs = shr_sticky27({ms, 3'b000}, d);
    if (hi_op[31] == lo_op[31]) begin
      sum = {1'b0, xb} + {1'b0, xs};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, xb} - {1'b0, xs};
      if (sum == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - lz;
    end
    return fp_pack(hi_op[31], e, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  // ---------------------------------------------------------------- multiply
  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic s;
    logic [47:0] p;
    int e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47])
      return fp_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else
      return fp_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // Multiply by 2**k (k may be negative): exponent adjust only.
  function automatic fp32_t fp_scale2(input fp32_t a, input int k);
    int e;
    if (a[30:23] == 8'd0) return FP_ZERO;
    e = int'(a[30:23]) + k;
    if (e <= 0) return {a[31], 31'd0};
    if (e >= 255) return {a[31], 8'hFF, 23'd0};
    return {a[31], e[7:0], a[22:0]};
  endfunction

  // ---------------------------------------------------------------- square root
  // Operand sign is ignored (callers pass non-negative values).
  function automatic fp32_t fp_sqrt(input fp32_t a);
    int ue, re;
    logic [47:0] rad;
    logic [24:0] r, t;
    if (a[30:23] == 8'd0) return FP_ZERO;
    ue = int'(a[30:23]) - 127;
    if (ue % 2 != 0) begin
      rad = {1'b1, a[22:0], 24'd0};       // m * 2^24, exponent ue-1
      re  = (ue - 1) / 2;
    end else begin
      rad = {1'b0, 1'b1, a[22:0], 23'd0}; // m * 2^23, exponent ue
      re  = ue / 2;
    end
    r = '0;
    for (int i = 23; i >= 0; i--) begin
      t = r | (25'd1 << i);
      if ({23'd0, t} * {23'd0, t} <= {2'b00, rad}) r = t;
    end
    // round to nearest: (r + 0.5)^2 < rad  <=>  rad - r^2 > r
    if ({2'b00, rad} - {23'd0, r} * {23'd0, r} > {25'd0, r}) r = r + 25'd1;
    if (r[24]) begin
      r = r >> 1;
      re = re + 1;
    end
    return {1'b0, 8'(re + 127), r[22:0]};
  endfunction

  // ---------------------------------------------------------------- conversion
  // Signed integer (up to 24 bits, so always exact) to single precision.
  function automatic fp32_t fp_from_int24(input logic signed [23:0] v);
    logic s;
    logic [23:0] mag;
    int msb;
    if (v == 24'sd0) return FP_ZERO;
    s = v[23];
    mag = s ? 24'(-v) : 24'(v);
    msb = 0;
    for (int i = 0; i < 24; i++)
      if (mag[i]) msb = i;
    mag = mag << (23 - msb);
    return {s, 8'(127 + msb), mag[22:0]};
  endfunction

  // Non-negative comparison a > b (bit patterns order like magnitudes).
  function automatic logic fp_gt_pos(input fp32_t a, input fp32_t b);
    return a[30:0] > b[30:0];
  endfunction

  // Elaboration-time real to single precision (round to nearest).
  function automatic fp32_t fp_from_real(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return FP_ZERO;
    e = int'(d[62:52]) - 1023 + 127;
    return fp_pack(d[63], e, {1'b1, d[51:29]}, d[28], |d[27:0]);
  endfunction

  // ---------------------------------------------------------------- complex
  function automatic cplx_t c_add(input cplx_t a, input cplx_t b);
    return '{re: fp_add(a.re, b.re), im: fp_add(a.im, b.im)};
  endfunction

  function automatic cplx_t c_sub(input cplx_t a, input cplx_t b);
    return '{re: fp_sub(a.re, b.re), im: fp_sub(a.im, b.im)};
  endfunction

  function automatic cplx_t c_mul(input cplx_t a, input cplx_t b);
    return '{re: fp_sub(fp_mul(a.re, b.re), fp_mul(a.im, b.im)),
             im: fp_add(fp_mul(a.re, b.im), fp_mul(a.im, b.re))};
  endfunction

endpackage
