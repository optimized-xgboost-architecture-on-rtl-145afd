// tb_fp_pkg: reference arithmetic for the testbenches.
//
// fp32 numbers are converted to and from the simulator's double-precision
// real type with plain integer bit manipulation, so that the references do
// not depend on the design's own operators. Conversions follow the design's
// number conventions: subnormal fp32 inputs read as zero, results are
// rounded to nearest/even and flushed to zero below the normal range.
// The sum of two fp32 numbers is computed exactly (or, for very different
// exponents, with a rounding that cannot change the fp32 result) in double
// precision and then rounded once to fp32.
package tb_fp_pkg;

  function automatic real fp2real(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real2fp(input real r);
    logic [63:0] d;
    logic        s, g, st, inc;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == '0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = (d[27:0] != '0);
    inc = g & (st | m[0]);
    m = m + 25'(inc);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return real2fp(fp2real(a) + fp2real(b));
  endfunction

  // random normal fp32 with an exponent in [emin, emax] (biased)
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    return f;
  endfunction

endpackage
