// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Single-precision operations are computed in double precision and rounded
// once to single (round to nearest, ties to even). For +, - and * of two
// single-precision numbers this gives the correctly rounded result, because
// a double holds 53 >= 2*24 + 2 significand bits. Subnormal values are
// treated as zero, on input and on output, as the RTL does. The package
// also holds a reference model of the 8-point radix-2 transforms with the
// same order of operations as the RTL, and a direct DFT in double precision.
package fp_ref_pkg;

  typedef logic [31:0] f32;

  function automatic real f2r(f32 x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return $bitstoreal({x[31], 63'd0});
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic f32 r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic f32 fadd(f32 a, f32 b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic f32 fsub(f32 a, f32 b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic f32 fmul(f32 a, f32 b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal number with |x| in [2^(emin-127), 2^(emax-127+1))
  function automatic f32 rand_f32(int emin, int emax);
    int unsigned span = unsigned'(emax - emin + 1);
    return {1'($urandom), 8'(emin + int'($urandom % span)), 23'($urandom)};
  endfunction

  typedef struct {
    f32 re;
    f32 im;
  } cpx;

  // a + W*b, a - W*b; kind 0: W = 1, 1: W = +j, 2: W = -j, 3: general
  function automatic void bfly(cpx a, cpx b, int kind, f32 wr, f32 wi,
                               output cpx p, output cpx q);
    cpx t;
    case (kind)
      0: t = b;
      1: t = '{re: {~b.im[31], b.im[30:0]}, im: b.re};
      2: t = '{re: b.im, im: {~b.re[31], b.re[30:0]}};
      default: begin
        t.re = fsub(fmul(b.re, wr), fmul(b.im, wi));
        t.im = fadd(fmul(b.re, wi), fmul(b.im, wr));
      end
    endcase
    p = '{re: fadd(a.re, t.re), im: fadd(a.im, t.im)};
    q = '{re: fsub(a.re, t.re), im: fsub(a.im, t.im)};
  endfunction

  // Radix-2 DIT, bit-reversed input, twiddle magnitude c; inverse scales by 1/8.
  function automatic void fft8_ref(input cpx x[8], input bit inverse, input f32 c,
                                   output cpx y[8]);
    cpx v[8], nv[8];
    int rev[8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    f32 nc = {1'b1, c[30:0]};
    for (int n = 0; n < 8; n++) v[n] = x[rev[n]];
    for (int s = 0; s < 3; s++) begin
      int span = 1 << s;
      for (int blk = 0; blk < 8; blk += 2 * span)
        for (int k = 0; k < span; k++) begin
          int tw = (8 / (2 * span)) * k;
          int kind;
          f32 wr, wi;
          kind = (tw == 0) ? 0 : (tw == 2) ? (inverse ? 1 : 2) : 3;
          wr = (tw == 1) ? c : nc;
          wi = inverse ? c : nc;
          bfly(v[blk+k], v[blk+k+span], kind, wr, wi, nv[blk+k], nv[blk+k+span]);
        end
      v = nv;
    end
    for (int n = 0; n < 8; n++)
      y[n] = inverse ? '{re: fmul(v[n].re, 32'h3E00_0000), im: fmul(v[n].im, 32'h3E00_0000)}
                     : v[n];
  endfunction

  // Direct DFT in double precision with exact twiddles (inverse: 1/8 scaling).
  function automatic void dft8_real(input real xr[8], input real xi[8], input bit inverse,
                                    output real yr[8], output real yi[8]);
    real pi = 3.14159265358979323846;
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ang = (inverse ? 2.0 : -2.0) * pi * n * k / 8.0;
        yr[k] += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        yi[k] += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      if (inverse) begin
        yr[k] /= 8.0;
        yi[k] /= 8.0;
      end
    end
  endfunction

endpackage
