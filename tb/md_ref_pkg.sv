// md_ref_pkg: reference model of the pair-force kernel for the testbenches.
//
// Works in double precision and rounds to single precision after every
// operation (round to nearest even), which gives exactly the IEEE single
// result for +, - and * because a double holds more than twice the
// single-precision significand. Subnormal single values are flushed to
// zero, as the hardware does. The model is written independently of the
// RTL arithmetic: it goes through the simulator's real type rather than
// through integer significand logic.
package md_ref_pkg;
  import fp32_pkg::*;
  import md_pkg::*;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] k;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    k  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || k[0])) k = k + 1;
    if (k[23]) begin
      k = '0;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic signed [31:0] f2i(input logic [31:0] a);
    real r;
    r = f2r(a);
    if (r >= 2147483647.0)  return 32'sh7fff_ffff;
    if (r <= -2147483648.0) return 32'sh8000_0000;
    return $rtoi(r);
  endfunction

  // uniform random single-precision value in [lo, hi)
  function automatic logic [31:0] frand(input real lo, input real hi);
    real u;
    u = real'($urandom % 1000000) / 1000000.0;
    return r2f(lo + u * (hi - lo));
  endfunction

  function automatic logic [31:0] pair_r2(input atom_t ai, input atom_t aj);
    logic [31:0] dx, dy, dz;
    dx = fsub(ai.pos.x, aj.pos.x);
    dy = fsub(ai.pos.y, aj.pos.y);
    dz = fsub(ai.pos.z, aj.pos.z);
    return fadd(fadd(fmul(dx, dx), fmul(dy, dy)), fmul(dz, dz));
  endfunction

  function automatic bit in_cutoff(input logic [31:0] r2, input logic [31:0] cutoff2);
    return f2r(r2) <= f2r(cutoff2);
  endfunction

  // table index exactly as the kernel forms it, before truncation to the
  // table's address width
  function automatic int table_index(input logic [31:0] r2, input int expc);
    return int'(r2 >> 17) + expc;
  endfunction

  function automatic int lj_index(input atom_t ai, input atom_t aj, input int m);
    return int'(ai.vdw) * m + int'(aj.vdw);
  endfunction

  // force on atom i from atom j; clamp reports the 100 ceiling
  function automatic ivec3_t pair_force(input atom_t ai, input atom_t aj, input coef_t ce,
                                        input logic [31:0] a, input logic [31:0] b,
                                        input logic [31:0] dielectric_1,
                                        input logic [31:0] ivbias, output bit clamp);
    logic [31:0] dx, dy, dz, r2, kqq, diffa, fd, fc, fb, fr;
    ivec3_t      f;
    dx    = fsub(ai.pos.x, aj.pos.x);
    dy    = fsub(ai.pos.y, aj.pos.y);
    dz    = fsub(ai.pos.z, aj.pos.z);
    r2    = fadd(fadd(fmul(dx, dx), fmul(dy, dy)), fmul(dz, dz));
    kqq   = fmul(fmul(ai.charge, dielectric_1), aj.charge);
    diffa = fsub(r2, r2 & 32'hfffe_0000);
    fd    = fsub(fadd(fmul(kqq, ce.c12), fmul(a, ce.c04)), fmul(b, ce.c08));
    fc    = fsub(fadd(fmul(kqq, ce.c11), fmul(a, ce.c03)), fmul(b, ce.c07));
    fb    = fsub(fadd(fmul(kqq, ce.c10), fmul(a, ce.c02)), fmul(b, ce.c06));
    fr    = fmul(r2f(-2.0),
                 fadd(fmul(fadd(fmul(fmul(r2f(3.0), diffa), fd), fmul(r2f(2.0), fc)), diffa), fb));
    clamp = f2r(fr) > 100.0;
    if (clamp) fr = r2f(100.0);
    fr  = fmul(fr, ivbias);
    f.x = f2i(fadd(r2f(0.5), fmul(fr, dx)));
    f.y = f2i(fadd(r2f(0.5), fmul(fr, dy)));
    f.z = f2i(fadd(r2f(0.5), fmul(fr, dz)));
    return f;
  endfunction

endpackage
