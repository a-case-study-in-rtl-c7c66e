// fp32_pkg: IEEE-754 single-precision arithmetic used by the force kernel.
//
// The kernel works in single precision for positions, distances and force
// magnitudes, and converts each force component to a 32-bit integer at the
// end. These functions are the combinational arithmetic behind every
// floating-point step in the distance and force pipelines: multiply, add,
// subtract, compare and float-to-integer conversion.
//
// Number handling (this design's choice; the kernel only ever sees finite
// values): results are rounded to nearest, ties to even. Subnormal inputs are
// read as zero and results too small to be normal are flushed to a signed
// zero. Results too large become infinity. NaN is not produced or checked.
// The integer conversion truncates toward zero like a C cast and saturates
// outside the 32-bit range.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO  = 32'h0000_0000;
  localparam fp32_t FP_HALF  = 32'h3f00_0000;  // 0.5
  localparam fp32_t FP_ONE   = 32'h3f80_0000;  // 1.0
  localparam fp32_t FP_TWO   = 32'h4000_0000;  // 2.0
  localparam fp32_t FP_THREE = 32'h4040_0000;  // 3.0
  localparam fp32_t FP_MTWO  = 32'hc000_0000;  // -2.0
  localparam fp32_t FP_100   = 32'h42c8_0000;  // 100.0

  // Pack sign, biased exponent (may be out of range) and a 24-bit significand
  // with its hidden bit already set; flush to zero or saturate to infinity.
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [23:0] m);
    if (e <= 0)        return {s, 31'd0};
    else if (e >= 255) return {s, 8'hff, 23'd0};
    else               return {s, e[7:0], m[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    mr = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return fp_pack(s, e, mr[23:0]);
  endfunction

  // a + b. Both significands sit in a 50-bit field with 26 bits below the
  // hidden bit; whatever the alignment shift pushes out is kept as a sticky
  // bit in the LSB, which is far below the rounding position.
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [49:0] mx, my, sh;
    logic [50:0] sum;
    int          d, lz, e;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    logic        s;
    // zero (or subnormal) operands
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    // x has the larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b1, x[22:0], 26'd0};
    my = {1'b1, y[22:0], 26'd0};
    if (d >= 50) begin
      sh = 50'd1;
    end else begin
      sh = my >> d;
      // sticky: any one bit shifted out
      if ((sh << d) != my) sh[0] = 1'b1;
    end
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, sh};
    else                sum = {1'b0, mx} - {1'b0, sh};
    if (sum == 51'd0) return FP_ZERO;
    s  = x[31];
    lz = 0;
    for (int k = 50; k >= 0; k--) begin
      if (sum[k]) break;
      lz++;
    end
    // leading one goes to bit 50
    sum = sum << lz;
    e   = int'(x[30:23]) + 1 - lz;
    m   = sum[50:27];
    g   = sum[26];
    st  = |sum[25:0];
    mr  = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    return fp_pack(s, e, mr[23:0]);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  // a > b for finite values; +0 and -0 compare equal.
  function automatic logic fp_gt(input fp32_t a, input fp32_t b);
    logic az, bz;
    az = (a[30:23] == 8'd0);
    bz = (b[30:23] == 8'd0);
    if (az && bz)            return 1'b0;
    if (az)                  return b[31];
    if (bz)                  return ~a[31];
    if (a[31] != b[31])      return b[31];
    if (!a[31])              return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

  function automatic logic fp_le(input fp32_t a, input fp32_t b);
    return !fp_gt(a, b);
  endfunction

  // (int32_t) cast: truncate toward zero, saturate when out of range.
  function automatic logic signed [31:0] fp_to_int(input fp32_t a);
    int          e;
    logic [55:0] v;
    logic [31:0] mag;
    e = int'(a[30:23]) - 127;
    if (e < 0) return 32'sd0;
    if (e >= 31) return a[31] ? 32'sh8000_0000 : 32'sh7fff_ffff;
    v   = {32'd0, 1'b1, a[22:0]} << e;
    mag = v[54:23];
    return a[31] ? -$signed(mag) : $signed(mag);
  endfunction

endpackage
