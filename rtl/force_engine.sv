// force_engine: pipelined nonbonded pair force.
//
// For each pair (i, j) it accepts, the pipeline evaluates the kernel's pair
// force in single precision, one operation per stage group, in the kernel's
// order of operations:
//   d      = p_i - p_j,  r2 = (dx*dx + dy*dy) + dz*dz
//   kqq    = (q_i * dielectric_1) * q_j
//   A, B   = LJ parameters of (type_i, type_j)
//   ti     = (bits(r2) >> 17) + r2_delta_expc          table index
//   diffa  = r2 - float(bits(r2) & 0xfffe0000)         offset inside the bin
//   fast_x = kqq*elec_x + A*vdwA_x - B*vdwB_x           x = b, c, d
//   force_r = -2 * (((3*diffa)*fast_d + 2*fast_c)*diffa + fast_b)
//   force_r = min(force_r, 100) * ivbias
//   f      = (int32)(0.5 + force_r * d)                  per component
// The interpolation is the derivative of a cubic in diffa taken from the
// table bin of r2. The 100 ceiling keeps very close pairs from producing
// huge forces; clamped marks results where it applied.
//
// Interface: in_valid/in_i/in_j accepts a pair every clock (no stall). Atom
// records and table entries are read through synchronous ports (data one
// clock after address) of memories owned by the caller. out_valid/out_i/
// out_j/out_f present the integer force on i (the force on j is its
// negative) LATENCY = 19 clocks after the pair went in.
//
// The operations, their order, the 17-bit bin shift, the clamp and the
// truncating integer conversion follow the document's kernel. The stage
// split is this design's; the original compiler's pipeline was much deeper.
module force_engine
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned IDX_W       = 16,
  parameter int unsigned TABLE_DEPTH = TABLE_DEPTH_D,
  parameter int unsigned LJ_TYPES    = LJ_TYPES_D,
  localparam int unsigned TW  = $clog2(TABLE_DEPTH),
  localparam int unsigned LJW = $clog2(LJ_TYPES * LJ_TYPES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // run parameters
  input  fp32_t              dielectric_1,
  input  logic signed [31:0] r2_delta_expc,
  input  logic [15:0]        m,
  input  fp32_t              ivbias,
  // pair input
  input  logic               in_valid,
  input  logic [IDX_W-1:0]   in_i,
  input  logic [IDX_W-1:0]   in_j,
  // atom memory read ports
  output logic [IDX_W-1:0]   ai_addr,
  input  atom_t              ai_data,
  output logic [IDX_W-1:0]   aj_addr,
  input  atom_t              aj_data,
  // table read ports
  output logic [TW-1:0]      rd_ti,
  input  coef_t              rd_coef,
  output logic [LJW-1:0]     rd_lj,
  input  fp32_t              rd_a,
  input  fp32_t              rd_b,
  // result
  output logic               out_valid,
  output logic [IDX_W-1:0]   out_i,
  output logic [IDX_W-1:0]   out_j,
  output ivec3_t             out_f,
  output logic               clamped
);
  localparam int unsigned LATENCY = 19;

  typedef struct packed {
    logic [IDX_W-1:0] i;
    logic [IDX_W-1:0] j;
    vec3_t            d;
  } carry_t;

  logic [LATENCY:1] v;
  logic [IDX_W-1:0] i1, j1;
  carry_t           c [LATENCY:2];

  // stage values
  fp32_t kq_i2, q_j2, x2, y2, z2, kqq3, sxy4, z24, kqq4, a4, b4, kqq5, r2_5;
  fp32_t a5, b5, diffa6, kqq6, a6, b6;
  logic [LJW-1:0] lj2;
  fp32_t pe_d7, pa_d7, pb_d7, pe_c7, pa_c7, pb_c7, pe_b7, pa_b7, pb_b7, t3_7, diffa7;
  fp32_t sd8, sc8, sb8, pb_d8, pb_c8, pb_b8, t3_8, diffa8;
  fp32_t fd9, fc9, fb9, t3_9, diffa9;
  fp32_t p1_10, q2_10, fb10, diffa10;
  fp32_t p2_11, fb11, diffa11;
  fp32_t p3_12, fb12;
  fp32_t dir13, fr14, fr15, fr16;
  logic  clamp15;
  fp32_t mx17, my17, mz17, ax18, ay18, az18;

  assign ai_addr = in_i;
  assign aj_addr = in_j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-1:1], in_valid};
  end

  // table index from r2 (stage 5 register) and the bin's lower edge
  logic signed [31:0] ti_full;
  assign ti_full = $signed({17'd0, r2_5[31:17]}) + r2_delta_expc;
  assign rd_ti   = ti_full[TW-1:0];
  assign rd_lj   = lj2;

  always_ff @(posedge clk) begin
    // 1: atom records are being read
    i1 <= in_i;
    j1 <= in_j;
    // 2: differences, scaled charge, LJ index
    c[2].i   <= i1;
    c[2].j   <= j1;
    c[2].d.x <= fp_sub(ai_data.pos.x, aj_data.pos.x);
    c[2].d.y <= fp_sub(ai_data.pos.y, aj_data.pos.y);
    c[2].d.z <= fp_sub(ai_data.pos.z, aj_data.pos.z);
    kq_i2    <= fp_mul(ai_data.charge, dielectric_1);
    q_j2     <= aj_data.charge;
    lj2      <= LJW'(ai_data.vdw * 32'(m) + aj_data.vdw);
    // 3: squares, charge product; LJ read in flight
    x2   <= fp_mul(c[2].d.x, c[2].d.x);
    y2   <= fp_mul(c[2].d.y, c[2].d.y);
    z2   <= fp_mul(c[2].d.z, c[2].d.z);
    kqq3 <= fp_mul(kq_i2, q_j2);
    // 4: partial sum; A, B arrive
    sxy4 <= fp_add(x2, y2);
    z24  <= z2;
    kqq4 <= kqq3;
    a4   <= rd_a;
    b4   <= rd_b;
    // 5: r2
    r2_5 <= fp_add(sxy4, z24);
    kqq5 <= kqq4;
    a5   <= a4;
    b5   <= b4;
    // 6: offset in bin; table entry arrives
    diffa6 <= fp_sub(r2_5, {r2_5[31:17], 17'd0});
    kqq6   <= kqq5;
    a6     <= a5;
    b6     <= b5;
    // 7: nine coefficient products and 3*diffa
    pe_d7  <= fp_mul(kqq6, rd_coef.c12);
    pa_d7  <= fp_mul(a6, rd_coef.c04);
    pb_d7  <= fp_mul(b6, rd_coef.c08);
    pe_c7  <= fp_mul(kqq6, rd_coef.c11);
    pa_c7  <= fp_mul(a6, rd_coef.c03);
    pb_c7  <= fp_mul(b6, rd_coef.c07);
    pe_b7  <= fp_mul(kqq6, rd_coef.c10);
    pa_b7  <= fp_mul(a6, rd_coef.c02);
    pb_b7  <= fp_mul(b6, rd_coef.c06);
    t3_7   <= fp_mul(FP_THREE, diffa6);
    diffa7 <= diffa6;
    // 8: electrostatic + van der Waals A
    sd8    <= fp_add(pe_d7, pa_d7);
    sc8    <= fp_add(pe_c7, pa_c7);
    sb8    <= fp_add(pe_b7, pa_b7);
    pb_d8  <= pb_d7;
    pb_c8  <= pb_c7;
    pb_b8  <= pb_b7;
    t3_8   <= t3_7;
    diffa8 <= diffa7;
    // 9: minus van der Waals B
    fd9    <= fp_sub(sd8, pb_d8);
    fc9    <= fp_sub(sc8, pb_c8);
    fb9    <= fp_sub(sb8, pb_b8);
    t3_9   <= t3_8;
    diffa9 <= diffa8;
    // 10..13: Horner form of the derivative
    p1_10   <= fp_mul(t3_9, fd9);
    q2_10   <= fp_mul(FP_TWO, fc9);
    fb10    <= fb9;
    diffa10 <= diffa9;
    p2_11   <= fp_add(p1_10, q2_10);
    fb11    <= fb10;
    diffa11 <= diffa10;
    p3_12   <= fp_mul(p2_11, diffa11);
    fb12    <= fb11;
    dir13   <= fp_add(p3_12, fb12);
    // 14..16: sign and scale, ceiling, bias
    fr14    <= fp_mul(FP_MTWO, dir13);
    clamp15 <= fp_gt(fr14, FP_100);
    fr15    <= fp_gt(fr14, FP_100) ? FP_100 : fr14;
    fr16    <= fp_mul(fr15, ivbias);
    // 17..19: components, rounding offset, integer conversion
    mx17 <= fp_mul(fr16, c[16].d.x);
    my17 <= fp_mul(fr16, c[16].d.y);
    mz17 <= fp_mul(fr16, c[16].d.z);
    ax18 <= fp_add(FP_HALF, mx17);
    ay18 <= fp_add(FP_HALF, my17);
    az18 <= fp_add(FP_HALF, mz17);
    out_f.x <= fp_to_int(ax18);
    out_f.y <= fp_to_int(ay18);
    out_f.z <= fp_to_int(az18);
    for (int k = 3; k <= LATENCY; k++) c[k] <= c[k-1];
  end

  // clamped is reported with the result it belongs to
  logic [LATENCY:16] clamp_d;
  always_ff @(posedge clk) begin
    clamp_d[16] <= clamp15;
    for (int k = 17; k <= LATENCY; k++) clamp_d[k] <= clamp_d[k-1];
  end

  assign out_valid = v[LATENCY];
  assign out_i     = c[LATENCY].i;
  assign out_j     = c[LATENCY].j;
  assign clamped   = v[LATENCY] && clamp_d[LATENCY];

endmodule
