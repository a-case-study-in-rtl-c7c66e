// distance_lane: one lane of the distance engine.
//
// For each pair (i, j) it is given, the lane forms the squared distance
//   r2 = (xi-xj)^2 + (yi-yj)^2 + (zi-zj)^2
// in single precision, in the kernel's order of operations, and passes the
// pair on when r2 <= cutoff2. Pairs outside the cutoff are dropped here, so
// the force pipeline behind only sees pairs that contribute.
//
// Timing: a four-stage pipeline that accepts one pair per clock
// (difference, squares, first sum, second sum and compare). out_valid is
// high LATENCY clocks after in_valid for pairs that pass; out_tested is high
// for every pair, passed or not. There is no stall input: the issuing logic
// must stop early enough to absorb LATENCY pairs still in flight.
module distance_lane
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_i,
  input  logic [IDX_W-1:0] in_j,
  input  vec3_t            pos_i,
  input  vec3_t            pos_j,
  input  fp32_t            cutoff2,
  output logic             out_valid,
  output logic             out_tested,
  output logic [IDX_W-1:0] out_i,
  output logic [IDX_W-1:0] out_j,
  output fp32_t            out_r2
);
  localparam int unsigned LATENCY = 4;

  logic [3:1]       v;
  logic [IDX_W-1:0] i1, j1, i2, j2, i3, j3;
  fp32_t            dx, dy, dz, x2, y2, z2, sxy, z2_3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v          <= '0;
      out_valid  <= 1'b0;
      out_tested <= 1'b0;
    end else begin
      v          <= {v[2:1], in_valid};
      out_tested <= v[3];
      out_valid  <= v[3] && fp_le(fp_add(sxy, z2_3), cutoff2);
    end
  end

  always_ff @(posedge clk) begin
    // stage 1: coordinate differences
    dx <= fp_sub(pos_i.x, pos_j.x);
    dy <= fp_sub(pos_i.y, pos_j.y);
    dz <= fp_sub(pos_i.z, pos_j.z);
    i1 <= in_i;
    j1 <= in_j;
    // stage 2: squares
    x2 <= fp_mul(dx, dx);
    y2 <= fp_mul(dy, dy);
    z2 <= fp_mul(dz, dz);
    i2 <= i1;
    j2 <= j1;
    // stage 3: first partial sum
    sxy  <= fp_add(x2, y2);
    z2_3 <= z2;
    i3   <= i2;
    j3   <= j2;
    // stage 4: r2 (compare in the reset block above)
    out_r2 <= fp_add(sxy, z2_3);
    out_i  <= i3;
    out_j  <= j3;
  end

endmodule
