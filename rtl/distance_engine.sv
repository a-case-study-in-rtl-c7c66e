// distance_engine: cutoff filter in front of the force pipeline.
//
// The engine walks the pair list of one compute engine. Its outer loop runs
// over the atoms i = i_first, i_first + i_step, ... below i_to; for each i
// the inner range is j in (i, i_upper) for a self patch (do_self) and
// [i_upper, i_upper + j_upper) for a pair of patches, the ranges the kernel
// uses. LANES lanes share the inner range: lane l tests j = j_from + l,
// j_from + l + LANES, ... so LANES pairs are tested per clock. Each lane
// pushes the pairs inside the cutoff into its own queue, and a round-robin
// arbiter moves one queued pair per clock to the output. That is the rate
// of the single force pipeline behind it.
//
// Memory: positions are read through LANES+1 synchronous read ports
// (pi_addr/pi_data for atom i, pj_addr/pj_data per lane) of the owner's
// atom memory, with data expected one clock after the address.
//
// Flow control: issuing stops (stall high) while any lane queue is almost
// full; the queue's slack covers the pairs still in the read and lane
// pipelines. busy is high from start until everything issued has been
// tested and every lane queue is empty.
//
// The lanes, the per-lane queues and the shared j queue follow the
// document's compute engine. The interleaved split of j over the lanes
// follows its overview figure. The queue depth and the arbiter are this
// design's own.
module distance_engine
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned LANES   = 6,
  parameter int unsigned IDX_W   = 16,
  parameter int unsigned Q_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IDX_W-1:0] i_first,
  input  logic [IDX_W-1:0] i_step,
  input  logic [IDX_W-1:0] i_to,
  input  logic             do_self,
  input  logic [IDX_W-1:0] i_upper,
  input  logic [IDX_W-1:0] j_upper,
  input  fp32_t            cutoff2,
  // position read ports
  output logic [IDX_W-1:0] pi_addr,
  input  vec3_t            pi_data,
  output logic [IDX_W-1:0] pj_addr [LANES],
  input  vec3_t            pj_data [LANES],
  // pairs inside the cutoff
  output logic             out_valid,
  output logic [IDX_W-1:0] out_i,
  output logic [IDX_W-1:0] out_j,
  input  logic             out_ready,
  // status
  output logic             busy,
  output logic             stall,
  output logic [LANES-1:0] lane_tested,
  output logic [LANES-1:0] lane_passed
);
  localparam int unsigned LANE_LAT = 4;
  localparam int unsigned AF_SLACK = LANE_LAT + 3;
  localparam int unsigned PW       = 2 * IDX_W;
  localparam int unsigned LW       = (LANES > 1) ? $clog2(LANES) : 1;

  // ---------------------------------------------------------------- issue
  logic             issuing;
  logic [IDX_W-1:0] cur_i, j_base, j_end;
  logic             have_i;        // cur_i's range is loaded
  logic [LANES-1:0] q_af, q_empty;
  logic [IDX_W-1:0] i_step_r, i_to_r, i_upper_r, j_upper_r;
  logic             do_self_r;

  // stage-1 registers (read data arrives alongside)
  logic [LANES-1:0] s1_v;
  logic [IDX_W-1:0] s1_i;
  logic [IDX_W-1:0] s1_j [LANES];

  assign stall = issuing && have_i && (|q_af);

  function automatic logic [IDX_W-1:0] range_from(input logic [IDX_W-1:0] i);
    return do_self_r ? i + 1'b1 : i_upper_r;
  endfunction
  function automatic logic [IDX_W-1:0] range_to();
    return do_self_r ? i_upper_r : i_upper_r + j_upper_r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      have_i  <= 1'b0;
      s1_v    <= '0;
    end else begin
      s1_v <= '0;
      if (start) begin
        issuing   <= (i_first < i_to);
        have_i    <= 1'b0;
        cur_i     <= i_first;
        i_step_r  <= i_step;
        i_to_r    <= i_to;
        i_upper_r <= i_upper;
        j_upper_r <= j_upper;
        do_self_r <= do_self;
      end else if (issuing && !have_i) begin
        // load the inner range of cur_i
        j_base <= range_from(cur_i);
        j_end  <= range_to();
        have_i <= 1'b1;
      end else if (issuing && have_i && !(|q_af)) begin
        for (int l = 0; l < LANES; l++)
          s1_v[l] <= (32'(j_base) + l < 32'(j_end));
        if (32'(j_base) + LANES >= 32'(j_end)) begin
          have_i <= 1'b0;
          cur_i  <= cur_i + i_step_r;
          if (32'(cur_i) + 32'(i_step_r) >= 32'(i_to_r)) issuing <= 1'b0;
        end else begin
          j_base <= j_base + IDX_W'(LANES);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    s1_i <= cur_i;
    for (int l = 0; l < LANES; l++) s1_j[l] <= j_base + IDX_W'(l);
  end

  assign pi_addr = cur_i;
  always_comb
    for (int l = 0; l < LANES; l++) pj_addr[l] = j_base + IDX_W'(l);

  // ---------------------------------------------------------------- lanes
  logic             ln_v [LANES];
  logic [IDX_W-1:0] ln_i [LANES];
  logic [IDX_W-1:0] ln_j [LANES];
  logic [PW-1:0]    q_rdata [LANES];
  logic [LANES-1:0] q_pop;
  logic [LANE_LAT:0] inflight_any;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [$clog2(Q_DEPTH+1)-1:0] q_count;
    logic                         q_full;
    fp32_t                        r2_unused;

    distance_lane #(.IDX_W(IDX_W)) u_lane (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (s1_v[l]),
      .in_i      (s1_i),
      .in_j      (s1_j[l]),
      .pos_i     (pi_data),
      .pos_j     (pj_data[l]),
      .cutoff2   (cutoff2),
      .out_valid (ln_v[l]),
      .out_tested(lane_tested[l]),
      .out_i     (ln_i[l]),
      .out_j     (ln_j[l]),
      .out_r2    (r2_unused)
    );

    assign lane_passed[l] = ln_v[l];

    sync_fifo #(.WIDTH(PW), .DEPTH(Q_DEPTH), .AF_SLACK(AF_SLACK)) u_q (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (ln_v[l]),
      .wdata      ({ln_i[l], ln_j[l]}),
      .pop        (q_pop[l]),
      .rdata      (q_rdata[l]),
      .empty      (q_empty[l]),
      .full       (q_full),
      .almost_full(q_af[l]),
      .count      (q_count)
    );
  end

  // pairs still in the read stage or the lane pipelines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight_any <= '0;
    else        inflight_any <= {inflight_any[LANE_LAT-1:0], |s1_v};
  end

  // ------------------------------------------------------------- arbiter
  logic [LW-1:0] rr;      // lane with the highest priority
  logic [LW-1:0] grant;
  logic          any;

  always_comb begin
    any   = 1'b0;
    grant = rr;
    for (int k = 0; k < LANES; k++) begin
      int unsigned idx;
      idx = (32'(rr) + k) % LANES;
      if (!any && !q_empty[idx]) begin
        any   = 1'b1;
        grant = LW'(idx);
      end
    end
  end

  assign out_valid = any;
  assign {out_i, out_j} = q_rdata[grant];

  always_comb begin
    q_pop = '0;
    if (any && out_ready) q_pop[grant] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any && out_ready) rr <= (32'(grant) == LANES - 1) ? '0 : grant + 1'b1;
  end

  assign busy = issuing || (|s1_v) || (|inflight_any) || !(&q_empty);

endmodule
