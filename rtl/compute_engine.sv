// compute_engine: one chip's share of the nonbonded force computation.
//
// Each FPGA of the accelerator holds one compute engine that handles every
// I_STEP-th atom i (the primary chip the even i, the secondary chip the odd
// i). Inside, the work is split in two decoupled halves:
//  - the distance engine tests LANES pairs per clock against the cutoff and
//    queues the pairs that are inside it;
//  - a shared j queue feeds the single force pipeline, which computes one
//    pair force per clock.
// The force on i is added to a per-atom accumulator fi_acc[i], and its
// negative to a second accumulator fj_acc[j] (Newton's third law), so each
// pair is computed once. Two arrays keep the two read-modify-writes of a
// clock in different memories. Both are cleared as the atoms are loaded.
// The engine's result for atom k is fi_acc[k] + fj_acc[k]. The caller adds
// the engines' results and the input force.
//
// Memories: a local copy of the atom records (positions, charge, van der
// Waals type) with LANES+3 synchronous read ports, and a local copy of the
// lookup tables (coef_tables). Both are written through the load ports
// before a run.
//
// Control: start (one clock, with the run parameters stable for the whole
// run) starts the pair walk; busy stays high until the last force has been
// accumulated, and done pulses for one clock then. res_addr/res_f read a
// result one clock after the address.
//
// The split into distance lanes, queue and force engine follows the
// document's de-coupled compute engine. The two accumulator arrays follow
// its two force copies per atom (one for the i role, one for the j role).
module compute_engine
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned LANES       = 6,
  parameter int unsigned MAX_ATOMS   = MAX_ATOMS_D,
  parameter int unsigned TABLE_DEPTH = TABLE_DEPTH_D,
  parameter int unsigned LJ_TYPES    = LJ_TYPES_D,
  parameter int unsigned J_DEPTH     = 64,
  localparam int unsigned IDX_W = 16,
  localparam int unsigned AW    = $clog2(MAX_ATOMS),
  localparam int unsigned TW    = $clog2(TABLE_DEPTH),
  localparam int unsigned LJW   = $clog2(LJ_TYPES * LJ_TYPES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // atom load
  input  logic             ld_we,
  input  logic [IDX_W-1:0] ld_addr,
  input  atom_t            ld_atom,
  // table load
  input  logic             tf_we,
  input  logic [TW-1:0]    tf_addr,
  input  logic [2:0]       tf_word,
  input  logic [63:0]      tf_data,
  input  logic             lj_we,
  input  logic [LJW-1:0]   lj_addr,
  input  logic [63:0]      lj_data,
  // run control
  input  logic             start,
  input  logic [IDX_W-1:0] i_first,
  input  logic [IDX_W-1:0] i_step,
  input  run_params_t      prm,
  output logic             busy,
  output logic             done,
  // results
  input  logic [IDX_W-1:0] res_addr,
  output ivec3_t           res_f,
  // activity, one pulse per event
  output logic             ev_stall,
  output logic             ev_queue_full,
  output logic             ev_pair,
  output logic             ev_clamp,
  output logic [LANES-1:0] ev_tested
);
  localparam int unsigned DEPTH = 1 << AW;

  // ------------------------------------------------------------ atom memory
  atom_t atoms [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) atoms[ld_addr[AW-1:0]] <= ld_atom;
  end

  logic [IDX_W-1:0] pi_addr, ai_addr, aj_addr;
  logic [IDX_W-1:0] pj_addr [LANES];
  vec3_t            pi_data;
  vec3_t            pj_data [LANES];
  atom_t            ai_data, aj_data;

  always_ff @(posedge clk) begin
    pi_data <= atoms[pi_addr[AW-1:0]].pos;
    for (int l = 0; l < LANES; l++) pj_data[l] <= atoms[pj_addr[l][AW-1:0]].pos;
    ai_data <= atoms[ai_addr[AW-1:0]];
    aj_data <= atoms[aj_addr[AW-1:0]];
  end

  // ---------------------------------------------------------- lookup tables
  logic [TW-1:0]  rd_ti;
  coef_t          rd_coef;
  logic [LJW-1:0] rd_lj;
  fp32_t          rd_a, rd_b;

  coef_tables #(.TABLE_DEPTH(TABLE_DEPTH), .LJ_TYPES(LJ_TYPES)) u_tables (
    .clk    (clk),
    .tf_we  (tf_we),
    .tf_addr(tf_addr),
    .tf_word(tf_word),
    .tf_data(tf_data),
    .lj_we  (lj_we),
    .lj_addr(lj_addr),
    .lj_data(lj_data),
    .rd_ti  (rd_ti),
    .rd_coef(rd_coef),
    .rd_lj  (rd_lj),
    .rd_a   (rd_a),
    .rd_b   (rd_b)
  );

  // -------------------------------------------------------- distance engine
  logic             de_valid, de_ready, de_busy;
  logic [IDX_W-1:0] de_i, de_j;
  logic [LANES-1:0] de_passed;

  distance_engine #(.LANES(LANES), .IDX_W(IDX_W)) u_dist (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .i_first    (i_first),
    .i_step     (i_step),
    .i_to       (prm.do_self ? prm.i_upper - 1'b1 : prm.i_upper),
    .do_self    (prm.do_self),
    .i_upper    (prm.i_upper),
    .j_upper    (prm.j_upper),
    .cutoff2    (prm.cutoff2),
    .pi_addr    (pi_addr),
    .pi_data    (pi_data),
    .pj_addr    (pj_addr),
    .pj_data    (pj_data),
    .out_valid  (de_valid),
    .out_i      (de_i),
    .out_j      (de_j),
    .out_ready  (de_ready),
    .busy       (de_busy),
    .stall      (ev_stall),
    .lane_tested(ev_tested),
    .lane_passed(de_passed)
  );

  // ---------------------------------------------------------------- j queue
  logic                         jq_empty, jq_full, jq_af;
  logic [2*IDX_W-1:0]           jq_rdata;
  logic [$clog2(J_DEPTH+1)-1:0] jq_count;
  logic                         fe_in;

  assign de_ready      = !jq_full;
  assign fe_in         = !jq_empty;
  assign ev_queue_full = de_valid && jq_full;
  assign ev_pair       = fe_in;

  sync_fifo #(.WIDTH(2 * IDX_W), .DEPTH(J_DEPTH), .AF_SLACK(1)) u_jq (
    .clk        (clk),
    .rst_n      (rst_n),
    .push       (de_valid && de_ready),
    .wdata      ({de_i, de_j}),
    .pop        (fe_in),
    .rdata      (jq_rdata),
    .empty      (jq_empty),
    .full       (jq_full),
    .almost_full(jq_af),
    .count      (jq_count)
  );

  // ----------------------------------------------------------- force engine
  logic             fe_out;
  logic [IDX_W-1:0] fe_i, fe_j;
  ivec3_t           fe_f;

  force_engine #(.IDX_W(IDX_W), .TABLE_DEPTH(TABLE_DEPTH), .LJ_TYPES(LJ_TYPES)) u_force (
    .clk          (clk),
    .rst_n        (rst_n),
    .dielectric_1 (prm.dielectric_1),
    .r2_delta_expc(prm.r2_delta_expc),
    .m            (prm.m),
    .ivbias       (prm.ivbias),
    .in_valid     (fe_in),
    .in_i         (jq_rdata[2*IDX_W-1:IDX_W]),
    .in_j         (jq_rdata[IDX_W-1:0]),
    .ai_addr      (ai_addr),
    .ai_data      (ai_data),
    .aj_addr      (aj_addr),
    .aj_data      (aj_data),
    .rd_ti        (rd_ti),
    .rd_coef      (rd_coef),
    .rd_lj        (rd_lj),
    .rd_a         (rd_a),
    .rd_b         (rd_b),
    .out_valid    (fe_out),
    .out_i        (fe_i),
    .out_j        (fe_j),
    .out_f        (fe_f),
    .clamped      (ev_clamp)
  );

  // ----------------------------------------------------------- accumulators
  ivec3_t fi_acc [DEPTH];
  ivec3_t fj_acc [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      fi_acc[ld_addr[AW-1:0]] <= '0;
      fj_acc[ld_addr[AW-1:0]] <= '0;
    end else if (fe_out) begin
      fi_acc[fe_i[AW-1:0]].x <= fi_acc[fe_i[AW-1:0]].x + fe_f.x;
      fi_acc[fe_i[AW-1:0]].y <= fi_acc[fe_i[AW-1:0]].y + fe_f.y;
      fi_acc[fe_i[AW-1:0]].z <= fi_acc[fe_i[AW-1:0]].z + fe_f.z;
      fj_acc[fe_j[AW-1:0]].x <= fj_acc[fe_j[AW-1:0]].x - fe_f.x;
      fj_acc[fe_j[AW-1:0]].y <= fj_acc[fe_j[AW-1:0]].y - fe_f.y;
      fj_acc[fe_j[AW-1:0]].z <= fj_acc[fe_j[AW-1:0]].z - fe_f.z;
    end
  end

  always_ff @(posedge clk) begin
    res_f.x <= fi_acc[res_addr[AW-1:0]].x + fj_acc[res_addr[AW-1:0]].x;
    res_f.y <= fi_acc[res_addr[AW-1:0]].y + fj_acc[res_addr[AW-1:0]].y;
    res_f.z <= fi_acc[res_addr[AW-1:0]].z + fj_acc[res_addr[AW-1:0]].z;
  end

  // ---------------------------------------------------------------- control
  logic [5:0] fe_inflight;  // pairs inside the force pipeline
  logic       running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_inflight <= '0;
      running     <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      case ({fe_in, fe_out})
        2'b10:   fe_inflight <= fe_inflight + 1'b1;
        2'b01:   fe_inflight <= fe_inflight - 1'b1;
        default: ;
      endcase
      if (start) begin
        running <= 1'b1;
      end else if (running && !de_busy && jq_empty && !fe_in && fe_inflight == 0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign busy = running;

  // Pairs leave the force pipeline in the order they entered.
  assert property (@(posedge clk) disable iff (!rst_n) fe_out |-> fe_inflight != 0)
    else $error("compute_engine: force result without a pair in flight");

endmodule
