// namd_map_top: two-FPGA accelerator for the nonbonded forces of one
// patch (self) or one pair of patches.
//
// The host calls the accelerator once per patch or patch pair. On the
// first call it also sends the lookup tables. Then it streams the atoms of
// the patch(es) in and reads the updated forces back. The work is split
// over two FPGAs joined by a chip-to-chip bridge:
//  - the primary chip receives the streams, keeps the input forces, runs
//    compute engine A on the even atoms i, and forms the result
//    f_in[k] + A[k] + B[k] for the output;
//  - the secondary chip gets the run parameters, the atoms, a start command
//    and a drain request over the bridge. It runs compute engine B on the odd
//    atoms i and sends its per-atom results back over the bridge.
// Both chips load the lookup tables straight from the table stream, as
// both read the same on-board memory banks.
//
// Host streams (valid/ready in, valid-only out; widths as in md_pkg):
//   tbl_*  : n*6 interpolation words then m*m LJ words, only when first_time
//   in_*   : two 64-bit words per beat, two beats per atom,
//            size_in = do_self ? i_upper : i_upper + j_upper atoms
//   out_*  : one beat per atom, in atom order, after the computation
// start is a one-clock pulse with prm and first_time valid; done pulses
// after the last output beat.
//
// Bridge: the chip-to-chip link is outside this module. The primary side
// drives fwd_tx_* and reads bwd_rx_*; the secondary side reads fwd_rx_*
// and drives bwd_tx_*. The link must deliver words in order, without loss,
// one per clock at most, with any fixed or varying delay. Word formats are
// bridge_word_t below.
//
// The call sequence, the table load on the first call only, the split of i
// between the chips and the merged output follow the document. The stream
// handshakes and the bridge word format are this design's own.
module namd_map_top
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned LANES_A     = 6,
  parameter int unsigned LANES_B     = 8,
  parameter int unsigned MAX_ATOMS   = MAX_ATOMS_D,
  parameter int unsigned TABLE_DEPTH = TABLE_DEPTH_D,
  parameter int unsigned LJ_TYPES    = LJ_TYPES_D
) (
  input  logic          clk,
  input  logic          rst_n,
  // call
  input  logic          start,
  input  logic          first_time,
  input  run_params_t   prm,
  output logic          busy,
  output logic          done,
  // lookup-table stream
  input  logic          tbl_valid,
  input  logic [63:0]   tbl_data,
  output logic          tbl_ready,
  // atom stream in
  input  logic          in_valid,
  input  logic [63:0]   in_data0,
  input  logic [63:0]   in_data1,
  output logic          in_ready,
  // result stream out
  output logic          out_valid,
  output logic [63:0]   out_data0,
  output logic [63:0]   out_data1,
  // bridge, primary to secondary
  output logic          fwd_tx_valid,
  output logic [217:0]  fwd_tx_data,
  input  logic          fwd_rx_valid,
  input  logic [217:0]  fwd_rx_data,
  // bridge, secondary to primary
  output logic          bwd_tx_valid,
  output logic [217:0]  bwd_tx_data,
  input  logic          bwd_rx_valid,
  input  logic [217:0]  bwd_rx_data,
  // activity pulses: [0] engine A, [1] engine B
  output logic [1:0]    ev_stall,
  output logic [1:0]    ev_queue_full,
  output logic [1:0]    ev_pair,
  output logic [1:0]    ev_clamp
);
  localparam int unsigned AW    = $clog2(MAX_ATOMS);
  localparam int unsigned TW    = $clog2(TABLE_DEPTH);
  localparam int unsigned LJW   = $clog2(LJ_TYPES * LJ_TYPES);

  typedef enum logic [1:0] {BW_PARAMS, BW_ATOM, BW_START, BW_DRAIN} bw_kind_t;
  localparam bw_kind_t BW_RESULT = BW_DRAIN;  // backward words carry results

  typedef struct packed {
    bw_kind_t    kind;
    logic [15:0] addr;
    logic [199:0] data;
  } bridge_word_t;

  // ===================================================== primary chip
  typedef enum logic [2:0] {P_IDLE, P_LOAD_TBL, P_LOAD_ATOMS, P_START, P_COMPUTE,
                            P_DRAIN, P_MERGE} p_state_t;
  p_state_t    p_state;
  run_params_t prm_a;
  logic [31:0] cnt;           // words / atoms / results counted in a phase
  logic [15:0] size_in;
  logic        beat;          // which half of an atom is on the stream
  vec3_t       pos_hold;
  fp32_t       q_hold;
  logic        a_start, a_busy, a_done, a_finished;
  bridge_word_t fwd_w;

  ivec3_t f_in [1 << AW];     // input forces, kept on the primary chip

  // table write decode
  logic [31:0]    n6;
  logic           tf_we, lj_we;
  logic [TW-1:0]  tf_addr;
  logic [2:0]     tf_word;
  logic [LJW-1:0] lj_addr;

  assign n6        = 32'(prm_a.n) * 6;
  assign tbl_ready = (p_state == P_LOAD_TBL);
  assign tf_we     = tbl_ready && tbl_valid && (cnt < n6);
  assign lj_we     = tbl_ready && tbl_valid && (cnt >= n6);
  assign tf_addr   = TW'(cnt / 6);
  assign tf_word   = 3'(cnt % 6);
  assign lj_addr   = LJW'(cnt - n6);

  // atom load decode
  logic  ld_we;
  atom_t ld_atom;
  assign in_ready     = (p_state == P_LOAD_ATOMS);
  assign ld_we        = in_ready && in_valid && beat;
  assign ld_atom.pos  = pos_hold;
  assign ld_atom.charge = q_hold;
  assign ld_atom.vdw  = in_data0[31:0];

  always_comb begin
    fwd_tx_valid = 1'b0;
    fwd_w        = '0;
    if (p_state == P_IDLE && start) begin
      fwd_tx_valid = 1'b1;
      fwd_w.kind   = BW_PARAMS;
      fwd_w.data   = 200'(prm);
    end else if (ld_we) begin
      fwd_tx_valid = 1'b1;
      fwd_w.kind   = BW_ATOM;
      fwd_w.addr   = cnt[15:0];
      fwd_w.data   = 200'(ld_atom);
    end else if (p_state == P_START) begin
      fwd_tx_valid = 1'b1;
      fwd_w.kind   = BW_START;
    end else if (p_state == P_DRAIN) begin
      fwd_tx_valid = 1'b1;
      fwd_w.kind   = BW_DRAIN;
    end
  end
  assign fwd_tx_data = fwd_w;

  assign a_start = (p_state == P_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_state    <= P_IDLE;
      cnt        <= '0;
      beat       <= 1'b0;
      a_finished <= 1'b0;
    end else begin
      case (p_state)
        P_IDLE: if (start) begin
          prm_a   <= prm;
          size_in <= prm.do_self ? prm.i_upper : prm.i_upper + prm.j_upper;
          cnt     <= '0;
          beat    <= 1'b0;
          p_state <= first_time ? P_LOAD_TBL : P_LOAD_ATOMS;
        end
        P_LOAD_TBL: if (tbl_valid) begin
          if (cnt + 1 == n6 + 32'(prm_a.m) * 32'(prm_a.m)) begin
            cnt     <= '0;
            p_state <= P_LOAD_ATOMS;
          end else begin
            cnt <= cnt + 1;
          end
        end
        P_LOAD_ATOMS: if (in_valid) begin
          beat <= !beat;
          if (!beat) begin
            pos_hold.x <= in_data0[31:0];
            pos_hold.y <= in_data0[63:32];
            pos_hold.z <= in_data1[31:0];
            q_hold     <= in_data1[63:32];
          end else if (cnt + 1 == 32'(size_in)) begin
            cnt     <= '0;
            p_state <= P_START;
          end else begin
            cnt <= cnt + 1;
          end
        end
        P_START: begin
          a_finished <= 1'b0;
          p_state    <= P_COMPUTE;
        end
        P_COMPUTE: if (a_done || a_finished) p_state <= P_DRAIN;
        P_DRAIN: begin
          cnt     <= '0;
          p_state <= P_MERGE;
        end
        P_MERGE: if (out_valid) begin
          if (cnt + 1 == 32'(size_in)) p_state <= P_IDLE;
          else                         cnt <= cnt + 1;
        end
        default: p_state <= P_IDLE;
      endcase
      if (a_done) a_finished <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_we) begin
      f_in[cnt[AW-1:0]].x <= in_data0[63:32];
      f_in[cnt[AW-1:0]].y <= in_data1[31:0];
      f_in[cnt[AW-1:0]].z <= in_data1[63:32];
    end
  end

  // merge: a result word from the secondary chip selects the atom; the
  // engine A result and the input force are read in the same clock and the
  // sum leaves one clock later
  bridge_word_t bwd_in;
  ivec3_t       fb_d, fa_r, fin_r;
  logic         mv;
  assign bwd_in = bwd_rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mv <= 1'b0;
    else        mv <= bwd_rx_valid && (bwd_in.kind == BW_RESULT) && (p_state == P_MERGE);
  end
  always_ff @(posedge clk) begin
    fb_d  <= ivec3_t'(bwd_in.data[95:0]);
    fin_r <= f_in[bwd_in.addr[AW-1:0]];
  end

  ivec3_t fsum;
  assign fsum.x    = fin_r.x + fa_r.x + fb_d.x;
  assign fsum.y    = fin_r.y + fa_r.y + fb_d.y;
  assign fsum.z    = fin_r.z + fa_r.z + fb_d.z;
  assign out_valid = mv;
  assign out_data0 = {fsum.x, 32'd0};
  assign out_data1 = {fsum.z, fsum.y};

  compute_engine #(
    .LANES(LANES_A), .MAX_ATOMS(MAX_ATOMS), .TABLE_DEPTH(TABLE_DEPTH), .LJ_TYPES(LJ_TYPES)
  ) u_engine_a (
    .clk          (clk),
    .rst_n        (rst_n),
    .ld_we        (ld_we),
    .ld_addr      (cnt[15:0]),
    .ld_atom      (ld_atom),
    .tf_we        (tf_we),
    .tf_addr      (tf_addr),
    .tf_word      (tf_word),
    .tf_data      (tbl_data),
    .lj_we        (lj_we),
    .lj_addr      (lj_addr),
    .lj_data      (tbl_data),
    .start        (a_start),
    .i_first      (16'd0),
    .i_step       (16'd2),
    .prm          (prm_a),
    .busy         (a_busy),
    .done         (a_done),
    .res_addr     (bwd_in.addr),
    .res_f        (fa_r),
    .ev_stall     (ev_stall[0]),
    .ev_queue_full(ev_queue_full[0]),
    .ev_pair      (ev_pair[0]),
    .ev_clamp     (ev_clamp[0]),
    .ev_tested    ()
  );

  assign busy = (p_state != P_IDLE);
  assign done = mv && (p_state == P_MERGE) && (cnt + 1 == 32'(size_in));

  // ===================================================== secondary chip
  run_params_t  prm_b;
  bridge_word_t fwd_in, bwd_w;
  logic         b_start, b_busy, b_done, b_finished, drain_req, b_sending;
  logic [15:0]  b_cnt, b_size;
  logic         b_send_d;
  logic [15:0]  b_addr_d;
  ivec3_t       fb_r;

  run_params_t  prm_rx;
  assign fwd_in  = fwd_rx_data;
  assign prm_rx  = run_params_t'(fwd_in.data[$bits(run_params_t)-1:0]);
  assign b_start = fwd_rx_valid && (fwd_in.kind == BW_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_finished <= 1'b0;
      drain_req  <= 1'b0;
      b_sending  <= 1'b0;
      b_send_d   <= 1'b0;
      b_cnt      <= '0;
    end else begin
      b_send_d <= b_sending;
      b_addr_d <= b_cnt;
      if (fwd_rx_valid && fwd_in.kind == BW_PARAMS) begin
        prm_b  <= prm_rx;
        b_size <= prm_rx.do_self ? prm_rx.i_upper : prm_rx.i_upper + prm_rx.j_upper;
      end
      if (b_start) b_finished <= 1'b0;
      else if (b_done) b_finished <= 1'b1;
      if (fwd_rx_valid && fwd_in.kind == BW_DRAIN) drain_req <= 1'b1;
      if (!b_sending && drain_req && (b_finished || b_done)) begin
        drain_req <= 1'b0;
        b_sending <= 1'b1;
        b_cnt     <= '0;
      end else if (b_sending) begin
        if (b_cnt + 1'b1 == b_size) b_sending <= 1'b0;
        b_cnt <= b_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    bwd_w      = '0;
    bwd_w.kind = BW_RESULT;
    bwd_w.addr = b_addr_d;
    bwd_w.data = 200'(fb_r);
  end
  assign bwd_tx_valid = b_send_d;
  assign bwd_tx_data  = bwd_w;

  compute_engine #(
    .LANES(LANES_B), .MAX_ATOMS(MAX_ATOMS), .TABLE_DEPTH(TABLE_DEPTH), .LJ_TYPES(LJ_TYPES)
  ) u_engine_b (
    .clk          (clk),
    .rst_n        (rst_n),
    .ld_we        (fwd_rx_valid && fwd_in.kind == BW_ATOM),
    .ld_addr      (fwd_in.addr),
    .ld_atom      (atom_t'(fwd_in.data[$bits(atom_t)-1:0])),
    .tf_we        (tf_we),
    .tf_addr      (tf_addr),
    .tf_word      (tf_word),
    .tf_data      (tbl_data),
    .lj_we        (lj_we),
    .lj_addr      (lj_addr),
    .lj_data      (tbl_data),
    .start        (b_start),
    .i_first      (16'd1),
    .i_step       (16'd2),
    .prm          (prm_b),
    .busy         (b_busy),
    .done         (b_done),
    .res_addr     (b_cnt),
    .res_f        (fb_r),
    .ev_stall     (ev_stall[1]),
    .ev_queue_full(ev_queue_full[1]),
    .ev_pair      (ev_pair[1]),
    .ev_clamp     (ev_clamp[1]),
    .ev_tested    ()
  );

endmodule
