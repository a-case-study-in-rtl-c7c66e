// tb_namd_map_top: end-to-end test of the two-chip accelerator.
//
// The testbench plays the host: it streams the lookup tables (first call
// only) and the atoms in, with random gaps in the streams, and collects the
// result stream. The two bridge directions are closed through a
// behavioural link with a fixed delay. Two calls are made:
//   call 1: first_time = 1, self patch of N_SELF atoms;
//   call 2: first_time = 0 (tables kept), pair of patches N_I + N_J atoms.
// Each output force must equal the input force plus the sum of the pair
// forces from the reference model (each pair once, +F on i, -F on j).
// The test counts how often each mechanism occurred and fails if one never
// did: table load, table load skipped, self and pair walks, pairs in both
// engines, lane-queue stalls in both engines, the force ceiling, and
// traffic over both bridge directions.
module tb_namd_map_top;
  import fp32_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int TD     = 1024;
  localparam int LJT    = 32;
  localparam int N_SELF = 50;
  localparam int N_I    = 40;
  localparam int N_J    = 36;
  localparam real BOX   = 16.0;
  localparam int NMAX   = 100;
  localparam int WATCHDOG = 400000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  atom_t  atoms [NMAX];
  ivec3_t fin   [NMAX];
  coef_t  tab   [TD];
  fp32_t  lj_a  [LJT*LJT];
  fp32_t  lj_b  [LJT*LJT];

  logic          start, first_time, busy, done;
  run_params_t   prm;
  logic          tbl_valid, tbl_ready, in_valid, in_ready, out_valid;
  logic [63:0]   tbl_data, in_data0, in_data1, out_data0, out_data1;
  logic          fwd_tx_valid, fwd_rx_valid, bwd_tx_valid, bwd_rx_valid;
  logic [217:0]  fwd_tx_data, fwd_rx_data, bwd_tx_data, bwd_rx_data;
  logic [1:0]    ev_stall, ev_qf, ev_pair, ev_clamp;

  namd_map_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .first_time(first_time), .prm(prm),
    .busy(busy), .done(done),
    .tbl_valid(tbl_valid), .tbl_data(tbl_data), .tbl_ready(tbl_ready),
    .in_valid(in_valid), .in_data0(in_data0), .in_data1(in_data1), .in_ready(in_ready),
    .out_valid(out_valid), .out_data0(out_data0), .out_data1(out_data1),
    .fwd_tx_valid(fwd_tx_valid), .fwd_tx_data(fwd_tx_data),
    .fwd_rx_valid(fwd_rx_valid), .fwd_rx_data(fwd_rx_data),
    .bwd_tx_valid(bwd_tx_valid), .bwd_tx_data(bwd_tx_data),
    .bwd_rx_valid(bwd_rx_valid), .bwd_rx_data(bwd_rx_data),
    .ev_stall(ev_stall), .ev_queue_full(ev_qf), .ev_pair(ev_pair), .ev_clamp(ev_clamp));

  bridge_model u_fwd (.clk(clk), .rst_n(rst_n), .tx_valid(fwd_tx_valid), .tx_data(fwd_tx_data),
                      .rx_valid(fwd_rx_valid), .rx_data(fwd_rx_data));
  bridge_model u_bwd (.clk(clk), .rst_n(rst_n), .tx_valid(bwd_tx_valid), .tx_data(bwd_tx_data),
                      .rx_valid(bwd_rx_valid), .rx_data(bwd_rx_data));

  // mechanism counters
  int n_tbl_words = 0, n_tbl_skip = 0, n_self = 0, n_pairmode = 0, n_fwd = 0, n_bwd = 0;
  int n_stall [2] = '{0, 0};
  int n_pairs [2] = '{0, 0};
  int n_clamp = 0;

  always @(posedge clk) if (rst_n) begin
    if (tbl_valid && tbl_ready) n_tbl_words++;
    n_fwd += int'(fwd_tx_valid);
    n_bwd += int'(bwd_tx_valid);
    for (int e = 0; e < 2; e++) begin
      n_stall[e] += int'(ev_stall[e]);
      n_pairs[e] += int'(ev_pair[e]);
    end
    n_clamp += int'(ev_clamp[0]) + int'(ev_clamp[1]);
  end

  // result collection
  ivec3_t got [NMAX];
  int     n_got;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (n_got < NMAX) begin
      got[n_got].x = out_data0[63:32];
      got[n_got].y = out_data1[31:0];
      got[n_got].z = out_data1[63:32];
    end
    n_got++;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] table_word(input int k, input int w);
    case (w)
      0: return {tab[k].c02, 32'd0};
      1: return {tab[k].c04, tab[k].c03};
      2: return {tab[k].c06, 32'd0};
      3: return {tab[k].c08, tab[k].c07};
      4: return {tab[k].c10, 32'd0};
      default: return {tab[k].c12, tab[k].c11};
    endcase
  endfunction

  task automatic call(input bit first, input bit self, input int iu, input int ju);
    ivec3_t expf [NMAX];
    int     size_in, npairs = 0, cyc = 0;
    size_in = self ? iu : iu + ju;
    prm.do_self = self;
    prm.i_upper = 16'(iu);
    prm.j_upper = 16'(ju);
    for (int k = 0; k < NMAX; k++) expf[k] = (k < size_in) ? fin[k] : '0;
    for (int i = 0; i < (self ? iu - 1 : iu); i++)
      for (int j = (self ? i + 1 : iu); j < size_in; j++) begin
        logic [31:0] r2;
        ivec3_t f;
        bit cl;
        int li;
        r2 = pair_r2(atoms[i], atoms[j]);
        if (!in_cutoff(r2, prm.cutoff2)) continue;
        li = lj_index(atoms[i], atoms[j], LJT);
        f = pair_force(atoms[i], atoms[j], tab[table_index(r2, prm.r2_delta_expc) & (TD - 1)],
                       lj_a[li], lj_b[li], prm.dielectric_1, prm.ivbias, cl);
        expf[i].x += f.x; expf[i].y += f.y; expf[i].z += f.z;
        expf[j].x -= f.x; expf[j].y -= f.y; expf[j].z -= f.z;
        npairs++;
      end
    if (!first) n_tbl_skip++;
    if (self) n_self++; else n_pairmode++;
    n_got = 0;
    @(negedge clk);
    start = 1; first_time = first;
    @(negedge clk);
    start = 0;
    // table stream
    if (first) begin
      int w = 0;
      while (w < TD * 6 + LJT * LJT) begin
        tbl_valid = ($urandom % 8 != 0);
        tbl_data  = (w < TD * 6) ? table_word(w / 6, w % 6)
                                 : {lj_b[w - TD * 6], lj_a[w - TD * 6]};
        @(posedge clk);
        if (tbl_valid && tbl_ready) w++;
        @(negedge clk);
      end
      tbl_valid = 0;
    end
    // atom stream: two beats per atom
    for (int b = 0; b < 2 * size_in; ) begin
      int k;
      k = b / 2;
      in_valid = ($urandom % 5 != 0);
      if (b % 2 == 0) begin
        in_data0 = {atoms[k].pos.y, atoms[k].pos.x};
        in_data1 = {atoms[k].charge, atoms[k].pos.z};
      end else begin
        in_data0 = {fin[k].x, atoms[k].vdw};
        in_data1 = {fin[k].z, fin[k].y};
      end
      @(posedge clk);
      if (in_valid && in_ready) b++;
      @(negedge clk);
    end
    in_valid = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    checks++;
    if (n_got != size_in) begin
      failures++;
      $display("FAIL: %0d results for %0d atoms", n_got, size_in);
    end
    for (int k = 0; k < size_in && k < n_got; k++) begin
      checks++;
      if (got[k] != expf[k]) begin
        failures++;
        if (failures < 10) $display("FAIL atom %0d: got %0d,%0d,%0d exp %0d,%0d,%0d", k,
                                    got[k].x, got[k].y, got[k].z, expf[k].x, expf[k].y, expf[k].z);
      end
    end
    $display("call first=%0d self=%0d atoms=%0d: %0d pairs in cutoff, %0d clocks after input",
             first, self, size_in, npairs, cyc);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    start = 0; first_time = 0; tbl_valid = 0; in_valid = 0;
    tbl_data = '0; in_data0 = '0; in_data1 = '0;
    prm = '0;
    prm.m             = 16'(LJT);
    prm.n             = 16'(TD);
    prm.dielectric_1  = r2f(1.0);
    prm.cutoff2       = r2f(144.0);
    prm.r2_delta_expc = -7744;
    prm.ivbias        = r2f(8.0);
    for (int k = 0; k < NMAX; k++) begin
      atoms[k].pos.x  = frand(0.0, BOX);
      atoms[k].pos.y  = frand(0.0, BOX);
      atoms[k].pos.z  = frand(0.0, BOX);
      atoms[k].charge = frand(-1.0, 1.0);
      atoms[k].vdw    = 32'($urandom % LJT);
      fin[k].x = $urandom % 20001 - 10000;
      fin[k].y = $urandom % 20001 - 10000;
      fin[k].z = $urandom % 20001 - 10000;
    end
    for (int k = 0; k < TD; k++) begin
      tab[k].c02 = frand(-20.0, 20.0); tab[k].c03 = frand(-2.0, 2.0); tab[k].c04 = frand(-2.0, 2.0);
      tab[k].c06 = frand(-20.0, 20.0); tab[k].c07 = frand(-2.0, 2.0); tab[k].c08 = frand(-2.0, 2.0);
      tab[k].c10 = frand(-20.0, 20.0); tab[k].c11 = frand(-2.0, 2.0); tab[k].c12 = frand(-2.0, 2.0);
    end
    for (int k = 0; k < LJT*LJT; k++) begin
      lj_a[k] = frand(0.0, 2.0);
      lj_b[k] = frand(0.0, 2.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    call(1'b1, 1'b1, N_SELF, 0);
    call(1'b0, 1'b0, N_I, N_J);

    $display("mechanisms:");
    need("table words loaded", n_tbl_words);
    need("table load skipped", n_tbl_skip);
    need("self-patch calls", n_self);
    need("patch-pair calls", n_pairmode);
    need("pairs in engine A", n_pairs[0]);
    need("pairs in engine B", n_pairs[1]);
    need("lane stall clocks, A", n_stall[0]);
    need("lane stall clocks, B", n_stall[1]);
    need("force ceiling hits", n_clamp);
    need("bridge words to secondary", n_fwd);
    need("bridge words to primary", n_bwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
