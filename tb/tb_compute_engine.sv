// tb_compute_engine: self-checking test of one chip's compute engine.
//
// Loads random lookup tables and random atoms through the load ports, then
// runs the engine as the primary chip would (even i only) on a self patch
// and on a pair of patches. After each run, every atom's result
// (fi_acc + fj_acc) is read back and compared with the reference: the sum
// over the engine's pairs inside the cutoff of +F on i and -F on j. The
// distance lanes' queues must stall at least once and the force ceiling
// must be reached at least once.
module tb_compute_engine;
  import fp32_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int TD  = 1024;
  localparam int LJT = 32;
  localparam int NA  = 80;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_clamp = 0, n_pair = 0;

  atom_t atoms [NA];
  coef_t tab   [TD];
  fp32_t lj_a  [LJT*LJT];
  fp32_t lj_b  [LJT*LJT];

  logic        ld_we, tf_we, lj_we, start, busy, done;
  logic [15:0] ld_addr, res_addr;
  atom_t       ld_atom;
  logic [9:0]  tf_addr, lj_addr;
  logic [2:0]  tf_word;
  logic [63:0] tf_data, lj_data;
  run_params_t prm;
  ivec3_t      res_f;
  logic        ev_stall, ev_qf, ev_pair, ev_clamp;
  logic [5:0]  ev_tested;

  compute_engine dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_addr(ld_addr), .ld_atom(ld_atom),
    .tf_we(tf_we), .tf_addr(tf_addr), .tf_word(tf_word), .tf_data(tf_data),
    .lj_we(lj_we), .lj_addr(lj_addr), .lj_data(lj_data),
    .start(start), .i_first(16'd0), .i_step(16'd2), .prm(prm), .busy(busy), .done(done),
    .res_addr(res_addr), .res_f(res_f), .ev_stall(ev_stall), .ev_queue_full(ev_qf),
    .ev_pair(ev_pair), .ev_clamp(ev_clamp), .ev_tested(ev_tested));

  always @(posedge clk) if (rst_n) begin
    n_stall += int'(ev_stall);
    n_clamp += int'(ev_clamp);
    n_pair  += int'(ev_pair);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(input bit self, input int iu, input int ju);
    ivec3_t expf [NA];
    int     npairs = 0, cyc = 0;
    prm.do_self = self;
    prm.i_upper = 16'(iu);
    prm.j_upper = 16'(ju);
    // load atoms (clears the accumulators)
    for (int k = 0; k < (self ? iu : iu + ju); k++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 16'(k); ld_atom = atoms[k];
    end
    @(negedge clk) ld_we = 0;
    // reference
    foreach (expf[k]) expf[k] = '0;
    for (int i = 0; i < (self ? iu - 1 : iu); i += 2)
      for (int j = (self ? i + 1 : iu); j < (self ? iu : iu + ju); j++) begin
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
    n_pair = 0;
    start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n_pair != npairs) begin
      failures++;
      $display("FAIL: %0d pairs computed, %0d expected", n_pair, npairs);
    end
    for (int k = 0; k < (self ? iu : iu + ju); k++) begin
      res_addr = 16'(k);
      @(negedge clk);
      checks++;
      if (res_f != expf[k]) begin
        failures++;
        if (failures < 10) $display("FAIL atom %0d: got %0d,%0d,%0d exp %0d,%0d,%0d", k,
                                    res_f.x, res_f.y, res_f.z, expf[k].x, expf[k].y, expf[k].z);
      end
    end
    $display("run self=%0d: %0d pairs in cutoff, %0d clocks", self, npairs, cyc);
  endtask

  initial begin
    ld_we = 0; tf_we = 0; lj_we = 0; start = 0; res_addr = 0;
    prm = '0;
    prm.m             = 16'(LJT);
    prm.n             = 16'(TD);
    prm.dielectric_1  = r2f(1.0);
    prm.cutoff2       = r2f(144.0);
    prm.r2_delta_expc = -7744;
    prm.ivbias        = r2f(8.0);
    for (int k = 0; k < NA; k++) begin
      atoms[k].pos.x  = frand(0.0, 18.0);
      atoms[k].pos.y  = frand(0.0, 18.0);
      atoms[k].pos.z  = frand(0.0, 18.0);
      atoms[k].charge = frand(-1.0, 1.0);
      atoms[k].vdw    = 32'($urandom % LJT);
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
    // tables, in the stream's word layout (unused floats left zero)
    for (int k = 0; k < TD; k++)
      for (int w = 0; w < 6; w++) begin
        @(negedge clk);
        tf_we = 1; tf_addr = 10'(k); tf_word = 3'(w);
        case (w)
          0: tf_data = {tab[k].c02, 32'd0};
          1: tf_data = {tab[k].c04, tab[k].c03};
          2: tf_data = {tab[k].c06, 32'd0};
          3: tf_data = {tab[k].c08, tab[k].c07};
          4: tf_data = {tab[k].c10, 32'd0};
          default: tf_data = {tab[k].c12, tab[k].c11};
        endcase
      end
    @(negedge clk) tf_we = 0;
    for (int k = 0; k < LJT*LJT; k++) begin
      @(negedge clk);
      lj_we = 1; lj_addr = 10'(k); lj_data = {lj_b[k], lj_a[k]};
    end
    @(negedge clk) lj_we = 0;

    run_and_check(1'b1, 60, 0);
    run_and_check(1'b0, 37, 43);

    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no lane-queue stall"); end
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL: force ceiling never reached"); end
    $display("stall clocks=%0d clamps=%0d", n_stall, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
