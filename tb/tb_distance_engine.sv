// tb_distance_engine: self-checking test of the cutoff filter.
//
// The testbench plays the position memory (LANES+1 synchronous read ports)
// and runs three walks over random atoms:
//  1. a self patch, cutoff so small that no pair passes: checks the walk
//     rate of LANES pairs per clock plus one clock per atom i;
//  2. a self patch with a realistic cutoff and a consumer that is ready
//     only part of the time, so the lane queues fill and issuing stalls;
//  3. a pair of patches with the consumer always ready.
// In walks 2 and 3 every pair leaving the engine must be inside the cutoff
// by the reference model, and each pair inside it must leave exactly once.
module tb_distance_engine;
  import fp32_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int LANES = 6;
  localparam int NAT   = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;

  vec3_t pos [64];

  logic        start, do_self, out_valid, out_ready, busy, stall;
  logic [15:0] i_first, i_step, i_to, i_upper, j_upper, out_i, out_j, pi_addr;
  logic [15:0] pj_addr [LANES];
  vec3_t       pi_data;
  vec3_t       pj_data [LANES];
  fp32_t       cutoff2;
  logic [LANES-1:0] tested, passed;

  distance_engine #(.LANES(LANES)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .i_first(i_first), .i_step(i_step),
    .i_to(i_to), .do_self(do_self), .i_upper(i_upper), .j_upper(j_upper), .cutoff2(cutoff2),
    .pi_addr(pi_addr), .pi_data(pi_data), .pj_addr(pj_addr), .pj_data(pj_data),
    .out_valid(out_valid), .out_i(out_i), .out_j(out_j), .out_ready(out_ready),
    .busy(busy), .stall(stall), .lane_tested(tested), .lane_passed(passed));

  always_ff @(posedge clk) begin
    pi_data <= pos[pi_addr[5:0]];
    for (int l = 0; l < LANES; l++) pj_data[l] <= pos[pj_addr[l][5:0]];
  end

  int  got [int];
  int  n_got;
  bit  random_ready;

  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    if (out_valid && out_ready) begin
      int key;
      key = int'(out_i) * 65536 + int'(out_j);
      if (got.exists(key)) got[key]++;
      else got[key] = 1;
      n_got++;
    end
    out_ready <= random_ready ? ($urandom % 4 == 0) : 1'b1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit self, input int iu, input int ju, input real cut2,
                     output int cycles);
    do_self = self;
    i_upper = 16'(iu);
    j_upper = 16'(ju);
    i_first = 0;
    i_step  = 1;
    i_to    = self ? 16'(iu - 1) : 16'(iu);
    cutoff2 = r2f(cut2);
    got.delete();
    n_got = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check_pairs(input bit self, input int iu, input int ju);
    int expected = 0;
    for (int i = 0; i < (self ? iu - 1 : iu); i++)
      for (int j = (self ? i + 1 : iu); j < (self ? iu : iu + ju); j++) begin
        atom_t ai, aj;
        int key;
        ai.pos = pos[i];
        aj.pos = pos[j];
        key = i * 65536 + j;
        if (in_cutoff(pair_r2(ai, aj), cutoff2)) begin
          expected++;
          checks++;
          if (!got.exists(key) || got[key] != 1) begin
            failures++;
            if (failures < 10) $display("FAIL: pair (%0d,%0d) seen %0d times", i, j,
                                        got.exists(key) ? got[key] : 0);
          end
        end
      end
    checks++;
    if (n_got != expected) begin
      failures++;
      $display("FAIL: %0d pairs out, %0d expected", n_got, expected);
    end
    $display("walk: %0d pairs inside cutoff", expected);
  endtask

  initial begin
    int cyc, bound;
    start = 0;
    random_ready = 0;
    for (int k = 0; k < 64; k++) begin
      pos[k].x = frand(0.0, 20.0);
      pos[k].y = frand(0.0, 20.0);
      pos[k].z = frand(0.0, 20.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1: rate of the walk
    run(1'b1, NAT, 0, 0.0, cyc);
    bound = 0;
    for (int i = 0; i < NAT - 1; i++) bound += 1 + (NAT - 1 - i + LANES - 1) / LANES;
    checks++;
    if (cyc < bound || cyc > bound + 8) begin
      failures++;
      $display("FAIL: walk took %0d clocks, expected %0d..%0d", cyc, bound, bound + 8);
    end
    $display("walk 1: %0d clocks for %0d (i, lane-group) steps", cyc, bound);

    // 2: self patch, slow consumer
    random_ready = 1;
    run(1'b1, NAT, 0, 144.0, cyc);
    check_pairs(1'b1, NAT, 0);

    // 3: pair of patches
    random_ready = 0;
    run(1'b0, 20, 27, 144.0, cyc);
    check_pairs(1'b0, 20, 27);

    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: issuing never stalled");
    end
    $display("stall clocks=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
