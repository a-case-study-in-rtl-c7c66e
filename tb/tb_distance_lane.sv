// tb_distance_lane: self-checking test of one distance lane.
//
// Sends random pairs, one per clock, and checks that each comes out four
// clocks later with the squared distance of the reference model, flagged
// as passing exactly when r2 <= cutoff2 (also for a pair placed exactly on
// the cutoff). Both outcomes must occur.
module tb_distance_lane;
  import fp32_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int N = 500, LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  logic        in_valid, out_valid, out_tested;
  logic [15:0] in_i, in_j, out_i, out_j;
  vec3_t       pos_i, pos_j;
  fp32_t       cutoff2, out_r2;

  distance_lane dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i(in_i), .in_j(in_j),
    .pos_i(pos_i), .pos_j(pos_j), .cutoff2(cutoff2), .out_valid(out_valid),
    .out_tested(out_tested), .out_i(out_i), .out_j(out_j), .out_r2(out_r2));

  fp32_t exp_r2 [N];
  bit    exp_pass [N];
  int    sent [N];
  int    cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_tested) begin
    checks++;
    if (out_r2 != exp_r2[n_out] || out_valid != exp_pass[n_out] || out_i != 16'(n_out) ||
        out_j != 16'(n_out + 1) || cyc - sent[n_out] != LAT) begin
      failures++;
      if (failures < 10) $display("FAIL pair %0d: r2 %h exp %h pass %0d exp %0d lat %0d i %0d j %0d", n_out,
                                  out_r2, exp_r2[n_out], out_valid, exp_pass[n_out], cyc - sent[n_out], out_i, out_j);
    end
    if (exp_pass[n_out]) n_in++;
    n_out++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_i = 0; in_j = 0; pos_i = '0; pos_j = '0;
    cutoff2 = r2f(144.0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < N; p++) begin
      atom_t a, b;
      @(negedge clk);
      a.pos.x = frand(-10.0, 10.0); a.pos.y = frand(-10.0, 10.0); a.pos.z = frand(-10.0, 10.0);
      b.pos.x = frand(-10.0, 10.0); b.pos.y = frand(-10.0, 10.0); b.pos.z = frand(-10.0, 10.0);
      if (p == 7) begin  // exactly on the cutoff: 12^2 + 0 + 0
        a.pos = '{r2f(12.0), r2f(0.0), r2f(0.0)};
        b.pos = '{r2f(0.0), r2f(0.0), r2f(0.0)};
      end
      a.charge = '0; a.vdw = '0; b.charge = '0; b.vdw = '0;
      exp_r2[p]   = pair_r2(a, b);
      exp_pass[p] = in_cutoff(exp_r2[p], cutoff2);
      pos_i = a.pos; pos_j = b.pos; in_i = 16'(p); in_j = 16'(p + 1); in_valid = 1;
      sent[p] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL: %0d outputs", n_out); end
    checks++;
    if (n_in == 0 || n_in == N || !exp_pass[7]) begin
      failures++; $display("FAIL: pass/drop mix %0d of %0d", n_in, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
