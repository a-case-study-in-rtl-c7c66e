// tb_force_engine: self-checking test of the pair-force pipeline.
//
// The testbench plays the atom memory and the lookup tables (synchronous
// reads, one clock), fills them with random atoms and coefficients, and
// feeds NPAIRS random pairs back to back, one per clock. Every result is
// compared with the double-precision reference model rounded per
// operation (md_ref_pkg), and must leave exactly 19 clocks after its pair
// went in (one pair per clock, fixed latency). Coefficients are large
// enough that the 100 ceiling on the force magnitude is hit; the test
// fails if it never is.
module tb_force_engine;
  import fp32_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int NATOMS = 64;
  localparam int NPAIRS = 400;
  localparam int TD     = 1024;
  localparam int LJT    = 32;
  localparam int LAT    = 19;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, clamps = 0;

  // memories played by the testbench
  atom_t atoms [NATOMS];
  coef_t tab   [TD];
  fp32_t lj_a  [LJT*LJT];
  fp32_t lj_b  [LJT*LJT];

  fp32_t dielectric_1, ivbias;
  int    expc;
  logic [15:0] m;

  logic        in_valid;
  logic [15:0] in_i, in_j, ai_addr, aj_addr, out_i, out_j;
  atom_t       ai_data, aj_data;
  logic [9:0]  rd_ti;
  coef_t       rd_coef;
  logic [9:0]  rd_lj;
  fp32_t       rd_a, rd_b;
  logic        out_valid, clamped;
  ivec3_t      out_f;

  force_engine dut (
    .clk(clk), .rst_n(rst_n), .dielectric_1(dielectric_1), .r2_delta_expc(expc),
    .m(m), .ivbias(ivbias), .in_valid(in_valid), .in_i(in_i), .in_j(in_j),
    .ai_addr(ai_addr), .ai_data(ai_data), .aj_addr(aj_addr), .aj_data(aj_data),
    .rd_ti(rd_ti), .rd_coef(rd_coef), .rd_lj(rd_lj), .rd_a(rd_a), .rd_b(rd_b),
    .out_valid(out_valid), .out_i(out_i), .out_j(out_j), .out_f(out_f), .clamped(clamped));

  always_ff @(posedge clk) begin
    ai_data <= atoms[ai_addr[5:0]];
    aj_data <= atoms[aj_addr[5:0]];
    rd_coef <= tab[rd_ti];
    rd_a    <= lj_a[rd_lj];
    rd_b    <= lj_b[rd_lj];
  end

  // expected results, in order
  int     exp_i [NPAIRS], exp_j [NPAIRS], sent_cyc [NPAIRS];
  ivec3_t exp_f [NPAIRS];
  bit     exp_c [NPAIRS];
  int     n_out = 0, cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_out >= NPAIRS) begin
      failures++;
      $display("FAIL: extra result");
    end else begin
      if (out_i != exp_i[n_out][15:0] || out_j != exp_j[n_out][15:0] || out_f != exp_f[n_out]
          || clamped != exp_c[n_out]) begin
        failures++;
        if (failures < 10)
          $display("FAIL pair %0d (%0d,%0d): got (%0d,%0d) f=%0d,%0d,%0d c=%0d exp f=%0d,%0d,%0d c=%0d",
                   n_out, exp_i[n_out], exp_j[n_out], out_i, out_j, out_f.x, out_f.y, out_f.z,
                   clamped, exp_f[n_out].x, exp_f[n_out].y, exp_f[n_out].z, exp_c[n_out]);
      end
      checks++;
      if (cyc - sent_cyc[n_out] != LAT) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc - sent_cyc[n_out], LAT);
      end
      if (exp_c[n_out]) clamps++;
    end
    n_out++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cl;
    dielectric_1 = r2f(1.0);
    ivbias       = r2f(8.0);
    expc         = -7744;   // bins start at r2 = 1/64
    m            = 16'(LJT);
    for (int k = 0; k < NATOMS; k++) begin
      atoms[k].pos.x  = frand(0.0, 12.0);
      atoms[k].pos.y  = frand(0.0, 12.0);
      atoms[k].pos.z  = frand(0.0, 12.0);
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
    in_valid = 0; in_i = 0; in_j = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPAIRS; p++) begin
      int i, j, ti;
      logic [31:0] r2;
      i = $urandom % NATOMS;
      j = (i + 1 + $urandom % (NATOMS - 1)) % NATOMS;
      r2 = pair_r2(atoms[i], atoms[j]);
      ti = table_index(r2, expc) & (TD - 1);
      exp_i[p] = i;
      exp_j[p] = j;
      exp_f[p] = pair_force(atoms[i], atoms[j], tab[ti], lj_a[lj_index(atoms[i], atoms[j], LJT)],
                            lj_b[lj_index(atoms[i], atoms[j], LJT)], dielectric_1, ivbias, cl);
      exp_c[p] = cl;
      in_valid <= 1;
      in_i     <= 16'(i);
      in_j     <= 16'(j);
      sent_cyc[p] = cyc + 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_out != NPAIRS) begin
      failures++;
      $display("FAIL: %0d results for %0d pairs", n_out, NPAIRS);
    end
    checks++;
    if (clamps == 0) begin
      failures++;
      $display("FAIL: force ceiling never reached");
    end
    $display("pairs=%0d clamped=%0d", n_out, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
