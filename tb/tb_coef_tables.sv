// tb_coef_tables: self-checking test of the lookup-table memories.
//
// Writes every interpolation entry as six 64-bit words and every LJ entry
// as one word, in the host's layout, then reads all entries back in random
// order and checks that each of the nine coefficients and A, B come from
// the right half of the right word, one clock after the address.
module tb_coef_tables;
  import fp32_pkg::*;
  import md_pkg::*;

  localparam int TD = 64, LJT = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        tf_we, lj_we;
  logic [5:0]  tf_addr, rd_ti, lj_addr, rd_lj;
  logic [2:0]  tf_word;
  logic [63:0] tf_data, lj_data;
  coef_t       rd_coef;
  fp32_t       rd_a, rd_b;

  coef_tables #(.TABLE_DEPTH(TD), .LJ_TYPES(LJT)) dut (
    .clk(clk), .tf_we(tf_we), .tf_addr(tf_addr), .tf_word(tf_word), .tf_data(tf_data),
    .lj_we(lj_we), .lj_addr(lj_addr), .lj_data(lj_data), .rd_ti(rd_ti), .rd_coef(rd_coef),
    .rd_lj(rd_lj), .rd_a(rd_a), .rd_b(rd_b));

  logic [31:0] fl [TD][12];
  logic [31:0] la [LJT*LJT], lb [LJT*LJT];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tf_we = 0; lj_we = 0; rd_ti = 0; rd_lj = 0;
    for (int k = 0; k < TD; k++) for (int f = 0; f < 12; f++) fl[k][f] = $urandom;
    for (int k = 0; k < LJT*LJT; k++) begin la[k] = $urandom; lb[k] = $urandom; end
    for (int k = 0; k < TD; k++)
      for (int w = 0; w < 6; w++) begin
        @(negedge clk);
        tf_we = 1; tf_addr = 6'(k); tf_word = 3'(w); tf_data = {fl[k][2*w+1], fl[k][2*w]};
      end
    @(negedge clk) tf_we = 0;
    for (int k = 0; k < LJT*LJT; k++) begin
      @(negedge clk);
      lj_we = 1; lj_addr = 6'(k); lj_data = {lb[k], la[k]};
    end
    @(negedge clk) lj_we = 0;
    for (int t = 0; t < 300; t++) begin
      int k, q;
      k = $urandom % TD;
      q = $urandom % (LJT*LJT);
      @(negedge clk);
      rd_ti = 6'(k); rd_lj = 6'(q);
      @(negedge clk);
      rd_ti = 6'($urandom); rd_lj = 6'($urandom);   // must not disturb the read above
      checks++;
      if (rd_coef.c02 != fl[k][1]  || rd_coef.c03 != fl[k][2]  || rd_coef.c04 != fl[k][3]  ||
          rd_coef.c06 != fl[k][5]  || rd_coef.c07 != fl[k][6]  || rd_coef.c08 != fl[k][7]  ||
          rd_coef.c10 != fl[k][9]  || rd_coef.c11 != fl[k][10] || rd_coef.c12 != fl[k][11]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d", k);
      end
      checks++;
      if (rd_a != la[q] || rd_b != lb[q]) begin
        failures++;
        if (failures < 10) $display("FAIL lj %0d", q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
