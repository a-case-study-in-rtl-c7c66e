// tb_sync_fifo: self-checking test of the pair queue.
//
// Pushes and pops at random against a queue model kept in the testbench,
// including pushes into a full queue that is drained in the same clock.
// Checks the head value, empty, full, almost_full and count every clock,
// and that the queue reached full at least once.
module tb_sync_fifo;
  localparam int W = 32, D = 8, S = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0;

  logic         push, pop, empty, full, af;
  logic [W-1:0] wdata, rdata;
  logic [3:0]   count;

  sync_fifo #(.WIDTH(W), .DEPTH(D), .AF_SLACK(S)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .wdata(wdata), .pop(pop), .rdata(rdata),
    .empty(empty), .full(full), .almost_full(af), .count(count));

  logic [W-1:0] model [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare state against the model
      checks++;
      if (count != 4'(model.size()) || empty != (model.size() == 0) ||
          full != (model.size() == D) || af != (model.size() + S > D) ||
          (model.size() > 0 && rdata != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: count=%0d model=%0d", t, count, model.size());
      end
      if (full) n_full++;
      // phases: fill, drain, mixed
      pop  = (t % 600 < 200) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      push = ($urandom % 2 == 0) && (!full || pop);
      wdata = $urandom;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
