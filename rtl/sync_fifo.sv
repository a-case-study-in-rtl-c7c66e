// sync_fifo: single-clock first-in first-out queue.
//
// Holds the (i, j) pairs that passed the cutoff test on their way from the
// distance lanes to the force pipeline: one queue per lane and one shared
// queue in front of the force pipeline. The queue itself is named by the
// design; its size, the show-ahead read and the almost-full threshold are
// this implementation's choices.
//
// Interface: push/wdata write when not full; the head is always on rdata
// while empty is low, and pop removes it. A push and a pop may happen in the
// same cycle, also when full. almost_full rises when fewer than AF_SLACK
// entries are free, so a producer with AF_SLACK-1 writes still in flight can
// stop in time. count is the number of entries held. Writes take effect at
// the next clock edge; the head is visible in the cycle after its push.
module sync_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AF_SLACK = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty       = (count == 0);
  assign full        = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign almost_full = (32'(count) + AF_SLACK > DEPTH);
  assign do_pop      = pop && !empty;
  assign do_push     = push && (!full || do_pop);
  assign rdata       = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  // A producer must never push into a full queue it is not also draining.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("sync_fifo: push while full");

endmodule
