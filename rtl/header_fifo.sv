// header_fifo: queue of packet headers in front of the header rules
// matching engine.
//
// A synchronous first-in first-out buffer of DEPTH headers.  The head entry
// is always visible on rd_header (show-ahead), so the engine can search the
// TCAM with it in the same clock it pops it; the same header's source and
// destination ports are carried down the pipeline to the RMEs.
//
// Interface and timing: push writes wr_header at the clock edge when the
// queue is not full; pop removes the head when it is not empty.  Push and
// pop may happen together.  overflow pulses for one clock when a push is
// refused because the queue is full.  The queue is empty after reset.  The
// FIFO appears in the published block diagram without size or handshake:
// the depth, the show-ahead read and the overflow flag are this design's.
module header_fifo
  import nids_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  header_t wr_header,
  input  logic    pop,
  output header_t rd_header,
  output logic    empty,
  output logic    full,
  output logic    overflow
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  header_t          mem_q [DEPTH];
  logic [PTR_W-1:0] wr_ptr_q, rd_ptr_q;
  logic [PTR_W:0]   count_q;

  logic do_push, do_pop;
  assign empty   = (count_q == '0);
  assign full    = (count_q == (PTR_W+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign rd_header = mem_q[rd_ptr_q];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_ptr_q] <= wr_header;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count_q  <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_pop)  rd_ptr_q <= next_ptr(rd_ptr_q);
      count_q  <= count_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
      overflow <= push && full;
    end
  end

endmodule
