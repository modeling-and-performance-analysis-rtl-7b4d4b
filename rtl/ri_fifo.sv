// ri_fifo: first-in first-out queue of ring data packets.
//
// Used as the buffer of an outgoing port (packets from the agent waiting for a usable ring
// slot) and as the buffer of an initiator's incoming port, which bounces without
// re-ordering: a packet that finds the queue full simply stays on the ring and is taken on
// a later lap. Circular array with read/write pointers and an occupancy count; push and pop
// may happen in the same cycle, also when full (pop frees the entry the push uses).
// head is valid combinationally whenever empty is low; a push becomes visible one cycle later.
// The document sets the minimum buffer depth to two; DEPTH must be at least 2.
module ri_fifo
  import ri_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  pkt_t push_pkt,
  input  logic pop,
  output pkt_t head,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);
  pkt_t          mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head  = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_pkt;
  end

  // A push into a full FIFO without a pop is lost: callers must check full first.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("ri_fifo: push while full");
endmodule
