// ri_target_node: ring node whose device is a storage unit (a vector memory).
//
// Structure: incoming port (reorder-buffer kind) -> target agent -> outgoing FIFO ->
// outgoing port. Reads and writes addressed to the node are absorbed in the order the port
// first sees them (bounced packets keep their place through their order ticket).
// The target agent:
//  * passes writes to the device (dev_req_*, dev_req_write = 1);
//  * passes a read to the device and keeps its context (requester, first completion order
//    ID, words still due). Only one read is outstanding at a time: the next read waits in
//    the reorder buffer until the device has returned every word of the current one;
//  * wraps each word the device returns (dev_cpl_*) into a completion for the requester.
//    The first carries the read's completion order ID, each further one the next value;
//    burst_size carries the words still due, so the outgoing port recognises the last one
//    and releases the reserved-for-completion slot the incoming port created from the read;
//  * forwards clear requests to the outgoing port, which then releases a
//    reserved-for-completion slot of this node the next time one passes.
// The device handshakes are valid/ready. The one-read-at-a-time rule follows the
// document's memory device, which accepts nothing else while serving a read; the context
// register itself is this design's choice.
// ADDR_WORDS (0 = no check) is the device size in words; a request outside it is not
// absorbed but marked with alert 2 (address not in the destination's range) for the
// supervisor. Passing the size as a parameter is this design's choice.
module ri_target_node
  import ri_pkg::*;
#(
  parameter int IN_DEPTH  = 5,
  parameter int OUT_DEPTH = 2,
  parameter int RB        = -1,
  parameter int RAT       = 0,
  parameter int ADDR_WORDS = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pkt_t              ring_in,
  output pkt_t              ring_out,
  // request channel to the device
  output logic              dev_req_valid,
  input  logic              dev_req_ready,
  output logic              dev_req_write,
  output logic [ADDR_W-1:0] dev_req_addr,
  output logic [DATA_W-1:0] dev_req_data,
  output logic [BS_W-1:0]   dev_req_burst,
  // read data from the device, one word per handshake
  input  logic              dev_cpl_valid,
  output logic              dev_cpl_ready,
  input  logic [DATA_W-1:0] dev_cpl_data,
  // status
  output id_t               my_id,
  output logic              id_valid,
  output logic              ev_insert,
  output logic              ev_stall,
  output logic              ev_reserve,
  output logic              ev_bounce
);
  pkt_t slot_mid, in_head, fifo_head, push_pkt;
  logic in_head_valid, in_pop, fifo_empty, fifo_full, fifo_pop, push, unres_req;
  logic [$clog2(OUT_DEPTH+1)-1:0] fifo_count;
  logic ev_absorb, ev_unres;
  logic [CNT_W-1:0] rsv_cnt;
  id_t  max_id_unused;
  logic init_done_unused;

  ri_in_port #(.KIND(PORT_TARGET), .DEPTH(IN_DEPTH), .ADDR_WORDS(ADDR_WORDS)) u_in (
    .clk, .rst_n, .slot_in(ring_in), .slot_out(slot_mid), .my_id, .id_valid,
    .max_id(max_id_unused), .init_done(init_done_unused),
    .head_valid(in_head_valid), .head(in_head), .pop(in_pop), .ev_absorb, .ev_bounce
  );

  ri_fifo #(.DEPTH(OUT_DEPTH)) u_ofifo (
    .clk, .rst_n, .push, .push_pkt, .pop(fifo_pop), .head(fifo_head),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  ri_out_port #(.RB(RB), .RAT(RAT)) u_out (
    .clk, .rst_n, .my_id, .id_valid, .slot_in(slot_mid), .slot_out(ring_out),
    .head_valid(!fifo_empty), .head(fifo_head), .pop(fifo_pop), .unres_req,
    .reserved_cnt(rsv_cnt), .ev_insert, .ev_stall, .ev_reserve, .ev_unreserve(ev_unres)
  );

  // read context
  logic            ctx_busy;
  id_t             ctx_src;
  logic [CO_W-1:0] ctx_order;
  logic [BS_W-1:0] ctx_left;

  logic is_wr, is_rd, is_clr, rd_take;
  always_comb begin
    is_wr  = in_head_valid && in_head.cmd == CMD_WRITE;
    is_rd  = in_head_valid && in_head.cmd == CMD_READ;
    is_clr = in_head_valid && in_head.cmd == CMD_CLEAR;

    dev_req_valid = is_wr || (is_rd && !ctx_busy);
    dev_req_write = is_wr;
    dev_req_addr  = in_head.addr;
    dev_req_data  = in_head.data;
    dev_req_burst = (in_head.burst_size == 0) ? BS_W'(1) : in_head.burst_size;

    rd_take   = is_rd && !ctx_busy && dev_req_ready;
    unres_req = is_clr;
    in_pop    = (dev_req_valid && dev_req_ready) || is_clr ||
                (in_head_valid && !is_wr && !is_rd && !is_clr);

    dev_cpl_ready = ctx_busy && !fifo_full;
    push          = dev_cpl_valid && dev_cpl_ready;

    push_pkt            = PKT_IDLE;
    push_pkt.valid      = 1'b1;
    push_pkt.cmd        = CMD_COMPL;
    push_pkt.src        = my_id;
    push_pkt.dst        = ctx_src;
    push_pkt.data       = dev_cpl_data;
    push_pkt.cpl_order  = ctx_order;
    push_pkt.burst_size = ctx_left;
    push_pkt.burst      = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_busy  <= 1'b0;
      ctx_src   <= '0;
      ctx_order <= '0;
      ctx_left  <= '0;
    end else if (rd_take) begin
      ctx_busy  <= 1'b1;
      ctx_src   <= in_head.src;
      ctx_order <= in_head.cpl_order;
      ctx_left  <= dev_req_burst;
    end else if (push) begin
      ctx_order <= ctx_order + 1'b1;
      ctx_left  <= ctx_left - 1'b1;
      if (ctx_left == BS_W'(1)) ctx_busy <= 1'b0;
    end
  end
endmodule
