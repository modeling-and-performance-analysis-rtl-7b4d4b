// ri_initiator_node: ring node whose device (a DMA, accelerator or processor) issues reads
// and writes to target nodes.
//
// Structure: incoming port (FIFO kind) -> initiator agent -> outgoing FIFO -> outgoing port.
// The agent:
//  * accepts a write from the device whenever the outgoing FIFO has room;
//  * accepts a read of 1..MBS words only if (a) the completion buffer has at least req_burst free entries,
//    which it then reserves, and (b) the "good citizen" rule holds: after a read of N words
//    to a target, no further read goes to the same target for N cycles (a target needs at
//    least N cycles to return N words). The read carries the index of the first reserved
//    completion buffer entry in its completion order ID field; the target numbers the
//    completions of the burst from there;
//  * stores each arriving completion at the entry its completion order ID names and hands
//    entries to the device strictly in order, so completions reach the device in the order
//    the reads were issued even when they arrive out of order;
//  * turns a completion it did not ask for (its entry is not reserved or already filled)
//    into an alert (code 3) and sends it back onto the ring for the supervisor;
//  * drops clear requests (an initiator holds no reserved-for-completion slots).
// Device interface: valid/ready request channel (req_*), valid/ready completion channel
// (cpl_*). Completion buffer: 2**CO_W entries (16); its size is this design's choice,
// chosen to exceed the maximum burst (8) plus the read latency of the IPU topology.
// Node ID is assigned at run time by the initialization packet (my_id, id_valid).
module ri_initiator_node
  import ri_pkg::*;
#(
  parameter int IN_DEPTH  = 2,
  parameter int OUT_DEPTH = 2,
  parameter int RB        = -1,
  parameter int RAT       = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pkt_t              ring_in,
  output pkt_t              ring_out,
  // device request channel
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,   // 1: write, 0: read
  input  id_t               req_dst,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_data,
  input  logic [BS_W-1:0]   req_burst,   // words for a read, 1..MBS
  // device completion channel
  output logic              cpl_valid,
  input  logic              cpl_ready,
  output logic [DATA_W-1:0] cpl_data,
  // status
  output id_t               my_id,
  output logic              id_valid,
  output logic              ev_insert,
  output logic              ev_stall,
  output logic              ev_reserve,
  output logic              ev_bounce,
  output logic              ev_alert
);
  localparam int CB = 2 ** CO_W;

  pkt_t slot_mid, in_head, fifo_head, push_pkt;
  logic in_head_valid, in_pop, fifo_empty, fifo_full, fifo_pop, push;
  logic [$clog2(OUT_DEPTH+1)-1:0] fifo_count;
  logic ev_absorb, ev_unres;
  logic [CNT_W-1:0] rsv_cnt;
  id_t  max_id_unused;
  logic init_done_unused;

  ri_in_port #(.KIND(PORT_INITIATOR), .DEPTH(IN_DEPTH)) u_in (
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
    .head_valid(!fifo_empty), .head(fifo_head), .pop(fifo_pop), .unres_req(1'b0),
    .reserved_cnt(rsv_cnt), .ev_insert, .ev_stall, .ev_reserve, .ev_unreserve(ev_unres)
  );

  // ---------------- completion buffer ----------------
  logic [DATA_W-1:0] cb_data [CB];
  logic [CB-1:0]     cb_full;
  logic [CO_W-1:0]   alloc_ptr, rd_ptr;
  logic [CO_W:0]     used;

  // ---------------- good citizen timers, one per target ID ----------------
  logic [BS_W:0] gc_cnt [2**ID_W];

  logic [CO_W-1:0] cpl_off;
  logic            cpl_expected, in_is_cpl, alert_push, dev_push, rd_ok, rd_take, cb_write;
  logic [CO_W:0]   free_entries;

  always_comb begin
    in_is_cpl    = in_head_valid && in_head.cmd == CMD_COMPL;
    cpl_off      = in_head.cpl_order - rd_ptr;
    cpl_expected = ({1'b0, cpl_off} < used) && !cb_full[in_head.cpl_order];
    cb_write     = in_is_cpl && cpl_expected;
    alert_push   = in_is_cpl && !cpl_expected && !fifo_full;
    free_entries = (CO_W+1)'(CB) - used;
    rd_ok        = ({1'b0, req_burst} <= free_entries) && (gc_cnt[req_dst] == 0) &&
                   (req_burst != 0) && (int'(req_burst) <= MBS);
    req_ready    = id_valid && !fifo_full && !alert_push && (req_write || rd_ok);
    dev_push     = req_valid && req_ready;
    rd_take      = dev_push && !req_write;
    in_pop       = cb_write || alert_push ||
                   (in_head_valid && in_head.cmd != CMD_COMPL);  // clear requests dropped
    push         = alert_push || dev_push;

    push_pkt = PKT_IDLE;
    if (alert_push) begin
      push_pkt       = in_head;
      push_pkt.alert = AL_UNREQ_CPL;
    end else begin
      push_pkt.cmd        = req_write ? CMD_WRITE : CMD_READ;
      push_pkt.src        = my_id;
      push_pkt.dst        = req_dst;
      push_pkt.addr       = req_addr;
      push_pkt.data       = req_write ? req_data : '0;
      push_pkt.burst      = !req_write && (req_burst > BS_W'(1));
      push_pkt.burst_size = req_write ? BS_W'(1) : req_burst;
      push_pkt.cpl_order  = alloc_ptr;
    end
    push_pkt.valid = 1'b1;

    cpl_valid = cb_full[rd_ptr] && (used != 0);
    cpl_data  = cb_data[rd_ptr];
  end

  assign ev_alert = alert_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb_full   <= '0;
      alloc_ptr <= '0;
      rd_ptr    <= '0;
      used      <= '0;
      for (int i = 0; i < 2**ID_W; i++) gc_cnt[i] <= '0;
    end else begin
      for (int i = 0; i < 2**ID_W; i++)
        if (gc_cnt[i] != 0) gc_cnt[i] <= gc_cnt[i] - 1'b1;
      if (rd_take) begin
        gc_cnt[req_dst] <= {1'b0, req_burst};
        alloc_ptr       <= alloc_ptr + CO_W'(req_burst);
      end
      if (cb_write) cb_full[in_head.cpl_order] <= 1'b1;
      if (cpl_valid && cpl_ready) begin
        cb_full[rd_ptr] <= 1'b0;
        rd_ptr          <= rd_ptr + 1'b1;
      end
      used <= used + (rd_take ? (CO_W+1)'(req_burst) : '0)
                   - ((cpl_valid && cpl_ready) ? (CO_W+1)'(1) : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (cb_write) cb_data[in_head.cpl_order] <= in_head.data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) used <= (CO_W+1)'(CB))
    else $error("ri_initiator_node: completion buffer over-reserved");
endmodule
