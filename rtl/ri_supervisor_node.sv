// ri_supervisor_node: the single supervisor node of a ring system, always ID 0.
//
// Structure: incoming port (supervisor kind, reorder buffer) -> supervisor agent ->
// outgoing FIFO -> outgoing port.
//  * Initialization: after power-on the device asks for initialization (init_req). The
//    agent inserts an initialization packet with data 0; every node on its way takes the
//    incremented value as its ID. When the packet returns, its data field is the highest
//    ID in the system (max_id) and init_done rises.
//  * Monitoring: packets carrying an alert, packets addressed to an ID above max_id and
//    packets addressed to the supervisor itself are taken off the ring by the incoming
//    port, in the order they are seen, and reported to the device one by one on the alert
//    channel (alert_*, valid/ready) with their alert code, command, source, destination
//    and address.
//  * If a removed packet was a read, the agent sends a clear request to the read's
//    destination so it releases any reserved-for-completion slot it made for that read.
//  * As a special initiator, the device may send requests of its own (req_*, valid/ready,
//    after initialization): writes at any time, and a read of 1..MBS words when no read of
//    the supervisor is still outstanding. Completions addressed to the supervisor are
//    handed to the device on the completion channel (cpl_*) while read words are still
//    due; any other completion for ID 0 is reported as alert 3.
// Own choices: one outstanding read and no completion buffer (the words of one read come
// from one target in order, and the reorder buffer keeps that order); requests wait while
// an alert report or a clear request is being handled.
module ri_supervisor_node
  import ri_pkg::*;
#(
  parameter int IN_DEPTH  = 5,
  parameter int OUT_DEPTH = 2,
  parameter int RB        = -1,
  parameter int RAT       = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pkt_t              ring_in,
  output pkt_t              ring_out,
  // initialization request from the device
  input  logic              init_req,
  output logic              init_ack,
  output logic              init_done,
  output id_t               max_id,
  // alert reports to the device
  output logic              alert_valid,
  input  logic              alert_ready,
  output alert_e            alert_code,
  output cmd_e              alert_cmd,
  output id_t               alert_src,
  output id_t               alert_dst,
  output logic [ADDR_W-1:0] alert_addr,
  // requests of the supervisor's own device
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  id_t               req_dst,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_data,
  input  logic [BS_W-1:0]   req_burst,
  // read data returned to the device, in order
  output logic              cpl_valid,
  input  logic              cpl_ready,
  output logic [DATA_W-1:0] cpl_data,
  // status
  output logic              ev_insert,
  output logic              ev_bounce
);
  pkt_t slot_mid, in_head, fifo_head, push_pkt;
  logic in_head_valid, in_pop, fifo_empty, fifo_full, fifo_pop, push;
  logic [$clog2(OUT_DEPTH+1)-1:0] fifo_count;
  logic ev_absorb, ev_unres, ev_stall_unused, ev_rsv_unused;
  logic [CNT_W-1:0] rsv_cnt;
  id_t  my_id;
  logic id_valid;

  ri_in_port #(.KIND(PORT_SUPERVISOR), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n, .slot_in(ring_in), .slot_out(slot_mid), .my_id, .id_valid,
    .max_id, .init_done,
    .head_valid(in_head_valid), .head(in_head), .pop(in_pop), .ev_absorb, .ev_bounce
  );

  ri_fifo #(.DEPTH(OUT_DEPTH)) u_ofifo (
    .clk, .rst_n, .push, .push_pkt, .pop(fifo_pop), .head(fifo_head),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  ri_out_port #(.RB(RB), .RAT(RAT)) u_out (
    .clk, .rst_n, .my_id, .id_valid, .slot_in(slot_mid), .slot_out(ring_out),
    .head_valid(!fifo_empty), .head(fifo_head), .pop(fifo_pop), .unres_req(1'b0),
    .reserved_cnt(rsv_cnt), .ev_insert, .ev_stall(ev_stall_unused),
    .ev_reserve(ev_rsv_unused), .ev_unreserve(ev_unres)
  );

  logic need_clear, clear_push, own_cpl, req_take;
  logic [BS_W:0] rd_left;  // words still due for the supervisor's own read
  always_comb begin
    own_cpl     = in_head.cmd == CMD_COMPL && in_head.dst == '0 && rd_left != 0;
    cpl_valid   = in_head_valid && own_cpl;
    cpl_data    = in_head.data;
    need_clear  = in_head.cmd == CMD_READ;
    alert_valid = in_head_valid && !own_cpl && (!need_clear || !fifo_full);
    alert_code  = in_head.alert;
    alert_cmd   = in_head.cmd;
    alert_src   = in_head.src;
    alert_dst   = in_head.dst;
    alert_addr  = in_head.addr;
    in_pop      = (alert_valid && alert_ready) || (cpl_valid && cpl_ready);
    clear_push  = alert_valid && alert_ready && need_clear;
    init_ack    = init_req && !fifo_full && !clear_push;
    req_ready   = init_done && !fifo_full && !clear_push && !init_req &&
                  (req_write || (rd_left == 0 && req_burst != 0 && int'(req_burst) <= MBS));
    req_take    = req_valid && req_ready;
    push        = clear_push || init_ack || req_take;

    push_pkt       = PKT_IDLE;
    push_pkt.valid = 1'b1;
    push_pkt.src   = '0;
    if (clear_push) begin
      push_pkt.cmd  = CMD_CLEAR;
      push_pkt.dst  = in_head.dst;
      push_pkt.addr = in_head.addr;
    end else if (req_take) begin
      push_pkt.cmd        = req_write ? CMD_WRITE : CMD_READ;
      push_pkt.dst        = req_dst;
      push_pkt.addr       = req_addr;
      push_pkt.data       = req_write ? req_data : '0;
      push_pkt.burst      = !req_write && (req_burst > BS_W'(1));
      push_pkt.burst_size = req_write ? BS_W'(1) : req_burst;
    end else begin
      push_pkt.cmd  = CMD_INIT;
      push_pkt.dst  = '0;
      push_pkt.data = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_left <= '0;
    else if (req_take && !req_write) rd_left <= {1'b0, req_burst};
    else if (cpl_valid && cpl_ready) rd_left <= rd_left - 1'b1;
  end
endmodule
