// ri_in_port: incoming port, the interface from the ring into a node.
//
// Each cycle it looks at the packet in the slot arriving from the upstream node and hands a
// (possibly modified) copy of the slot on to its own outgoing port, combinationally; the
// outgoing port registers it. What it does depends on KIND:
//  * PORT_INITIATOR: a FIFO ("bounce without re-ordering"). Completions (and clear requests)
//    addressed to this node are copied into the FIFO if it has room and the slot is marked
//    invalid; if the FIFO is full the slot passes unchanged and is taken on a later lap.
//    A read or write addressed to an initiator gets alert 5 and travels on to the supervisor.
//  * PORT_TARGET: a reorder buffer ("bounce with re-ordering", ri_rob). Reads, writes and
//    clear requests for this node are absorbed in first-seen order; a packet that does not
//    fit is bounced carrying its order ticket. An absorbed read turns the slot into a
//    reserved-for-completion slot (it stays reserved for this node, as the source's outgoing
//    port reserved it for its destination). A completion addressed to a target gets alert 4.
//    When ADDR_WORDS is non-zero the device holds words 0..ADDR_WORDS-1: a write outside
//    that range, or a read whose burst does not fit in it, gets alert 2 instead of being
//    absorbed. ADDR_WORDS = 0 disables the check.
//  * PORT_SUPERVISOR: a reorder buffer that absorbs alert packets, packets for IDs beyond the
//    highest assigned ID and packets addressed to the supervisor itself, clears the slot and
//    the alert field, and hands the packet to the supervisor agent for reporting.
// Node IDs: the supervisor is ID 0. Any other node takes the initialization packet, adds one
// to its data field, keeps that as its ID and passes it on; the supervisor removes the
// initialization packet when it comes back and keeps its data as the highest node ID.
//
// Own choices: when an initiator (or the supervisor) absorbs a completion from a slot that
// is still reserved for the completion's source (a completion returned in the sender's
// reserved-for-completion slot), the slot goes back to the reserved-for-completion type so
// the sender can use it again for the next word. A slot reserved by some other node stays an ordinary reserved
// slot of that node.
// Packets already carrying an alert are left for the supervisor by every other port.
module ri_in_port
  import ri_pkg::*;
#(
  parameter port_kind_e KIND  = PORT_TARGET,
  parameter int         DEPTH = 5,
  parameter int         ADDR_WORDS = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t slot_in,
  output pkt_t slot_out,
  // node identity
  output id_t  my_id,
  output logic id_valid,
  output id_t  max_id,      // supervisor: highest assigned ID
  output logic init_done,   // supervisor: initialization packet came back
  // buffered packets for the agent
  output logic head_valid,
  output pkt_t head,
  input  logic pop,
  // events
  output logic ev_absorb,
  output logic ev_bounce
);
  id_t  id_q, max_q;
  logic idv_q, done_q;

  logic offer, accept;
  pkt_t store_pkt;
  logic [ORD_W-1:0] ticket;

  logic is_sup;
  assign is_sup = (KIND == PORT_SUPERVISOR);

  assign my_id     = is_sup ? '0 : id_q;
  assign id_valid  = is_sup ? 1'b1 : idv_q;
  assign max_id    = max_q;
  assign init_done = done_q;

  // address range check of a target (one word for a write, the whole burst for a read)
  logic [ADDR_W:0] last_word;
  logic            addr_bad;
  always_comb begin
    last_word = {1'b0, slot_in.addr};
    if (slot_in.cmd == CMD_READ && slot_in.burst_size != 0)
      last_word = last_word + (ADDR_W+1)'(slot_in.burst_size) - 1'b1;
    addr_bad = (ADDR_WORDS != 0) && (slot_in.cmd == CMD_READ || slot_in.cmd == CMD_WRITE) &&
               (last_word >= (ADDR_W+1)'(ADDR_WORDS));
  end

  logic match;
  always_comb begin
    slot_out  = slot_in;
    store_pkt = slot_in;
    offer     = 1'b0;
    match     = slot_in.valid && id_valid && slot_in.cmd != CMD_INIT;
    unique case (KIND)
      PORT_INITIATOR: begin
        if (match && slot_in.alert == AL_NONE && slot_in.dst == my_id) begin
          if (slot_in.cmd == CMD_COMPL || slot_in.cmd == CMD_CLEAR) offer = 1'b1;
          else slot_out.alert = AL_REQ_AT_INI;
        end
      end
      PORT_TARGET: begin
        if (match && slot_in.alert == AL_NONE && slot_in.dst == my_id) begin
          if (slot_in.cmd == CMD_COMPL) slot_out.alert = AL_CPL_AT_TGT;
          else if (addr_bad) slot_out.alert = AL_ADDR;
          else offer = 1'b1;
        end
      end
      default: begin  // PORT_SUPERVISOR
        if (match) begin
          if (slot_in.alert != AL_NONE) offer = 1'b1;
          else if (slot_in.dst == '0) begin
            offer = 1'b1;
            store_pkt.alert = (slot_in.cmd == CMD_COMPL) ? AL_UNREQ_CPL : AL_REQ_AT_INI;
          end else if (done_q && slot_in.dst > max_q) begin
            offer = 1'b1;
            store_pkt.alert = AL_NO_DST;
          end
        end
      end
    endcase

    if (offer) begin
      if (accept) begin
        slot_out.valid     = 1'b0;
        slot_out.ord_valid = 1'b0;
        if (KIND == PORT_SUPERVISOR) slot_out.alert = AL_NONE;
        if (KIND == PORT_TARGET && slot_in.cmd == CMD_READ) slot_out.cmd = CMD_RSV_COMPL;
        if (KIND != PORT_TARGET && slot_in.cmd == CMD_COMPL && slot_in.reserved &&
            slot_in.rsv_node == slot_in.src)
          slot_out.cmd = CMD_RSV_COMPL;
      end else if (KIND != PORT_INITIATOR) begin
        slot_out.ord_valid = 1'b1;
        slot_out.ord_id    = ticket;
      end
    end

    // initialization packet
    if (slot_in.valid && slot_in.cmd == CMD_INIT) begin
      if (is_sup) slot_out.valid = 1'b0;
      else slot_out.data = slot_in.data + 1'b1;
    end
  end

  assign ev_absorb = offer && accept;
  assign ev_bounce = offer && !accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q   <= '0;
      idv_q  <= 1'b0;
      max_q  <= '0;
      done_q <= 1'b0;
    end else if (slot_in.valid && slot_in.cmd == CMD_INIT) begin
      if (is_sup) begin
        max_q  <= id_t'(slot_in.data);
        done_q <= 1'b1;
      end else begin
        id_q  <= id_t'(slot_in.data + 1'b1);
        idv_q <= 1'b1;
      end
    end
  end

  generate
    if (KIND == PORT_INITIATOR) begin : g_fifo
      logic f_empty, f_full;
      logic [$clog2(DEPTH+1)-1:0] f_count;
      pkt_t store_clean;
      always_comb begin
        store_clean = store_pkt;
        store_clean.ord_valid = 1'b0;
      end
      assign accept = !f_full;
      assign ticket = '0;
      ri_fifo #(.DEPTH(DEPTH)) u_fifo (
        .clk, .rst_n, .push(offer && !f_full), .push_pkt(store_clean), .pop,
        .head, .empty(f_empty), .full(f_full), .count(f_count)
      );
      assign head_valid = !f_empty;
    end else begin : g_rob
      ri_rob #(.SIZE(DEPTH)) u_rob (
        .clk, .rst_n, .offer, .offer_pkt(store_pkt), .accept, .ticket,
        .head_valid, .head, .pop
      );
    end
  endgenerate
endmodule
