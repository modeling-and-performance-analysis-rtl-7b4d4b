// ri_out_port: outgoing port, the interface from a node onto the ring, with the slot
// reservation mechanism.
//
// Every cycle it registers exactly one packet onto the ring: either the slot coming from its
// own incoming port, or that slot filled with the packet at the head of the node's outgoing
// FIFO. A slot is usable for the head packet when it is invalid and either unreserved (and
// not booked for a bridge, unless this is a bridge), or reserved for this node. A slot of
// the reserved-for-completion type that is reserved for this node is usable only for a
// completion.
//  * Insert: the head is popped. A read keeps the slot reserved, now for the read's
//    destination. A write (or any other request) leaves it unreserved. A completion keeps a
//    reserved-for-completion slot reserved for this node unless it is the last word of the
//    burst; the last word unreserves it, or, when it went into some other slot, the next
//    reserved-for-completion slot of this node that passes is unreserved.
//    Using a slot that this port reserved earlier decrements Reserved_counter. Completions
//    leave with this node as source, so a bridge re-sources those it forwards.
//  * Stall (head waiting, slot not usable): Can_reserve_counter counts up. Once it exceeds
//    the reserve-again threshold RAT and Reserved_counter is below the reservation budget
//    RB, an unreserved, unbooked slot is reserved for this node; Reserved_counter goes up
//    and Can_reserve_counter restarts from zero. A port does not reserve a slot carrying
//    its own completion (that would be mistaken for its reserved-for-completion slot).
//  * Idle (nothing to insert): an invalid slot this port reserved is unreserved and
//    Reserved_counter goes down; clear requests (unres_req) or last completions queue up
//    releases of reserved-for-completion slots of this node.
// RB < 0 means an unlimited budget ("infinity" in the document's experiments).
// BOOK_FIRST (lower-ring side of a bridge): the first request this port inserts marks its
// slot as booked for the bridge; that slot can then only be used by the bridge or, while
// it is reserved for completions, by the node it is reserved for.
// Timing: slot_out is a register, so a node adds one cycle (one packet) to the ring.
// Counter widths and saturation at zero are this implementation's choice.
module ri_out_port
  import ri_pkg::*;
#(
  parameter int RB         = -1,
  parameter int RAT        = 0,
  parameter bit IS_BRIDGE  = 1'b0,
  parameter bit BOOK_FIRST = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  id_t  my_id,
  input  logic id_valid,
  input  pkt_t slot_in,
  output pkt_t slot_out,
  input  logic head_valid,
  input  pkt_t head,
  output logic pop,
  input  logic unres_req,
  output logic [CNT_W-1:0] reserved_cnt,
  output logic ev_insert,
  output logic ev_stall,
  output logic ev_reserve,
  output logic ev_unreserve
);
  logic [CNT_W-1:0] rsv_q, can_q, pend_q;
  logic [CNT_W-1:0] rsv_d, can_d, pend_d;
  logic             booked_done_q, booked_done_d;
  pkt_t             out_d;

  logic mine, mine_plain, mine_rc, usable, budget_ok, last_cpl, own_cpl;

  always_comb begin
    mine       = slot_in.reserved && slot_in.rsv_node == my_id;
    mine_plain = mine && slot_in.cmd != CMD_RSV_COMPL;
    mine_rc    = mine && slot_in.cmd == CMD_RSV_COMPL;
    usable     = !slot_in.valid &&
                 (slot_in.reserved ? (mine_plain || (mine_rc && head.cmd == CMD_COMPL))
                                   : (!slot_in.booked || IS_BRIDGE));
    budget_ok  = (RB < 0) || (int'(rsv_q) < RB);
    last_cpl   = head.burst_size <= BS_W'(1);
    own_cpl    = slot_in.valid && slot_in.cmd == CMD_COMPL && slot_in.src == my_id;

    out_d         = slot_in;
    rsv_d         = rsv_q;
    can_d         = can_q;
    pend_d        = pend_q + CNT_W'(unres_req);
    booked_done_d = booked_done_q;
    pop           = 1'b0;
    ev_insert     = 1'b0;
    ev_stall      = 1'b0;
    ev_reserve    = 1'b0;
    ev_unreserve  = 1'b0;

    if (id_valid && head_valid && usable) begin
      pop          = 1'b1;
      ev_insert    = 1'b1;
      out_d        = head;
      out_d.valid  = 1'b1;
      out_d.booked = slot_in.booked;
      out_d.ord_valid = 1'b0;
      if (mine_plain && rsv_q != 0) rsv_d = rsv_q - 1'b1;
      unique case (head.cmd)
        CMD_READ: begin
          out_d.reserved = 1'b1;
          out_d.rsv_node = head.dst;
        end
        CMD_COMPL: begin
          out_d.src = my_id;  // a bridge re-sources the completions it forwards
          if (mine_rc && !last_cpl) begin
            out_d.reserved = 1'b1;
            out_d.rsv_node = my_id;
          end else begin
            out_d.reserved = 1'b0;
            if (!mine_rc && last_cpl) pend_d = pend_d + 1'b1;
          end
          if (mine_rc && last_cpl) ev_unreserve = 1'b1;
        end
        default: out_d.reserved = 1'b0;
      endcase
      if (BOOK_FIRST && !booked_done_q && head.cmd != CMD_COMPL) begin
        out_d.booked  = 1'b1;
        booked_done_d = 1'b1;
      end
    end else if (id_valid && head_valid) begin
      ev_stall = 1'b1;
      can_d    = (can_q == '1) ? can_q : can_q + 1'b1;
      if (int'(can_d) > RAT && budget_ok && !slot_in.reserved && !slot_in.booked &&
          !own_cpl) begin
        out_d.reserved = 1'b1;
        out_d.rsv_node = my_id;
        rsv_d          = rsv_q + 1'b1;
        can_d          = '0;
        ev_reserve     = 1'b1;
      end else if (!slot_in.valid && mine_rc && pend_q != 0) begin
        out_d.reserved = 1'b0;
        pend_d         = pend_d - 1'b1;
        ev_unreserve   = 1'b1;
      end
    end else if (id_valid && !slot_in.valid && mine_plain) begin
      out_d.reserved = 1'b0;
      if (rsv_q != 0) rsv_d = rsv_q - 1'b1;
      ev_unreserve = 1'b1;
    end else if (id_valid && !slot_in.valid && mine_rc && pend_q != 0) begin
      out_d.reserved = 1'b0;
      pend_d         = pend_d - 1'b1;
      ev_unreserve   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_out      <= PKT_IDLE;
      rsv_q         <= '0;
      can_q         <= '0;
      pend_q        <= '0;
      booked_done_q <= 1'b0;
    end else begin
      slot_out      <= out_d;
      rsv_q         <= rsv_d;
      can_q         <= can_d;
      pend_q        <= pend_d;
      booked_done_q <= booked_done_d;
    end
  end

  assign reserved_cnt = rsv_q;

  // With a finite budget the port never holds more reservations than the budget allows.
  assert property (@(posedge clk) disable iff (!rst_n) (RB < 0) || (int'(rsv_q) <= RB))
    else $error("ri_out_port: reservation budget exceeded");
endmodule
