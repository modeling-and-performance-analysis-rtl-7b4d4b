// ri_rob: circular re-ordering buffer of an incoming port ("bounce with re-ordering").
//
// Every packet a node absorbs gets a ticket the first time the port sees it: the next value
// of a running sequence counter. The ticket decides the slot: ticket - head_seq is the
// distance from the oldest undelivered entry. If that distance is below SIZE the packet is
// stored at (head_ptr + distance) mod SIZE; otherwise the buffer is "full" for this packet
// and the caller bounces it back onto the ring with the ticket written into its command
// order ID field (ord_valid set). When the packet comes round again it presents that ticket
// and is stored once its position fits. The agent always reads entries in ticket order, so
// packets are consumed in the order the port first saw them, however often they bounced.
//
// Interface: offer/offer_pkt present the packet this cycle (offer_pkt.ord_valid/ord_id say
// whether it already holds a ticket); accept and ticket are combinational answers. The
// head is presented with head_valid; pop removes it. Tickets count modulo 2**ORD_W, which
// must exceed SIZE plus the number of packets that can circulate bounced.
// SIZE need not be a power of two (the document's best single-channel setting is 5).
module ri_rob
  import ri_pkg::*;
#(
  parameter int SIZE = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             offer,
  input  pkt_t             offer_pkt,
  output logic             accept,
  output logic [ORD_W-1:0] ticket,
  output logic             head_valid,
  output pkt_t             head,
  input  logic             pop
);
  localparam int PW = (SIZE > 1) ? $clog2(SIZE) : 1;

  pkt_t             mem   [SIZE];
  logic [SIZE-1:0]  full_q;
  logic [PW-1:0]    head_ptr;
  logic [ORD_W-1:0] head_seq, next_seq;

  logic [ORD_W-1:0] offs;
  logic [PW:0]      slot_sum;
  logic [PW-1:0]    slot;

  assign ticket   = offer_pkt.ord_valid ? offer_pkt.ord_id : next_seq;
  assign offs     = ticket - head_seq;
  assign accept   = offer && (offs < ORD_W'(SIZE));
  assign slot_sum = {1'b0, head_ptr} + offs[PW:0];
  assign slot     = (slot_sum >= (PW+1)'(SIZE)) ? PW'(slot_sum - (PW+1)'(SIZE)) : slot_sum[PW-1:0];

  assign head_valid = full_q[head_ptr];
  assign head       = mem[head_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q   <= '0;
      head_ptr <= '0;
      head_seq <= '0;
      next_seq <= '0;
    end else begin
      if (offer && !offer_pkt.ord_valid) next_seq <= next_seq + 1'b1;
      if (pop && head_valid) begin
        full_q[head_ptr] <= 1'b0;
        head_ptr <= (head_ptr == PW'(SIZE - 1)) ? '0 : head_ptr + 1'b1;
        head_seq <= head_seq + 1'b1;
      end
      if (accept) full_q[slot] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      mem[slot]           <= offer_pkt;
      mem[slot].ord_valid <= 1'b0;
    end
  end

  // A ticket maps to exactly one position: it can never find that position taken.
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !full_q[slot])
    else $error("ri_rob: slot already occupied");
endmodule
