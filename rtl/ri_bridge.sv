// ri_bridge: bridge node joining a higher ring and a lower ring.
//
// On each ring the bridge has an incoming and an outgoing port; the incoming port of one
// ring feeds the outgoing port of the other. Each direction has two reorder buffers, one
// for completions and one for everything else, so completions can never be starved by
// requests (the livelock the two-buffer split avoids); each applies the re-ordering scheme
// of ri_rob on its own.
//
// IDs: the initialization packet comes from the higher ring. The bridge takes data+1 as
// its ID and lower bound LB, and sends the packet (data = LB) round the lower ring. When it
// comes back, the bridge takes data+1 as upper bound HB and sends it on along the higher
// ring. Lower-ring nodes therefore hold the IDs strictly between LB and HB. A packet on the
// higher ring crosses down when LB < dst < HB; a packet on the lower ring crosses up when
// its destination is outside that range or it carries an alert (alerts are removed by the
// supervisor, which sits on the higher ring).
//
// Absorbing a crossing packet: the slot is passed on invalid. For a read the slot becomes a
// reserved-for-completion slot reserved for the bridge itself, so the completions that come
// back from the other ring can be returned on this ring; the bridge releases it with the
// last completion. The buffered copy is stored unreserved and unbooked. A crossing packet
// that does not fit is bounced with its order ticket, like at a target.
//
// Outgoing side: round-robin between the request and completion buffers, except that the
// completion buffer wins whenever the passing slot is a reserved-for-completion slot of the
// bridge. The lower-ring outgoing port books the slot of the first request it sends down;
// that booked slot cannot be reserved or used by other lower-ring nodes and guarantees the
// bridge a way into the lower ring.
// Timing: both outputs are registers (outgoing ports); the two rings are independent
// otherwise. Own choices: HB itself is not given to any node; the handling of a completion
// slot released at an initiator also applies here (see ri_in_port).
module ri_bridge
  import ri_pkg::*;
#(
  parameter int ROB_DEPTH = 5,
  parameter int RB        = -1,
  parameter int RAT       = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t hi_in,
  output pkt_t hi_out,
  input  pkt_t lo_in,
  output pkt_t lo_out,
  output id_t  lower_bound,
  output id_t  upper_bound,
  output logic bounds_valid,
  output logic ev_bounce,
  output logic ev_cross_down,
  output logic ev_cross_up,
  output logic ev_booked_use
);
  id_t  lb_q, hb_q;
  logic lbv_q, hbv_q;
  assign lower_bound  = lb_q;
  assign upper_bound  = hb_q;
  assign bounds_valid = hbv_q;

  function automatic logic in_range(input id_t d, input id_t lb, input id_t hb);
    return (d > lb) && (d < hb);
  endfunction

  // ---------------- incoming sides ----------------
  // index 0: higher ring -> lower ring, index 1: lower ring -> higher ring
  pkt_t             side_in   [2];
  pkt_t             side_fwd  [2];
  logic             offer_req [2], offer_cpl [2];
  logic             acc_req   [2], acc_cpl   [2];
  logic [ORD_W-1:0] tk_req    [2], tk_cpl    [2];
  pkt_t             store     [2];
  logic             xing     [2];

  assign side_in[0] = hi_in;
  assign side_in[1] = lo_in;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      store[s]           = side_in[s];
      store[s].reserved  = 1'b0;
      store[s].booked    = 1'b0;
      store[s].ord_valid = 1'b0;
      if (s == 0)
        xing[s] = side_in[s].valid && hbv_q && side_in[s].cmd != CMD_INIT &&
                  side_in[s].alert == AL_NONE && in_range(side_in[s].dst, lb_q, hb_q);
      else
        xing[s] = side_in[s].valid && hbv_q && side_in[s].cmd != CMD_INIT &&
                  (side_in[s].alert != AL_NONE || !in_range(side_in[s].dst, lb_q, hb_q));
      // the initialization packet passes through the request buffer, data incremented
      if (side_in[s].valid && side_in[s].cmd == CMD_INIT) begin
        xing[s]       = 1'b1;
        store[s].data = side_in[s].data + 1'b1;
      end
      offer_cpl[s] = xing[s] && side_in[s].cmd == CMD_COMPL;
      offer_req[s] = xing[s] && side_in[s].cmd != CMD_COMPL;
    end
  end

  logic taken [2];
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      taken[s]    = (offer_cpl[s] && acc_cpl[s]) || (offer_req[s] && acc_req[s]);
      side_fwd[s] = side_in[s];
      if (xing[s]) begin
        if (taken[s]) begin
          side_fwd[s].valid     = 1'b0;
          side_fwd[s].ord_valid = 1'b0;
          if (side_in[s].cmd == CMD_READ && side_in[s].alert == AL_NONE) begin
            side_fwd[s].cmd      = CMD_RSV_COMPL;
            side_fwd[s].reserved = 1'b1;
            side_fwd[s].rsv_node = lb_q;
          end else if (side_in[s].cmd == CMD_COMPL && side_in[s].reserved &&
                       side_in[s].rsv_node == side_in[s].src) begin
            side_fwd[s].cmd = CMD_RSV_COMPL;
          end
        end else begin
          side_fwd[s].ord_valid = 1'b1;
          side_fwd[s].ord_id    = offer_cpl[s] ? tk_cpl[s] : tk_req[s];
        end
      end
    end
  end

  assign ev_bounce     = (xing[0] && !taken[0]) || (xing[1] && !taken[1]);
  assign ev_cross_down = taken[0];
  assign ev_cross_up   = taken[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_q  <= '0;
      hb_q  <= '0;
      lbv_q <= 1'b0;
      hbv_q <= 1'b0;
    end else begin
      if (hi_in.valid && hi_in.cmd == CMD_INIT && acc_req[0]) begin
        lb_q  <= id_t'(hi_in.data + 1'b1);
        lbv_q <= 1'b1;
      end
      if (lo_in.valid && lo_in.cmd == CMD_INIT && acc_req[1]) begin
        hb_q  <= id_t'(lo_in.data + 1'b1);
        hbv_q <= 1'b1;
      end
    end
  end

  // ---------------- buffers ----------------
  logic hv_req [2], hv_cpl [2], pop_req [2], pop_cpl [2];
  pkt_t hd_req [2], hd_cpl [2];

  generate
    for (genvar s = 0; s < 2; s++) begin : g_side
      ri_rob #(.SIZE(ROB_DEPTH)) u_req (
        .clk, .rst_n, .offer(offer_req[s]), .offer_pkt(store[s]), .accept(acc_req[s]),
        .ticket(tk_req[s]), .head_valid(hv_req[s]), .head(hd_req[s]), .pop(pop_req[s])
      );
      ri_rob #(.SIZE(ROB_DEPTH)) u_cpl (
        .clk, .rst_n, .offer(offer_cpl[s]), .offer_pkt(store[s]), .accept(acc_cpl[s]),
        .ticket(tk_cpl[s]), .head_valid(hv_cpl[s]), .head(hd_cpl[s]), .pop(pop_cpl[s])
      );
    end
  endgenerate

  // ---------------- outgoing sides ----------------
  // out side 0 drives the lower ring from buffers of side 0; out side 1 drives the higher
  // ring from buffers of side 1. The slot each outgoing port fills is the forwarded slot of
  // the incoming port of the same ring: higher ring = side_fwd[0], lower ring = side_fwd[1].
  pkt_t oslot [2];
  pkt_t ohead [2];
  logic ovalid[2], opop[2], sel_cpl[2], rr_q[2];
  logic [CNT_W-1:0] rsv_cnt [2];
  logic o_ins[2], o_stall[2], o_rsv[2], o_unres[2];

  assign oslot[0] = side_fwd[1];  // lower ring slot, filled by buffers of the down direction
  assign oslot[1] = side_fwd[0];  // higher ring slot, filled by buffers of the up direction

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic rc_mine;
      rc_mine    = !oslot[s].valid && oslot[s].reserved && oslot[s].rsv_node == lb_q &&
                   oslot[s].cmd == CMD_RSV_COMPL;
      if (rc_mine && hv_cpl[s])        sel_cpl[s] = 1'b1;
      else if (hv_cpl[s] && hv_req[s]) sel_cpl[s] = rr_q[s];
      else                             sel_cpl[s] = hv_cpl[s];
      ohead[s]   = sel_cpl[s] ? hd_cpl[s] : hd_req[s];
      ovalid[s]  = sel_cpl[s] ? hv_cpl[s] : hv_req[s];
    end
  end

  assign pop_cpl[0] = opop[0] && sel_cpl[0];
  assign pop_req[0] = opop[0] && !sel_cpl[0];
  assign pop_cpl[1] = opop[1] && sel_cpl[1];
  assign pop_req[1] = opop[1] && !sel_cpl[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q[0] <= 1'b0;
      rr_q[1] <= 1'b0;
    end else begin
      for (int s = 0; s < 2; s++)
        if (opop[s]) rr_q[s] <= !sel_cpl[s];
    end
  end

  // the ID travelling with the initialization packet is valid before the bridge has its own
  logic id_ok_lo, id_ok_hi;
  assign id_ok_lo = lbv_q;
  assign id_ok_hi = lbv_q;

  ri_out_port #(.RB(RB), .RAT(RAT), .IS_BRIDGE(1'b1), .BOOK_FIRST(1'b1)) u_out_lo (
    .clk, .rst_n, .my_id(lb_q), .id_valid(id_ok_lo), .slot_in(oslot[0]), .slot_out(lo_out),
    .head_valid(ovalid[0]), .head(ohead[0]), .pop(opop[0]), .unres_req(1'b0),
    .reserved_cnt(rsv_cnt[0]), .ev_insert(o_ins[0]), .ev_stall(o_stall[0]),
    .ev_reserve(o_rsv[0]), .ev_unreserve(o_unres[0])
  );

  ri_out_port #(.RB(RB), .RAT(RAT), .IS_BRIDGE(1'b1), .BOOK_FIRST(1'b0)) u_out_hi (
    .clk, .rst_n, .my_id(lb_q), .id_valid(id_ok_hi), .slot_in(oslot[1]), .slot_out(hi_out),
    .head_valid(ovalid[1]), .head(ohead[1]), .pop(opop[1]), .unres_req(1'b0),
    .reserved_cnt(rsv_cnt[1]), .ev_insert(o_ins[1]), .ev_stall(o_stall[1]),
    .ev_reserve(o_rsv[1]), .ev_unreserve(o_unres[1])
  );

  assign ev_booked_use = o_ins[0] && oslot[0].booked;
endmodule
