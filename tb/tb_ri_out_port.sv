// tb_ri_out_port: directed tests of the outgoing port and its reservation counters.
// Three instances share the clock:
//  A: unlimited budget, reserve-again threshold 0 (main configuration).
//    insert into a free slot; stall and reserve; reuse of the reserved slot; no use of a
//    slot reserved for another node; idle release; a read reserving the slot for its
//    destination; completions in a reserved-for-completion slot (kept, then released by the
//    last word); a last word sent elsewhere releasing the next such slot; release requested
//    by a clear; no reservation of a slot carrying the port's own completion; booked slots.
//  B: budget 1, threshold 2: reserves only after three stalled cycles and never holds more
//    than one reservation.
//  C: bridge with booking of its first request: the first inserted request books its slot,
//    later ones do not; a bridge may use a booked slot.
// Each step drives inputs at the falling edge, samples the combinational pop/event outputs
// and then the registered slot after the rising edge.
module tb_ri_out_port;
  import ri_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  id_t  my_id = 3;
  logic idv = 1;
  pkt_t in_a, out_a, hd_a, in_b, out_b, hd_b, in_c, out_c, hd_c;
  logic hv_a, hv_b, hv_c, ur_a;
  logic pop_a, pop_b, pop_c;
  logic [CNT_W-1:0] rc_a, rc_b, rc_c;
  logic ins_a, stl_a, rsv_a, unr_a, ins_b, stl_b, rsv_b, unr_b, ins_c, stl_c, rsv_c, unr_c;

  ri_out_port #(.RB(-1), .RAT(0)) u_a (
    .clk, .rst_n, .my_id, .id_valid(idv), .slot_in(in_a), .slot_out(out_a),
    .head_valid(hv_a), .head(hd_a), .pop(pop_a), .unres_req(ur_a), .reserved_cnt(rc_a),
    .ev_insert(ins_a), .ev_stall(stl_a), .ev_reserve(rsv_a), .ev_unreserve(unr_a));
  ri_out_port #(.RB(1), .RAT(2)) u_b (
    .clk, .rst_n, .my_id, .id_valid(idv), .slot_in(in_b), .slot_out(out_b),
    .head_valid(hv_b), .head(hd_b), .pop(pop_b), .unres_req(1'b0), .reserved_cnt(rc_b),
    .ev_insert(ins_b), .ev_stall(stl_b), .ev_reserve(rsv_b), .ev_unreserve(unr_b));
  ri_out_port #(.RB(-1), .RAT(0), .IS_BRIDGE(1), .BOOK_FIRST(1)) u_c (
    .clk, .rst_n, .my_id, .id_valid(idv), .slot_in(in_c), .slot_out(out_c),
    .head_valid(hv_c), .head(hd_c), .pop(pop_c), .unres_req(1'b0), .reserved_cnt(rc_c),
    .ev_insert(ins_c), .ev_stall(stl_c), .ev_reserve(rsv_c), .ev_unreserve(unr_c));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, s); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  function automatic pkt_t mk(input cmd_e c, input int src, input int dst, input int data = 0,
                              input int bs = 1);
    pkt_t p = PKT_IDLE;
    p.valid = 1'b1; p.cmd = c; p.src = id_t'(src); p.dst = id_t'(dst); p.data = DATA_W'(data);
    p.burst_size = BS_W'(bs);
    return p;
  endfunction
  function automatic pkt_t free_slot(input int rsv = -1, input logic rc = 0, input logic bk = 0);
    pkt_t p = PKT_IDLE;
    if (rsv >= 0) begin p.reserved = 1; p.rsv_node = id_t'(rsv); end
    if (rc) p.cmd = CMD_RSV_COMPL;
    p.booked = bk;
    return p;
  endfunction

  // events sampled in the current step
  logic e_pop, e_ins, e_stl, e_rsv, e_unr;
  task automatic step_a(input pkt_t slot, input logic hv, input pkt_t h, input logic ur = 0);
    @(negedge clk);
    in_a = slot; hv_a = hv; hd_a = h; ur_a = ur;
    #1;
    e_pop = pop_a; e_ins = ins_a; e_stl = stl_a; e_rsv = rsv_a; e_unr = unr_a;
    @(posedge clk); #1;
    in_a = PKT_IDLE; hv_a = 0; ur_a = 0;
  endtask

  pkt_t w, p;
  int n_rsv;
  initial begin
    in_a = PKT_IDLE; in_b = PKT_IDLE; in_c = PKT_IDLE;
    hv_a = 0; hv_b = 0; hv_c = 0; ur_a = 0;
    hd_a = PKT_IDLE; hd_b = PKT_IDLE; hd_c = PKT_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- instance A ----------------
    w = mk(CMD_WRITE, 3, 5, 32'h11);
    step_a(free_slot(), 1, w);
    chk(e_pop && e_ins && out_a.valid && out_a.data == 32'h11 && !out_a.reserved,
        "write inserted into free slot");
    step_a(mk(CMD_WRITE, 1, 7), 1, w);
    chk(!e_pop && e_stl && e_rsv, "stall then reserve");
    chk(out_a.valid && out_a.src == 1 && out_a.reserved && out_a.rsv_node == 3 && rc_a == 1,
        "occupied slot marked reserved for this node");
    step_a(free_slot(5), 1, w);
    chk(!e_pop && e_stl && !e_rsv && out_a.reserved && out_a.rsv_node == 5,
        "slot reserved for another node is not used");
    step_a(free_slot(3), 1, w);
    chk(e_pop && out_a.valid && !out_a.reserved && rc_a == 0, "own reserved slot used");
    // reserve again, then go idle and see the reservation released
    step_a(mk(CMD_WRITE, 1, 7), 1, w);
    chk(rc_a == 1, "reserved again");
    step_a(free_slot(3), 0, w);
    chk(e_unr && !out_a.valid && !out_a.reserved && rc_a == 0, "idle release");
    // read reserves the slot for its destination
    p = mk(CMD_READ, 3, 5, 0, 4);
    step_a(free_slot(), 1, p);
    chk(e_pop && out_a.reserved && out_a.rsv_node == 5 && out_a.cmd == CMD_READ,
        "read slot reserved for destination");
    // completion words in the port's reserved-for-completion slot
    p = mk(CMD_COMPL, 9, 1, 32'hC0, 3);
    step_a(free_slot(3, 1), 1, p);
    chk(e_pop && out_a.cmd == CMD_COMPL && out_a.reserved && out_a.rsv_node == 3 &&
        out_a.src == 3, "completion keeps reserved-for-completion slot");
    step_a(free_slot(3, 1), 0, p);
    chk(!e_unr && out_a.reserved && out_a.cmd == CMD_RSV_COMPL, "idle port keeps its completion slot");
    step_a(free_slot(3, 1), 1, mk(CMD_WRITE, 3, 5));
    chk(!e_pop && e_stl && out_a.reserved, "write may not use a completion slot");
    step_a(free_slot(3, 1), 1, mk(CMD_COMPL, 9, 1, 32'hC1, 1));
    chk(e_pop && e_unr && out_a.valid && !out_a.reserved, "last completion word releases slot");
    // last word into another slot: next own completion slot is released
    step_a(free_slot(), 1, mk(CMD_COMPL, 9, 1, 32'hC2, 1));
    chk(e_pop && !out_a.reserved, "last word in free slot");
    step_a(free_slot(5, 1), 0, w);
    chk(!e_unr && out_a.reserved && out_a.rsv_node == 5, "other node's completion slot kept");
    step_a(free_slot(3, 1), 0, w);
    chk(e_unr && !out_a.reserved, "pending release done on next own completion slot");
    // clear request
    step_a(free_slot(), 0, w, 1);
    step_a(free_slot(3, 1), 0, w);
    chk(e_unr && !out_a.reserved, "clear request releases completion slot");
    step_a(free_slot(3, 1), 0, w);
    chk(!e_unr && out_a.reserved, "only one release per request");
    // own completion in the slot is not reserved
    p = mk(CMD_COMPL, 3, 1);
    step_a(p, 1, w);
    chk(e_stl && !e_rsv && out_a == p, "slot with own completion not reserved");
    // booked slot
    step_a(free_slot(-1, 0, 1), 1, w);
    chk(!e_pop && e_stl && !e_rsv && out_a.booked && !out_a.valid, "booked slot not used");
    step_a(free_slot(), 1, w);
    chk(e_pop && !out_a.booked, "no booking without BOOK_FIRST");

    // ---------------- instance B ----------------
    n_rsv = 0;
    @(negedge clk);
    hv_b = 1; hd_b = w;
    for (int c = 0; c < 12; c++) begin
      in_b = mk(CMD_WRITE, 1, 7);
      #1;
      if (c < 2) chk(stl_b && !rsv_b, "B: below threshold");
      if (c == 2) chk(rsv_b, "B: reserve after three stalls");
      if (rsv_b) n_rsv++;
      @(negedge clk);
    end
    chk(n_rsv == 1 && rc_b == 1, "B: budget of one reservation");
    in_b = free_slot(3);
    #1 chk(pop_b, "B: reserved slot used");
    @(negedge clk);
    in_b = PKT_IDLE; hv_b = 0;
    #1 chk(rc_b == 0, "B: counter back to zero");

    // ---------------- instance C ----------------
    @(negedge clk);
    hv_c = 1; hd_c = w; in_c = free_slot();
    #1 chk(pop_c, "C: first insert");
    @(posedge clk); #1 chk(out_c.valid && out_c.booked, "C: first request books its slot");
    @(negedge clk);
    in_c = free_slot();
    @(posedge clk); #1 chk(out_c.valid && !out_c.booked, "C: later request does not book");
    @(negedge clk);
    in_c = free_slot(-1, 0, 1);
    #1 chk(pop_c, "C: bridge uses booked slot");
    @(posedge clk); #1 chk(out_c.booked, "C: booking stays with the slot");
    @(negedge clk);
    hv_c = 0; in_c = PKT_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
