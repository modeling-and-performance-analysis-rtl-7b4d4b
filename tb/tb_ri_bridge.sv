// tb_ri_bridge: tests the bridge between two rings closed by the testbench.
// Higher ring: a delay line of LH slots standing in for the supervisor (ID 0) and initiators
// 1 and 2; its last stage takes off and logs packets for IDs 0..2 (and the returning
// initialization packet). Lower ring: a delay line of LL slots standing in for five nodes;
// its first five stages add one to a passing initialization packet, its last stage takes
// off and logs packets for IDs 4..8. Packets are injected into free, unreserved, unbooked
// slots of either ring.
// Checked:
//  * initialization: lower bound 3, upper bound 9, and the packet returns to the higher ring
//    carrying 9;
//  * a write on the higher ring for ID 5 crosses down (the initialization packet counts as a
//    crossing each way); the first request sent down, the initialization packet, books its
//    slot, which then keeps circulating booked;
//  * a write on the lower ring for ID 2, and an alert packet for ID 5, cross up;
//  * a packet for ID 1 on the higher ring and one for ID 6 on the lower ring stay put;
//  * a read crossing down leaves behind a reserved-for-completion slot of the bridge on the
//    higher ring; its two completions cross up re-sourced to the bridge, and the last one
//    gets that slot released (the ring here has free slots, so the words need not wait for
//    the reserved one);
//  * with the lower ring full of traffic, writes crossing down overflow the request buffer,
//    are bounced, and arrive below in their original order, using the booked slot.
module tb_ri_bridge;
  import ri_pkg::*;
  localparam int LH = 6, LL = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t hi_in, hi_out, lo_in, lo_out;
  id_t lower_bound, upper_bound;
  logic bounds_valid, ev_bounce, ev_cross_down, ev_cross_up, ev_booked_use;

  ri_bridge dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  pkt_t hl [LH], ll [LL];
  pkt_t hinj, linj;
  logic hinj_v = 0, linj_v = 0, huse, luse;
  pkt_t hq[$], lq[$], hlog[$], llog[$];
  int bounces = 0, downs = 0, ups = 0, booked_uses = 0;
  logic keep_filler = 0;

  function automatic logic free(input pkt_t p);
    return !p.valid && !p.reserved && !p.booked;
  endfunction
  assign huse  = hinj_v && free(hl[LH-1]);
  assign luse  = linj_v && free(ll[LL-1]);
  assign hi_in = huse ? hinj : hl[LH-1];
  assign lo_in = luse ? linj : ll[LL-1];

  function automatic pkt_t take(input pkt_t p, input logic hi);
    if (hi) hlog.push_back(p); else llog.push_back(p);
    p.valid = 0;
    if (p.cmd == CMD_COMPL && p.reserved && p.rsv_node == p.src) p.cmd = CMD_RSV_COMPL;
    else if (p.cmd != CMD_RSV_COMPL) p.reserved = 0;
    return p;
  endfunction
  function automatic pkt_t hstage(input pkt_t p, input int k);
    if (k == LH - 1 && p.valid && (p.cmd == CMD_INIT || (p.alert == AL_NONE && p.dst <= 2) ||
                                   p.alert != AL_NONE))
      p = take(p, 1);
    return p;
  endfunction
  function automatic pkt_t lstage(input pkt_t p, input int k);
    if (p.valid && p.cmd == CMD_INIT && k < 5) p.data = p.data + 1;
    if (k == LL - 1 && p.valid && p.cmd != CMD_INIT && p.alert == AL_NONE &&
        p.dst >= 4 && p.dst <= 8 && !(keep_filler && p.src == 15))
      p = take(p, 0);
    return p;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LH; i++) hl[i] <= PKT_IDLE;
      for (int i = 0; i < LL; i++) ll[i] <= PKT_IDLE;
    end else begin
      hl[0] <= hstage(hi_out, 0);
      for (int i = 1; i < LH; i++) hl[i] <= hstage(hl[i-1], i);
      ll[0] <= lstage(lo_out, 0);
      for (int i = 1; i < LL; i++) ll[i] <= lstage(ll[i-1], i);
      if (huse) hinj_v <= 0;
      if (luse) linj_v <= 0;
      if (ev_bounce) bounces++;
      if (ev_cross_down) downs++;
      if (ev_cross_up) ups++;
      if (ev_booked_use) booked_uses++;
    end
  end
  always @(negedge clk) begin
    if (!hinj_v && hq.size() != 0) begin hinj = hq.pop_front(); hinj_v = 1; end
    if (!linj_v && lq.size() != 0) begin linj = lq.pop_front(); linj_v = 1; end
  end

  function automatic pkt_t mk(input cmd_e c, input int src, input int dst, input int data,
                              input int bs = 1);
    pkt_t p = PKT_IDLE;
    p.valid = 1; p.cmd = c; p.src = id_t'(src); p.dst = id_t'(dst); p.data = DATA_W'(data);
    p.burst_size = BS_W'(bs);
    if (c == CMD_READ) begin p.reserved = 1; p.rsv_node = id_t'(dst); end
    return p;
  endfunction

  task automatic wait_idle(input int extra = 4 * LL);
    while (hq.size() != 0 || lq.size() != 0 || hinj_v || linj_v) @(posedge clk);
    repeat (extra) @(posedge clk);
  endtask

  function automatic int hi_rsv_bridge();
    int n = 0;
    for (int i = 0; i < LH; i++) if (hl[i].reserved && hl[i].rsv_node == 3) n++;
    return n + int'(hi_out.reserved && hi_out.rsv_node == 3);
  endfunction
  function automatic int lo_booked();
    int n = 0;
    for (int i = 0; i < LL; i++) if (ll[i].booked) n++;
    return n + int'(lo_out.booked);
  endfunction

  pkt_t p;
  logic ok;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    p = PKT_IDLE; p.valid = 1; p.cmd = CMD_INIT; p.data = 2;
    hq.push_back(p);
    wait_idle();
    chk(bounds_valid && lower_bound == 3 && upper_bound == 9, "bounds 3 and 9");
    chk(hlog.size() == 1 && hlog[0].cmd == CMD_INIT && hlog[0].data == 9, "init returns with 9");
    hlog.delete();

    // ---- crossings ----
    hq.push_back(mk(CMD_WRITE, 1, 5, 32'h11));
    hq.push_back(mk(CMD_WRITE, 2, 1, 32'h22));
    lq.push_back(mk(CMD_WRITE, 6, 2, 32'h33));
    lq.push_back(mk(CMD_WRITE, 4, 6, 32'h44));
    p = mk(CMD_WRITE, 4, 5, 32'h55); p.alert = AL_ADDR;
    lq.push_back(p);
    wait_idle();
    chk(downs == 2 && ups == 3, $sformatf("crossings down %0d up %0d", downs, ups));
    ok = 0; foreach (llog[i]) if (llog[i].data == 32'h11 && llog[i].dst == 5 && llog[i].src == 1) ok = 1;
    chk(ok, "write crossed down");
    chk(lo_booked() == 1, "one booked slot circulates on the lower ring");
    ok = 0; foreach (hlog[i]) if (hlog[i].data == 32'h33 && hlog[i].dst == 2) ok = 1;
    chk(ok, "write crossed up");
    ok = 0; foreach (hlog[i]) if (hlog[i].data == 32'h55 && hlog[i].alert == AL_ADDR) ok = 1;
    chk(ok, "alert packet crossed up");
    ok = 0; foreach (hlog[i]) if (hlog[i].data == 32'h22) ok = 1;
    chk(ok, "higher-ring packet stayed on the higher ring");
    ok = 0; foreach (llog[i]) if (llog[i].data == 32'h44) ok = 1;
    chk(ok, "lower-ring packet stayed on the lower ring");
    hlog.delete(); llog.delete();

    // ---- read down, completions up ----
    hq.push_back(mk(CMD_READ, 1, 7, 0, 2));
    wait_idle();
    chk(hi_rsv_bridge() == 1, "read leaves a reserved-for-completion slot of the bridge");
    chk(llog.size() == 1 && llog[0].cmd == CMD_READ && llog[0].reserved && llog[0].rsv_node == 7,
        "read forwarded below, reserved for its target");
    p = mk(CMD_COMPL, 7, 1, 32'hC0, 2); lq.push_back(p);
    p = mk(CMD_COMPL, 7, 1, 32'hC1, 1); p.cpl_order = 1; lq.push_back(p);
    wait_idle();
    chk(hlog.size() == 2 && hlog[0].data == 32'hC0 && hlog[1].data == 32'hC1, "completions crossed up");
    if (hlog.size() == 2) begin
      chk(hlog[0].src == 3 && hlog[1].src == 3, "completions re-sourced to the bridge");
      chk(!hlog[1].reserved, "last word leaves unreserved");
    end
    chk(hi_rsv_bridge() == 0, "no slot left reserved for the bridge");
    hlog.delete(); llog.delete();

    // ---- overflow with a full lower ring ----
    keep_filler = 1;
    for (int i = 0; i < LL; i++) lq.push_back(mk(CMD_WRITE, 15, 8, 0));
    while (lq.size() != 0 || linj_v) @(posedge clk);
    bounces = 0; booked_uses = 0;
    for (int i = 0; i < 9; i++) hq.push_back(mk(CMD_WRITE, 1, 4, 100 + i));
    wait_idle(2 * LL);
    chk(bounces > 0, $sformatf("writes bounced at the bridge (%0d)", bounces));
    chk(booked_uses > 0, $sformatf("booked slot used (%0d)", booked_uses));
    keep_filler = 0;
    wait_idle(12 * LL);
    ok = 1;
    begin
      int n = 0;
      foreach (llog[i]) if (llog[i].src == 1) begin
        if (llog[i].data != 100 + n) ok = 0;
        n++;
      end
      chk(n == 9, $sformatf("all nine writes arrived (%0d)", n));
    end
    chk(ok, "original order kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
