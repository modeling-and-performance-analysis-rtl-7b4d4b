// tb_ri_initiator_node: tests one initiator node with the testbench standing in for the
// rest of the ring. Slots queued in inq are presented on ring_in one per cycle (free slots
// otherwise); every valid packet leaving on ring_out is logged with its cycle number.
// Checked:
//  * the initialization packet gives ID 1 and leaves with data 1;
//  * eight writes offered back to back leave on eight consecutive cycles (one per cycle);
//  * a read leaves reserved for its target, with burst size and completion order ID equal
//    to the first completion buffer entry it owns; a second read to another target follows
//    at once with the next free entry;
//  * a second read to the same target waits at least as many cycles as the words of the
//    first read (good-citizen rule);
//  * completions arriving out of order reach the device in request order, and wait while
//    the device is not ready;
//  * with all 16 buffer entries owned by outstanding reads a further read is refused until
//    completions are handed over;
//  * a completion for an entry nobody asked for comes back out with alert 3.
module tb_ri_initiator_node;
  import ri_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t ring_in = PKT_IDLE, ring_out;
  logic req_valid = 0, req_ready, req_write = 0;
  id_t req_dst = 0;
  logic [ADDR_W-1:0] req_addr = 0;
  logic [DATA_W-1:0] req_data = 0;
  logic [BS_W-1:0] req_burst = 0;
  logic cpl_valid, cpl_ready = 1;
  logic [DATA_W-1:0] cpl_data;
  id_t my_id;
  logic id_valid, ev_insert, ev_stall, ev_reserve, ev_bounce, ev_alert;

  ri_initiator_node dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, s); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pkt_t inq[$];
  always @(negedge clk) ring_in <= (inq.size() != 0) ? inq.pop_front() : PKT_IDLE;

  pkt_t outq[$];
  int   outc[$];
  always @(posedge clk) if (rst_n && ring_out.valid) begin outq.push_back(ring_out); outc.push_back(cyc); end

  logic [DATA_W-1:0] got[$];
  always @(posedge clk) if (rst_n && cpl_valid && cpl_ready) got.push_back(cpl_data);

  int alerts = 0;
  always @(posedge clk) if (rst_n && ev_alert) alerts++;

  int acc_cyc;
  task automatic send(input logic wr, input int dst, input int addr, input int data, input int bs);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_dst = id_t'(dst); req_addr = ADDR_W'(addr);
    req_data = DATA_W'(data); req_burst = BS_W'(bs);
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    acc_cyc = cyc;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  function automatic pkt_t cpl(input int src, input int order, input int data, input int left);
    pkt_t p = PKT_IDLE;
    p.valid = 1; p.cmd = CMD_COMPL; p.src = id_t'(src); p.dst = 1;
    p.cpl_order = CO_W'(order); p.data = DATA_W'(data); p.burst_size = BS_W'(left);
    return p;
  endfunction

  pkt_t p;
  int ca, cc, n;
  logic ok;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    p = PKT_IDLE; p.valid = 1; p.cmd = CMD_INIT; p.data = 0;
    inq.push_back(p);
    repeat (4) @(posedge clk);
    #1 chk(id_valid && my_id == 1, "ID from initialization");
    chk(outq.size() == 1 && outq[0].cmd == CMD_INIT && outq[0].data == 1, "init passed on with 1");
    outq.delete(); outc.delete();

    // ---- writes back to back ----
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      req_valid = 1; req_write = 1; req_dst = 5; req_addr = ADDR_W'(i); req_data = DATA_W'(100 + i);
      #1 chk(req_ready, "write accepted every cycle");
    end
    @(negedge clk) req_valid = 0;
    repeat (4) @(posedge clk);
    chk(outq.size() == 8, "eight writes on the ring");
    if (outq.size() == 8) begin
      chk(outc[7] - outc[0] == 7, "one write per cycle");
      ok = 1;
      foreach (outq[i]) if (outq[i].cmd != CMD_WRITE || outq[i].data != 100 + i ||
                            outq[i].addr != i || outq[i].src != 1 || outq[i].dst != 5) ok = 0;
      chk(ok, "write packet fields");
    end
    outq.delete(); outc.delete();

    // ---- reads and good-citizen rule ----
    send(0, 5, 32'h100, 0, 4); ca = acc_cyc;
    send(0, 6, 32'h200, 0, 3);
    chk(acc_cyc == ca + 1, "read to another target not delayed");
    send(0, 5, 32'h300, 0, 2); cc = acc_cyc;
    chk(cc - ca >= 4, "same target waits for the burst length");
    repeat (4) @(posedge clk);
    chk(outq.size() == 3, "three reads on the ring");
    if (outq.size() == 3) begin
      chk(outq[0].cmd == CMD_READ && outq[0].reserved && outq[0].rsv_node == 5 &&
          outq[0].burst_size == 4 && outq[0].burst && outq[0].cpl_order == 0, "read A fields");
      chk(outq[1].rsv_node == 6 && outq[1].cpl_order == 4 && outq[1].burst_size == 3, "read B fields");
      chk(outq[2].cpl_order == 7 && outq[2].burst_size == 2, "read C fields");
    end
    outq.delete(); outc.delete();

    // ---- completions out of order, device not ready at first ----
    cpl_ready = 0;
    for (int i = 0; i < 3; i++) inq.push_back(cpl(6, 4 + i, 32'hB0 + i, 3 - i));
    for (int i = 0; i < 2; i++) inq.push_back(cpl(5, 7 + i, 32'hC0 + i, 2 - i));
    for (int i = 0; i < 4; i++) inq.push_back(cpl(5, i, 32'hA0 + i, 4 - i));
    repeat (5) @(posedge clk);
    #1 chk(!cpl_valid, "nothing delivered before the first read's data");
    repeat (9) @(posedge clk);
    #1 chk(cpl_valid && cpl_data == 32'hA0, "first word waits for the device");
    @(negedge clk) cpl_ready = 1;
    repeat (12) @(posedge clk);
    chk(got.size() == 9, "nine completions delivered");
    if (got.size() == 9) begin
      ok = 1;
      for (int i = 0; i < 4; i++) if (got[i] != 32'hA0 + i) ok = 0;
      for (int i = 0; i < 3; i++) if (got[4 + i] != 32'hB0 + i) ok = 0;
      for (int i = 0; i < 2; i++) if (got[7 + i] != 32'hC0 + i) ok = 0;
      chk(ok, "completions in request order");
    end
    chk(outq.size() == 0, "no packets sent back");
    got.delete();

    // ---- completion buffer full ----
    send(0, 7, 0, 0, 8);   // entries 9..16
    send(0, 8, 0, 0, 8);   // entries 1..8 (wrapped)
    @(negedge clk);
    req_valid = 1; req_write = 0; req_dst = 9; req_burst = 1;
    n = 0;
    for (int i = 0; i < 10; i++) begin #1 if (req_ready) n++; @(negedge clk); end
    chk(n == 0, "read refused while the buffer is fully reserved");
    for (int i = 0; i < 8; i++) inq.push_back(cpl(7, (9 + i) % 16, 32'hD0 + i, 8 - i));
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk) #1 req_valid = 0;
    chk(got.size() >= 1 && got[0] == 32'hD0, "read accepted once entries are handed over");
    for (int i = 0; i < 8; i++) inq.push_back(cpl(8, (1 + i) % 16, 32'hE0 + i, 8 - i));
    inq.push_back(cpl(9, 9, 32'hF0, 1));
    repeat (25) @(posedge clk);
    chk(got.size() == 17 && got[16] == 32'hF0, "all seventeen words delivered");
    outq.delete();

    // ---- unrequested completion ----
    inq.push_back(cpl(5, 3, 32'hBAD, 1));
    repeat (6) @(posedge clk);
    chk(alerts == 1, "unrequested completion detected");
    chk(outq.size() == 1 && outq[0].alert == AL_UNREQ_CPL && outq[0].data == 32'hBAD,
        "sent on with alert 3");
    chk(got.size() == 17, "not delivered to the device");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
