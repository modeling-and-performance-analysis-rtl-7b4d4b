// tb_ri_supervisor_node: tests the supervisor node on a ring closed by the testbench.
// The ring is a delay line of L slots standing in for three nodes: the first three stages
// add one to a passing initialization packet (as nodes 1..3 do), and the last stage takes
// off, and logs, packets for IDs 1..3 that carry no alert. Requests are injected into free
// slots.
// Checked:
//  * init_req makes the supervisor send the initialization packet; it comes back with 3,
//    max_id = 3, init_done rises and the packet leaves the ring;
//  * an alert packet is reported with its code, command, source, destination and address,
//    the report waits while alert_ready is low, and the slot comes out empty;
//  * a read carrying an alert produces a clear request to its destination;
//  * a request to an ID above max_id is reported with code 1, a request to the supervisor
//    itself with code 5; a normal packet passes untouched;
//  * more reports than the reorder buffer holds: extra packets are bounced and all are
//    reported in the order they were injected;
//  * the supervisor's own write and read leave with source 0; a second read waits until the
//    first is complete; completions for the read reach the completion channel in order and
//    a completion nobody asked for is reported with code 3.
module tb_ri_supervisor_node;
  import ri_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t ring_in, ring_out;
  logic init_req = 0, init_ack, init_done, alert_valid, alert_ready = 1;
  id_t max_id, alert_src, alert_dst;
  alert_e alert_code;
  cmd_e alert_cmd;
  logic [ADDR_W-1:0] alert_addr;
  logic ev_insert, ev_bounce;
  logic req_valid = 0, req_ready, req_write = 0, cpl_valid, cpl_ready = 1;
  id_t req_dst = '0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [DATA_W-1:0] req_data = '0, cpl_data;
  logic [BS_W-1:0] req_burst = '0;

  ri_supervisor_node dut (.*);

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

  pkt_t line [L];
  pkt_t inj;
  logic inj_v = 0, use_inj;
  pkt_t inq[$], logq[$];
  int bounces = 0;

  assign use_inj = inj_v && !line[L-1].valid && !line[L-1].reserved;
  assign ring_in = use_inj ? inj : line[L-1];

  function automatic pkt_t stage(input pkt_t p, input int k);
    if (p.valid && p.cmd == CMD_INIT && k < 3) p.data = p.data + 1;
    if (k == L - 1 && p.valid && p.cmd != CMD_INIT && p.alert == AL_NONE &&
        p.dst >= 1 && p.dst <= 3) begin
      logq.push_back(p);
      p.valid = 0;
      p.reserved = 0;
    end
    return p;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) line[i] <= PKT_IDLE;
    end else begin
      line[0] <= stage(ring_out, 0);
      for (int i = 1; i < L; i++) line[i] <= stage(line[i-1], i);
      if (use_inj) inj_v <= 0;
      if (ev_bounce) bounces++;
    end
  end
  always @(negedge clk) if (!inj_v && inq.size() != 0) begin inj = inq.pop_front(); inj_v = 1; end

  typedef struct { alert_e code; cmd_e cmd; id_t src; id_t dst; logic [ADDR_W-1:0] addr; } rep_t;
  rep_t reps[$];
  always @(posedge clk) if (rst_n && alert_valid && alert_ready)
    reps.push_back('{alert_code, alert_cmd, alert_src, alert_dst, alert_addr});

  function automatic pkt_t mk(input cmd_e c, input int src, input int dst, input int addr,
                              input alert_e al = AL_NONE);
    pkt_t p = PKT_IDLE;
    p.valid = 1; p.cmd = c; p.src = id_t'(src); p.dst = id_t'(dst); p.addr = ADDR_W'(addr);
    p.alert = al;
    return p;
  endfunction

  task automatic wait_idle(input int extra = 3 * L);
    while (inq.size() != 0 || inj_v) @(posedge clk);
    repeat (extra) @(posedge clk);
  endtask

  function automatic int valid_on_ring();
    int n = 0;
    for (int i = 0; i < L; i++) if (line[i].valid) n++;
    return n + int'(ring_out.valid);
  endfunction

  logic ok;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    init_req = 1;
    #1 chk(init_ack, "init request accepted");
    @(negedge clk) init_req = 0;
    repeat (3 * L) @(posedge clk);
    chk(init_done && max_id == 3, "init packet returns with highest ID 3");
    chk(valid_on_ring() == 0, "init packet removed");

    // ---- alert packet, report held back ----
    alert_ready = 0;
    inq.push_back(mk(CMD_WRITE, 2, 3, 32'h40, AL_ADDR));
    wait_idle();
    chk(alert_valid && alert_code == AL_ADDR && alert_cmd == CMD_WRITE && alert_src == 2 &&
        alert_dst == 3 && alert_addr == 32'h40, "alert report fields");
    chk(valid_on_ring() == 0, "alert packet taken off the ring");
    @(negedge clk) alert_ready = 1;
    @(posedge clk); #1 chk(!alert_valid && reps.size() == 1, "report taken");

    // ---- alerted read: clear request ----
    inq.push_back(mk(CMD_READ, 1, 2, 32'h80, AL_ADDR));
    wait_idle();
    chk(reps.size() == 2 && reps[1].cmd == CMD_READ, "read reported");
    chk(logq.size() == 1 && logq[0].cmd == CMD_CLEAR && logq[0].dst == 2 && logq[0].src == 0,
        "clear request sent to the read's destination");
    logq.delete();

    // ---- absent destination, supervisor as destination, normal packet ----
    inq.push_back(mk(CMD_WRITE, 1, 9, 32'h90));
    inq.push_back(mk(CMD_WRITE, 1, 0, 32'hA0));
    inq.push_back(mk(CMD_WRITE, 1, 3, 32'hB0));
    wait_idle();
    chk(reps.size() == 4 && reps[2].code == AL_NO_DST && reps[2].dst == 9, "absent ID reported");
    chk(reps.size() == 4 && reps[3].code == AL_REQ_AT_INI && reps[3].dst == 0,
        "request to the supervisor reported");
    chk(logq.size() == 1 && logq[0].addr == 32'hB0, "normal packet passes");
    reps.delete(); logq.delete();

    // ---- more reports than the buffer holds ----
    alert_ready = 0;
    for (int i = 0; i < 8; i++) inq.push_back(mk(CMD_WRITE, 1, 2, i, AL_UNREQ_CPL));
    wait_idle();
    chk(bounces >= 3, $sformatf("extra alert packets bounced (%0d)", bounces));
    @(negedge clk) alert_ready = 1;
    wait_idle(6 * L);
    chk(reps.size() == 8, $sformatf("all reported (%0d)", reps.size()));
    ok = 1;
    foreach (reps[i]) if (reps[i].addr != i) ok = 0;
    chk(ok, "reports in injection order");
    chk(valid_on_ring() == 0, "ring empty after the reports");
    reps.delete(); logq.delete();

    // ---- supervisor's own requests ----
    @(negedge clk);
    req_valid = 1; req_write = 1; req_dst = 2; req_addr = 32'h300; req_data = 32'hCAFE;
    req_burst = 1;
    #1 chk(req_ready, "write accepted");
    @(negedge clk);
    req_write = 0; req_dst = 3; req_addr = 32'h310; req_burst = 2;
    #1 chk(req_ready, "read accepted");
    @(negedge clk);
    req_addr = 32'h320;
    #1 chk(!req_ready, "second read waits for the first");
    req_valid = 0;
    wait_idle();
    chk(logq.size() == 2 && logq[0].cmd == CMD_WRITE && logq[0].src == 0 && logq[0].dst == 2 &&
        logq[0].data == 32'hCAFE, "own write on the ring");
    chk(logq.size() == 2 && logq[1].cmd == CMD_READ && logq[1].src == 0 && logq[1].dst == 3 &&
        logq[1].addr == 32'h310 && logq[1].burst_size == 2, "own read on the ring");
    logq.delete();
    begin
      pkt_t c;
      logic [DATA_W-1:0] got[$];
      for (int k = 0; k < 3; k++) begin
        c = mk(CMD_COMPL, 3, 0, 32'h310);
        c.data = 32'hD0 + k;
        c.burst_size = BS_W'(2 - k);
        inq.push_back(c);
      end
      fork
        begin
          repeat (6 * L) begin
            @(posedge clk);
            if (cpl_valid && cpl_ready) got.push_back(cpl_data);
          end
        end
      join
      chk(got.size() == 2 && got[0] == 32'hD0 && got[1] == 32'hD1, "read data delivered in order");
      chk(reps.size() == 1 && reps[0].code == AL_UNREQ_CPL && reps[0].src == 3,
          "completion after the read is reported as unrequested");
    end
    @(negedge clk);
    req_valid = 1;
    #1 chk(req_ready, "next read accepted once the first is complete");
    @(negedge clk) req_valid = 0;
    wait_idle();
    chk(logq.size() == 1 && logq[0].cmd == CMD_READ && logq[0].addr == 32'h320,
        "next read on the ring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
