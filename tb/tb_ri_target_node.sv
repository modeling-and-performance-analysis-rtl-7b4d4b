// tb_ri_target_node: tests one target node with a vector memory model as its device.
// The testbench closes the ring with a delay line of L slots and stands in for the other
// nodes: the returning initialization packet is removed; packets for other IDs (completions for initiator 1) and alert packets are logged
// and removed; a completion slot reserved by its sender goes back to the
// reserved-for-completion type, as an initiator's incoming port does. Requests are
// injected into free, unreserved slots.
// Checked:
//  * the initialization packet gives ID 5;
//  * a write reaches the memory; a read of 4 words returns 4 completions to its requester
//    with completion order IDs counting up from the read's, burst_size counting down to 1
//    and the data read back; all travel in the reserved-for-completion slot the read
//    created (on a ring full of other traffic), which the last word releases;
//  * with the memory busy serving a long read, writes beyond the reorder buffer are bounced
//    and, when they come back, are written in their original order;
//  * a completion sent to the target comes out with alert 4;
//  * a write beyond the device size and a read whose burst runs past its end get alert 2;
//  * a clear request releases a reserved-for-completion slot of the node.
module tb_ri_target_node;
  import ri_pkg::*;
  localparam int L = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t ring_in, ring_out;
  logic dev_req_valid, dev_req_ready, dev_req_write, dev_cpl_valid, dev_cpl_ready;
  logic [ADDR_W-1:0] dev_req_addr;
  logic [DATA_W-1:0] dev_req_data, dev_cpl_data;
  logic [BS_W-1:0] dev_req_burst;
  id_t my_id;
  logic id_valid, ev_insert, ev_stall, ev_reserve, ev_bounce;
  int n_writes, n_reads;

  ri_target_node #(.ADDR_WORDS(1024)) dut (.*);
  tb_mem_model u_mem (
    .clk, .rst_n, .req_valid(dev_req_valid), .req_ready(dev_req_ready),
    .req_write(dev_req_write), .req_addr(dev_req_addr), .req_data(dev_req_data),
    .req_burst(dev_req_burst), .cpl_valid(dev_cpl_valid), .cpl_ready(dev_cpl_ready),
    .cpl_data(dev_cpl_data), .n_writes, .n_reads);

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

  // ring closure
  pkt_t line [L];
  pkt_t inj;
  logic inj_v = 0, use_inj;
  pkt_t inq[$], logq[$];
  int bounces = 0;

  assign use_inj = inj_v && !line[L-1].valid && !line[L-1].reserved && !line[L-1].booked;
  assign ring_in = use_inj ? inj : line[L-1];

  logic keep_filler = 0;  // packets for ID 9 circulate instead of being removed
  function automatic pkt_t sink(input pkt_t p);
    if (keep_filler && p.valid && p.dst == 9) return p;
    if (p.valid && (p.cmd == CMD_INIT || p.alert != AL_NONE || p.dst != my_id)) begin
      if (p.cmd != CMD_INIT) logq.push_back(p);
      p.valid = 0;
      p.alert = AL_NONE;
      if (p.cmd == CMD_COMPL && p.reserved && p.rsv_node == p.src) p.cmd = CMD_RSV_COMPL;
    end
    return p;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) line[i] <= PKT_IDLE;
    end else begin
      line[0] <= sink(ring_out);
      for (int i = 1; i < L; i++) line[i] <= line[i-1];
      if (use_inj) inj_v <= 0;
      if (ev_bounce) bounces++;
    end
  end
  always @(negedge clk) if (!inj_v && inq.size() != 0) begin inj = inq.pop_front(); inj_v = 1; end

  function automatic pkt_t req(input cmd_e c, input int addr, input int data, input int bs = 1,
                               input int order = 0);
    pkt_t p = PKT_IDLE;
    p.valid = 1; p.cmd = c; p.src = 1; p.dst = 5; p.addr = ADDR_W'(addr); p.data = DATA_W'(data);
    p.burst_size = BS_W'(bs); p.burst = bs > 1; p.cpl_order = CO_W'(order);
    if (c == CMD_READ) begin p.reserved = 1; p.rsv_node = 5; end
    return p;
  endfunction

  task automatic wait_idle(input int extra = 3 * L);
    while (inq.size() != 0 || inj_v) @(posedge clk);
    repeat (extra) @(posedge clk);
  endtask

  function automatic int rsv_for_me();
    int n = 0;
    for (int i = 0; i < L; i++) if (line[i].reserved && line[i].rsv_node == 5) n++;
    if (ring_out.reserved && ring_out.rsv_node == 5) n++;
    return n;
  endfunction

  pkt_t p;
  logic ok;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    p = PKT_IDLE; p.valid = 1; p.cmd = CMD_INIT; p.data = 4;
    inq.push_back(p);
    wait_idle(4);
    chk(id_valid && my_id == 5, "ID 5 from initialization");
    wait_idle();
    chk(my_id == 5, "ID stays 5 once the initialization packet is removed");

    // ---- write then read back ----
    inq.push_back(req(CMD_WRITE, 10, 32'hCAFE));
    wait_idle();
    chk(n_writes == 1, "write reached memory");
    inq.push_back(req(CMD_READ, 10, 0, 4, 3));
    wait_idle();
    chk(n_reads == 1, "read reached memory");
    chk(logq.size() == 4, $sformatf("four completions (%0d)", logq.size()));
    if (logq.size() == 4) begin
      ok = 1;
      foreach (logq[i]) begin
        if (logq[i].cmd != CMD_COMPL || logq[i].src != 5 || logq[i].dst != 1) ok = 0;
        if (logq[i].cpl_order != 3 + i || logq[i].burst_size != 4 - i) ok = 0;
      end
      chk(ok, "completion header fields");
      chk(logq[0].data == 32'hCAFE && logq[1].data == 32'h5000_000B &&
          logq[3].data == 32'h5000_000D, "completion data");
      chk(!logq[3].reserved, "last word releases the slot");
    end
    chk(rsv_for_me() == 0, "no slot left reserved for the target");
    logq.delete();

    // ---- full ring: completions travel in the reserved-for-completion slot ----
    keep_filler = 1;
    for (int i = 0; i < L; i++) begin p = req(CMD_WRITE, 0, 0); p.dst = 9; inq.push_back(p); end
    inq.push_back(req(CMD_READ, 30, 0, 4, 8));
    wait_idle(1);
    for (int i = 0; i < 20 * L && logq.size() < 4; i++) @(posedge clk);
    chk(logq.size() == 4, "four completions on a full ring");
    if (logq.size() == 4) begin
      chk(logq[0].reserved && logq[0].rsv_node == 5 && logq[2].reserved && logq[2].rsv_node == 5,
          "words use the reserved-for-completion slot");
      chk(!logq[3].reserved, "last word releases it");
      chk(logq[0].data == 32'h5000_001E && logq[3].data == 32'h5000_0021, "data on full ring");
    end
    keep_filler = 0;
    wait_idle();
    chk(rsv_for_me() == 0, "stall reservations released once the ring drains");
    logq.delete();

    // ---- bounce with re-ordering while memory is busy ----
    inq.push_back(req(CMD_READ, 0, 0, 8, 0));
    for (int i = 1; i <= 8; i++) inq.push_back(req(CMD_WRITE, 20, i));
    wait_idle(6 * L);
    chk(bounces >= 2, $sformatf("writes bounced (%0d)", bounces));
    chk(n_writes == 9, "all writes reached memory");
    logq.delete();
    inq.push_back(req(CMD_READ, 20, 0, 1, 9));
    wait_idle();
    chk(logq.size() == 1 && logq[0].data == 8, "last write wins: original order kept");
    logq.delete();

    // ---- completion at target ----
    p = req(CMD_COMPL, 0, 32'h77);
    inq.push_back(p);
    wait_idle();
    chk(logq.size() == 1 && logq[0].alert == AL_CPL_AT_TGT, "completion at target gets alert 4");
    logq.delete();

    // ---- address outside the device ----
    begin
      int w0;
      w0 = n_writes;
      inq.push_back(req(CMD_WRITE, 1024, 32'h55));
      inq.push_back(req(CMD_READ, 1020, 0, 8, 3));
      wait_idle();
      chk(logq.size() == 2 && logq[0].alert == AL_ADDR && logq[1].alert == AL_ADDR,
          "write beyond the device and read burst running past its end get alert 2");
      chk(n_writes == w0, "out-of-range write not passed to memory");
      logq.delete();
    end

    // ---- clear request ----
    @(negedge clk);
    force ring_in = '{valid: 1'b0, cmd: CMD_RSV_COMPL, reserved: 1'b1, rsv_node: 4'd5,
                      alert: AL_NONE, default: '0};
    @(negedge clk);
    release ring_in;
    repeat (2 * L) @(posedge clk);
    chk(rsv_for_me() == 1, "stray reserved-for-completion slot circulates");
    inq.push_back(req(CMD_CLEAR, 0, 0));
    wait_idle();
    chk(rsv_for_me() == 0, "clear request releases it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
