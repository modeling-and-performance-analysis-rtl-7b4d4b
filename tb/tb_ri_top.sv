// tb_ri_top: end-to-end test of the two-level ring at its default configuration.
//
// Initializes the rings through the supervisor and checks the IDs every node takes. Then
// all five initiators run at once: each writes N words to its vector memory and reads them
// back in bursts of 8, checking every word and its order. I0 and I1 sit on the higher ring,
// so their traffic crosses the bridge both ways. Finally I3 writes and reads a node that
// does not exist and I4 writes and reads an initiator; the supervisor must report those
// alerts, and the supervisor writes four words to T1 and reads them back as one burst.
// The test counts how often each mechanism of the interconnect happened and fails
// if one never did: initialization, target and bridge bouncing, outgoing-port stalls and
// reservations, crossings, use of the booked bridge slot, completion-buffer or
// good-citizen back-pressure, clear requests and alert removal.
module tb_ri_top;
  import ri_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init_req, init_ack, init_done, alert_valid, alert_ready;
  id_t max_id, alert_src, alert_dst;
  alert_e alert_code;
  cmd_e alert_cmd;
  logic [ADDR_W-1:0] alert_addr;
  logic [4:0] ini_req_valid, ini_req_ready, ini_req_write, ini_cpl_valid, ini_cpl_ready;
  id_t ini_req_dst [5];
  logic [ADDR_W-1:0] ini_req_addr [5];
  logic [DATA_W-1:0] ini_req_data [5], ini_cpl_data [5];
  logic [BS_W-1:0] ini_req_burst [5];
  id_t ini_id [5], tgt_id [2], bridge_lower, bridge_upper;
  logic [1:0] tgt_req_valid, tgt_req_ready, tgt_req_write, tgt_cpl_valid, tgt_cpl_ready;
  logic [ADDR_W-1:0] tgt_req_addr [2];
  logic [DATA_W-1:0] tgt_req_data [2], tgt_cpl_data [2];
  logic [BS_W-1:0] tgt_req_burst [2];
  logic [4:0] ev_ini_insert, ev_ini_stall, ev_ini_reserve, ev_ini_bounce, ev_ini_alert;
  logic [1:0] ev_tgt_insert, ev_tgt_bounce;
  logic ev_bridge_bounce, ev_cross_down, ev_cross_up, ev_booked_use;
  logic sup_req_valid, sup_req_ready, sup_req_write, sup_cpl_valid, sup_cpl_ready;
  id_t sup_req_dst;
  logic [ADDR_W-1:0] sup_req_addr;
  logic [DATA_W-1:0] sup_req_data, sup_cpl_data;
  logic [BS_W-1:0] sup_req_burst;

  ri_top dut (.*);

  // memories
  int mw [2], mr [2];
  generate
    for (genvar t = 0; t < 2; t++) begin : g_mem
      tb_mem_model u_mem (
        .clk, .rst_n, .req_valid(tgt_req_valid[t]), .req_ready(tgt_req_ready[t]),
        .req_write(tgt_req_write[t]), .req_addr(tgt_req_addr[t]), .req_data(tgt_req_data[t]),
        .req_burst(tgt_req_burst[t]), .cpl_valid(tgt_cpl_valid[t]), .cpl_ready(tgt_cpl_ready[t]),
        .cpl_data(tgt_cpl_data[t]), .n_writes(mw[t]), .n_reads(mr[t])
      );
    end
  endgenerate

  // initiator devices: I0 -> T0 (5), I1 -> T1 (7), I2 -> T1, I3 -> T1, I4 -> T0
  logic start = 1'b0;
  logic [4:0] done;
  int chk [5], fail [5], rbp [5], ncpl [5];
  localparam id_t DSTS [5] = '{4'd5, 4'd7, 4'd7, 4'd7, 4'd5};
  localparam id_t XDST [5] = '{4'd0, 4'd0, 4'd0, 4'd12, 4'd1};
  generate
    for (genvar i = 0; i < 5; i++) begin : g_drv
      tb_ini_driver #(.IDX(i), .DST(DSTS[i]), .N(N), .BURST(8), .BASE(i * 128), .XDST(XDST[i]),
                      .STALL_EVERY(i == 2 ? 3 : 0)) u_drv (
        .clk, .start, .req_valid(ini_req_valid[i]), .req_ready(ini_req_ready[i]),
        .req_write(ini_req_write[i]), .req_dst(ini_req_dst[i]), .req_addr(ini_req_addr[i]),
        .req_data(ini_req_data[i]), .req_burst(ini_req_burst[i]),
        .cpl_valid(ini_cpl_valid[i]), .cpl_ready(ini_cpl_ready[i]), .cpl_data(ini_cpl_data[i]),
        .done(done[i]), .checks(chk[i]), .failures(fail[i]), .rd_backpressure(rbp[i]),
        .n_cpl(ncpl[i])
      );
    end
  endgenerate

  // event counters
  int c_stall, c_reserve, c_ini_bounce, c_tgt_bounce, c_br_bounce, c_down, c_up, c_booked;
  int c_alert_nodst, c_alert_ini, c_clear, c_ins, c_cycles, c_alert_all;
  always @(posedge clk) if (rst_n) begin
    c_cycles     <= c_cycles + 1;
    c_stall      <= c_stall + $countones(ev_ini_stall);
    c_reserve    <= c_reserve + $countones(ev_ini_reserve);
    c_ini_bounce <= c_ini_bounce + $countones(ev_ini_bounce);
    c_tgt_bounce <= c_tgt_bounce + $countones(ev_tgt_bounce);
    c_ins        <= c_ins + $countones(ev_ini_insert);
    c_br_bounce  <= c_br_bounce + int'(ev_bridge_bounce);
    c_down       <= c_down + int'(ev_cross_down);
    c_up         <= c_up + int'(ev_cross_up);
    c_booked     <= c_booked + int'(ev_booked_use);
    if (alert_valid && alert_ready) begin
      c_alert_all <= c_alert_all + 1;
      if (alert_code == AL_NO_DST) c_alert_nodst <= c_alert_nodst + 1;
      if (alert_code == AL_REQ_AT_INI) c_alert_ini <= c_alert_ini + 1;
      if (alert_cmd == CMD_READ) c_clear <= c_clear + 1;
    end
  end
  assign alert_ready = 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    #400000;
    $display("watchdog expired: done=%b ncpl=%0d,%0d,%0d,%0d,%0d mw=%0d,%0d mr=%0d,%0d down=%0d up=%0d brb=%0d", done,
             ncpl[0], ncpl[1], ncpl[2], ncpl[3], ncpl[4], mw[0], mw[1], mr[0], mr[1], c_down, c_up, c_br_bounce);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_init;
  initial begin
    {c_stall, c_reserve, c_ini_bounce, c_tgt_bounce, c_br_bounce, c_down, c_up, c_booked} = '0;
    {c_alert_nodst, c_alert_ini, c_clear, c_ins, c_cycles, c_alert_all} = '0;
    init_req = 1'b0;
    {sup_req_valid, sup_req_write, sup_req_dst, sup_req_addr, sup_req_data, sup_req_burst} = '0;
    sup_cpl_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    init_req <= 1'b1;
    @(posedge clk);
    while (!init_ack) @(posedge clk);
    init_req <= 1'b0;
    t_init = 0;
    while (!init_done && t_init < 200) begin @(posedge clk); t_init++; end
    check(init_done, "initialization packet returned");
    check(max_id == 4'd9, $sformatf("max id %0d", max_id));
    check(ini_id[0] == 1 && ini_id[1] == 2 && ini_id[4] == 4 && ini_id[3] == 6 && ini_id[2] == 8,
          "initiator IDs");
    check(tgt_id[0] == 5 && tgt_id[1] == 7, "target IDs");
    check(bridge_lower == 3 && bridge_upper == 9, "bridge bounds");
    // both rings hold 2 slots per link: one init round trip is 8 + 12 cycles of travel
    check(t_init <= 40, $sformatf("initialization took %0d cycles", t_init));

    start <= 1'b1;
    wait (&done);
    repeat (300) @(posedge clk);

    for (int i = 0; i < 5; i++) begin
      checks += chk[i];
      failures += fail[i];
      check(ncpl[i] == N, $sformatf("initiator %0d got %0d completions", i, ncpl[i]));
    end
    check(mw[0] == 2 * N && mw[1] == 3 * N, $sformatf("memory writes %0d %0d", mw[0], mw[1]));
    check(mr[0] == 2 * N / 8 && mr[1] == 3 * N / 8, $sformatf("memory reads %0d %0d", mr[0], mr[1]));
    $display("cycles=%0d inserts=%0d stalls=%0d reserves=%0d tgt_bounce=%0d ini_bounce=%0d br_bounce=%0d down=%0d up=%0d booked=%0d nodst=%0d ini_alert=%0d clear=%0d rbp=%0d,%0d,%0d,%0d,%0d",
             c_cycles, c_ins, c_stall, c_reserve, c_tgt_bounce, c_ini_bounce, c_br_bounce, c_down, c_up,
             c_booked, c_alert_nodst, c_alert_ini, c_clear, rbp[0], rbp[1], rbp[2], rbp[3], rbp[4]);
    check(c_stall > 0, "outgoing port stall happened");
    check(c_reserve > 0, "slot reservation happened");
    check(c_tgt_bounce > 0, "target bounce happened");
    check(c_br_bounce > 0, "bridge bounce happened");
    check(c_down > 0 && c_up > 0, "bridge crossings happened");
    check(c_booked > 0, "booked bridge slot used");
    // write and read to the absent node, plus the clear request sent for that read
    check(c_alert_nodst == 3, "absent-destination packets removed and reported");
    check(c_alert_ini == 2, "requests to an initiator alerted and reported");
    check(c_clear == 2, "clear requests issued for alerted reads");
    check(rbp[0] + rbp[1] + rbp[2] + rbp[3] + rbp[4] > 0, "read back-pressure happened");

    // the supervisor's own traffic: four writes to T1 across the bridge, then one burst read
    begin
      int al0, got, to;
      logic [DATA_W-1:0] exp;
      al0 = c_alert_all;
      for (int k = 0; k < 4; k++) begin
        sup_req_valid <= 1'b1; sup_req_write <= 1'b1; sup_req_dst <= 4'd7;
        sup_req_addr <= ADDR_W'(900 + k); sup_req_data <= 32'h5A00_0000 + DATA_W'(k);
        sup_req_burst <= BS_W'(1);
        @(posedge clk);
        while (!sup_req_ready) @(posedge clk);
      end
      sup_req_valid <= 1'b0;
      repeat (60) @(posedge clk);
      sup_req_valid <= 1'b1; sup_req_write <= 1'b0; sup_req_addr <= ADDR_W'(900);
      sup_req_burst <= BS_W'(4);
      @(posedge clk);
      while (!sup_req_ready) @(posedge clk);
      sup_req_valid <= 1'b0;
      got = 0;
      to = 0;
      while (got < 4 && to < 400) begin
        @(posedge clk);
        to++;
        if (sup_cpl_valid && sup_cpl_ready) begin
          exp = 32'h5A00_0000 + DATA_W'(got);
          check(sup_cpl_data == exp, $sformatf("supervisor read word %0d = %h", got, sup_cpl_data));
          got++;
        end
      end
      check(got == 4, $sformatf("supervisor got %0d of 4 read words", got));
      repeat (60) @(posedge clk);
      check(c_alert_all == al0 && !sup_cpl_valid, "supervisor traffic raised no alerts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
