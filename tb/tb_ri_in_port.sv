// tb_ri_in_port: directed tests of the three kinds of incoming port.
//  initiator: takes its ID from the initialization packet (data + 1, passed on
//    incremented); absorbs completions and frees the slot; with a full FIFO passes the
//    completion unchanged (bounce without re-ordering); marks reads/writes for itself with
//    alert 5; returns a completion slot reserved for its sender to the
//    reserved-for-completion type.
//  target: absorbs reads (slot becomes reserved-for-completion) and writes, bounces with a
//    ticket once its buffer is full and takes the bounced packet back in order; marks a
//    completion with alert 4; leaves packets for other nodes and alerted packets alone.
//  supervisor: removes the returning initialization packet and records the highest ID;
//    removes alerted packets and packets for absent IDs, clearing the alert in the slot.
module tb_ri_in_port;
  import ri_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t in_i, out_i, hd_i, in_t, out_t, hd_t, in_s, out_s, hd_s;
  id_t id_i, id_t_, id_s, mx_i, mx_t, mx_s;
  logic idv_i, idv_t, idv_s, dn_i, dn_t, dn_s;
  logic hv_i, hv_t, hv_s, pop_i = 0, pop_t = 0, pop_s = 0;
  logic ab_i, bo_i, ab_t, bo_t, ab_s, bo_s;

  ri_in_port #(.KIND(PORT_INITIATOR), .DEPTH(2)) u_i (
    .clk, .rst_n, .slot_in(in_i), .slot_out(out_i), .my_id(id_i), .id_valid(idv_i),
    .max_id(mx_i), .init_done(dn_i), .head_valid(hv_i), .head(hd_i), .pop(pop_i),
    .ev_absorb(ab_i), .ev_bounce(bo_i));
  ri_in_port #(.KIND(PORT_TARGET), .DEPTH(2)) u_t (
    .clk, .rst_n, .slot_in(in_t), .slot_out(out_t), .my_id(id_t_), .id_valid(idv_t),
    .max_id(mx_t), .init_done(dn_t), .head_valid(hv_t), .head(hd_t), .pop(pop_t),
    .ev_absorb(ab_t), .ev_bounce(bo_t));
  ri_in_port #(.KIND(PORT_SUPERVISOR), .DEPTH(2)) u_s (
    .clk, .rst_n, .slot_in(in_s), .slot_out(out_s), .my_id(id_s), .id_valid(idv_s),
    .max_id(mx_s), .init_done(dn_s), .head_valid(hv_s), .head(hd_s), .pop(pop_s),
    .ev_absorb(ab_s), .ev_bounce(bo_s));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic pkt_t mk(input cmd_e c, input int src, input int dst, input int data = 0);
    pkt_t p = PKT_IDLE;
    p.valid = 1'b1; p.cmd = c; p.src = id_t'(src); p.dst = id_t'(dst); p.data = DATA_W'(data);
    return p;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // apply one slot to each port for one cycle and sample the forwarded slot
  task automatic step(input pkt_t pi, input pkt_t pt, input pkt_t ps);
    @(negedge clk);
    in_i = pi; in_t = pt; in_s = ps;
    #1;
  endtask

  pkt_t p, r;
  logic [ORD_W-1:0] tk;
  initial begin
    in_i = PKT_IDLE; in_t = PKT_IDLE; in_s = PKT_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- initialization ----
    step(mk(CMD_INIT, 0, 0, 2), mk(CMD_INIT, 0, 0, 4), mk(CMD_INIT, 0, 0, 9));
    chk(out_i.valid && out_i.data == 3, "initiator passes init incremented");
    chk(out_t.valid && out_t.data == 5, "target passes init incremented");
    chk(!out_s.valid, "supervisor removes init");
    step(PKT_IDLE, PKT_IDLE, PKT_IDLE);
    chk(idv_i && id_i == 3 && idv_t && id_t_ == 5, "IDs taken");
    chk(dn_s && mx_s == 9 && id_s == 0, "supervisor max id");

    // ---- initiator ----
    p = mk(CMD_COMPL, 5, 3, 32'hC1);
    step(p, PKT_IDLE, PKT_IDLE);
    chk(!out_i.valid && ab_i, "completion absorbed");
    p = mk(CMD_COMPL, 5, 3, 32'hC2); p.reserved = 1; p.rsv_node = 5;
    step(p, PKT_IDLE, PKT_IDLE);
    chk(!out_i.valid && out_i.cmd == CMD_RSV_COMPL && out_i.reserved && out_i.rsv_node == 5,
        "sender's completion slot returns to reserved-for-completion");
    p = mk(CMD_COMPL, 5, 3, 32'hC3);
    step(p, PKT_IDLE, PKT_IDLE);
    chk(out_i == p && bo_i, "full FIFO: completion passes unchanged");
    chk(hv_i && hd_i.data == 32'hC1, "FIFO head is first completion");
    p = mk(CMD_WRITE, 1, 3);
    step(p, PKT_IDLE, PKT_IDLE);
    chk(out_i.valid && out_i.alert == AL_REQ_AT_INI, "write to initiator alerted");
    p = mk(CMD_COMPL, 5, 7);
    step(p, PKT_IDLE, PKT_IDLE);
    chk(out_i == p, "packet for another node untouched");
    @(negedge clk); pop_i = 1; in_i = PKT_IDLE;
    @(negedge clk); pop_i = 0;
    #1 chk(hv_i && hd_i.data == 32'hC2, "FIFO order");

    // ---- target ----
    p = mk(CMD_READ, 3, 5); p.reserved = 1; p.rsv_node = 5; p.burst_size = 4;
    step(PKT_IDLE, p, PKT_IDLE);
    chk(!out_t.valid && out_t.cmd == CMD_RSV_COMPL && out_t.reserved && out_t.rsv_node == 5,
        "read absorbed, slot reserved for completion");
    p = mk(CMD_WRITE, 3, 5, 32'hA1);
    step(PKT_IDLE, p, PKT_IDLE);
    chk(!out_t.valid && ab_t, "write absorbed");
    p = mk(CMD_WRITE, 3, 5, 32'hA2);
    step(PKT_IDLE, p, PKT_IDLE);
    chk(out_t.valid && out_t.ord_valid && bo_t, "full ROB bounces with ticket");
    tk = out_t.ord_id;
    r = out_t;
    p = mk(CMD_WRITE, 3, 5, 32'hA3);
    step(PKT_IDLE, p, PKT_IDLE);
    chk(out_t.ord_valid && out_t.ord_id == tk + 1, "next packet gets next ticket");
    p = mk(CMD_COMPL, 7, 5);
    step(PKT_IDLE, p, PKT_IDLE);
    chk(out_t.valid && out_t.alert == AL_CPL_AT_TGT, "completion at target alerted");
    chk(hv_t && hd_t.cmd == CMD_READ && hd_t.burst_size == 4, "ROB head is the read");
    @(negedge clk); pop_t = 1; in_t = PKT_IDLE;
    @(negedge clk); pop_t = 0;
    step(PKT_IDLE, r, PKT_IDLE);
    chk(!out_t.valid && ab_t, "bounced packet re-enters with its ticket");
    @(negedge clk); pop_t = 1; in_t = PKT_IDLE;
    #1 chk(hd_t.data == 32'hA1, "order after re-entry (1)");
    @(negedge clk); pop_t = 0;
    #1 chk(hv_t && hd_t.data == 32'hA2, "order after re-entry (2)");
    p = mk(CMD_WRITE, 3, 5); p.alert = AL_NO_DST;
    step(PKT_IDLE, p, PKT_IDLE);
    chk(out_t == p, "alerted packet left for the supervisor");

    // ---- supervisor ----
    p = mk(CMD_WRITE, 3, 5); p.alert = AL_REQ_AT_INI;
    step(PKT_IDLE, PKT_IDLE, p);
    chk(!out_s.valid && out_s.alert == AL_NONE && ab_s, "alert removed");
    p = mk(CMD_READ, 3, 12);
    step(PKT_IDLE, PKT_IDLE, p);
    chk(!out_s.valid && ab_s, "packet for absent ID removed");
    p = mk(CMD_WRITE, 3, 6);
    step(PKT_IDLE, PKT_IDLE, p);
    chk(out_s == p, "normal packet passes the supervisor");
    chk(hv_s && hd_s.alert == AL_REQ_AT_INI, "first report");
    @(negedge clk); pop_s = 1; in_s = PKT_IDLE;
    @(negedge clk); pop_s = 0;
    #1 chk(hv_s && hd_s.alert == AL_NO_DST && hd_s.dst == 12, "second report");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
