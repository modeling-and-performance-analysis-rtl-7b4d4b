// tb_mist_ring: a single ring with three initiators sharing one target, as used for the
// parameter studies of the interconnect, with its devices and a self-checking run.
//
//   S(0) -> I0(1) -> I1(2) -> I2(3) -> T0(4) -> S     (PIPES pipe stages on every link)
//
// After reset it initializes the ring through the supervisor and checks the IDs; then, once
// go is high, every initiator writes N words to the shared memory and reads them back in
// bursts of BURST words (tb_ini_driver checks each word and its order). done rises when all
// three have their data; the counters report the cycles taken and how often the ring
// mechanisms (stalls, reservations, target bounces) happened. RB and RAT set the
// reservation budget and reserve-again threshold of every node.
module tb_mist_ring
  import ri_pkg::*;
#(
  parameter int RB    = -1,
  parameter int RAT   = 0,
  parameter int N     = 32,
  parameter int BURST = 8,
  parameter int PIPES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic init_ok,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   stalls,
  output int   reserves,
  output int   tgt_bounces,
  output int   mem_writes,
  output int   mem_reads,
  output int   finish_cycle [3]
);
  pkt_t node_out [5], node_in [5];
  for (genvar k = 0; k < 5; k++) begin : g_link
    ri_pipe_stage #(.STAGES(PIPES)) u_pipe (.clk, .rst_n, .d(node_out[k]), .q(node_in[(k + 1) % 5]));
  end

  // supervisor
  logic init_req = 1'b0, init_ack, init_done, alert_valid;
  id_t max_id, a_src, a_dst;
  alert_e a_code;
  cmd_e a_cmd;
  logic [ADDR_W-1:0] a_addr;
  logic s_ins, s_bnc;
  ri_supervisor_node #(.RB(RB), .RAT(RAT)) u_sup (
    .clk, .rst_n, .ring_in(node_in[0]), .ring_out(node_out[0]), .init_req, .init_ack,
    .init_done, .max_id, .alert_valid, .alert_ready(1'b1), .alert_code(a_code),
    .alert_cmd(a_cmd), .alert_src(a_src), .alert_dst(a_dst), .alert_addr(a_addr),
    .req_valid(1'b0), .req_ready(), .req_write(1'b0), .req_dst('0), .req_addr('0),
    .req_data('0), .req_burst('0), .cpl_valid(), .cpl_ready(1'b1), .cpl_data(),
    .ev_insert(s_ins), .ev_bounce(s_bnc));

  // initiators and their devices
  logic start = 1'b0;
  logic [2:0] drv_done, ev_stall, ev_rsv;
  int chk [3], fail [3], rbp [3], ncpl [3];
  id_t ini_id [3];
  for (genvar i = 0; i < 3; i++) begin : g_ini
    logic rv, rr, rw, cv, cr, idv, e_ins, e_bnc, e_al;
    id_t rd;
    logic [ADDR_W-1:0] ra;
    logic [DATA_W-1:0] rdat, cd;
    logic [BS_W-1:0] rb;
    ri_initiator_node #(.RB(RB), .RAT(RAT)) u_ini (
      .clk, .rst_n, .ring_in(node_in[i + 1]), .ring_out(node_out[i + 1]),
      .req_valid(rv), .req_ready(rr), .req_write(rw), .req_dst(rd), .req_addr(ra),
      .req_data(rdat), .req_burst(rb), .cpl_valid(cv), .cpl_ready(cr), .cpl_data(cd),
      .my_id(ini_id[i]), .id_valid(idv), .ev_insert(e_ins), .ev_stall(ev_stall[i]),
      .ev_reserve(ev_rsv[i]), .ev_bounce(e_bnc), .ev_alert(e_al));
    tb_ini_driver #(.IDX(i), .DST(4'd4), .N(N), .BURST(BURST), .BASE(i * 256)) u_drv (
      .clk, .start, .req_valid(rv), .req_ready(rr), .req_write(rw), .req_dst(rd),
      .req_addr(ra), .req_data(rdat), .req_burst(rb), .cpl_valid(cv), .cpl_ready(cr),
      .cpl_data(cd), .done(drv_done[i]), .checks(chk[i]), .failures(fail[i]),
      .rd_backpressure(rbp[i]), .n_cpl(ncpl[i]));
  end

  // target and its memory
  logic mv, mr, mw, mcv, mcr, t_idv, t_ins, t_stl, t_rsv, t_bnc;
  logic [ADDR_W-1:0] ma;
  logic [DATA_W-1:0] md, mcd;
  logic [BS_W-1:0] mb;
  id_t t_id;
  ri_target_node #(.RB(RB), .RAT(RAT)) u_tgt (
    .clk, .rst_n, .ring_in(node_in[4]), .ring_out(node_out[4]),
    .dev_req_valid(mv), .dev_req_ready(mr), .dev_req_write(mw), .dev_req_addr(ma),
    .dev_req_data(md), .dev_req_burst(mb), .dev_cpl_valid(mcv), .dev_cpl_ready(mcr),
    .dev_cpl_data(mcd), .my_id(t_id), .id_valid(t_idv), .ev_insert(t_ins),
    .ev_stall(t_stl), .ev_reserve(t_rsv), .ev_bounce(t_bnc));
  tb_mem_model #(.WORDS(1024)) u_mem (
    .clk, .rst_n, .req_valid(mv), .req_ready(mr), .req_write(mw), .req_addr(ma),
    .req_data(md), .req_burst(mb), .cpl_valid(mcv), .cpl_ready(mcr), .cpl_data(mcd),
    .n_writes(mem_writes), .n_reads(mem_reads));

  // counters
  initial begin
    cycles = 0; stalls = 0; reserves = 0; tgt_bounces = 0;
    for (int i = 0; i < 3; i++) finish_cycle[i] = 0;
  end
  always @(posedge clk) if (start && !done) begin
    cycles      <= cycles + 1;
    stalls      <= stalls + $countones(ev_stall);
    reserves    <= reserves + $countones(ev_rsv);
    tgt_bounces <= tgt_bounces + int'(t_bnc);
  end
  always @(posedge clk) if (start)
    for (int i = 0; i < 3; i++) if (drv_done[i] && finish_cycle[i] == 0) finish_cycle[i] <= cycles;

  assign done     = &drv_done;
  assign checks   = chk[0] + chk[1] + chk[2] + 1;
  assign failures = fail[0] + fail[1] + fail[2] + int'(init_done && !init_ok);

  // initialization, then traffic when go rises
  initial begin
    init_ok = 1'b0;
    @(posedge clk iff rst_n);
    init_req <= 1'b1;
    @(posedge clk iff init_ack);
    init_req <= 1'b0;
    @(posedge clk iff init_done);
    init_ok = (max_id == 4'd4) && (ini_id[0] == 1) && (ini_id[1] == 2) && (ini_id[2] == 3) &&
              (t_id == 4'd4);
    @(posedge clk iff go);
    start = 1'b1;
  end
endmodule
