// ri_top: two-level single-channel ring interconnect of an image processing unit.
//
// Higher ring (always powered): supervisor S, initiators I0 and I1 (driven by the DMA), and
// the bridge. Lower ring (one image pipe): the bridge, initiators I2 (hardware accelerator),
// I3 and I4 (scalar processors) and targets T0 and T1 (vector memories).
//
//   higher ring:  S -> I0 -> I1 -> bridge(hi) -> S
//   lower ring:   bridge(lo) -> I4 -> T0 -> I3 -> T1 -> I2 -> bridge(lo)
//
// Every link carries PIPES pipe stages, so the higher ring holds 4*(PIPES+1) slots and the
// lower ring 6*(PIPES+1). After the supervisor's initialization packet has gone round,
// the IDs are S=0, I0=1, I1=2, bridge=3 (lower bound), I4=4, T0=5, I3=6, T1=7, I2=8, upper
// bound 9; they are reported on the *_id outputs.
// Devices are outside: each initiator has a request and a completion channel (index 0..4 =
// I0..I4), each target a request channel to its memory and a read-data channel back
// (index 0..1 = T0, T1), the supervisor an initialization request and an alert channel.
// Event outputs pulse for one cycle per occurrence, for performance counters.
// Defaults are the configuration that meets the IPU scenario with one channel: reorder
// buffers of 5, reservation budget unlimited (-1), reserve-again threshold 0, one pipe
// stage per link, maximum burst 8. The order of nodes on the lower ring is this design's
// choice (writes take short paths from bridge and scalar processors to their memories).
module ri_top
  import ri_pkg::*;
#(
  parameter int ROB_DEPTH = 5,
  parameter int IN_DEPTH  = 5,
  parameter int OUT_DEPTH = 2,
  parameter int RB        = -1,
  parameter int RAT       = 0,
  parameter int PIPES     = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // supervisor device
  input  logic              init_req,
  output logic              init_ack,
  output logic              init_done,
  output id_t               max_id,
  output logic              alert_valid,
  input  logic              alert_ready,
  output alert_e            alert_code,
  output cmd_e              alert_cmd,
  output id_t               alert_src,
  output id_t               alert_dst,
  output logic [ADDR_W-1:0] alert_addr,
  input  logic              sup_req_valid,
  output logic              sup_req_ready,
  input  logic              sup_req_write,
  input  id_t               sup_req_dst,
  input  logic [ADDR_W-1:0] sup_req_addr,
  input  logic [DATA_W-1:0] sup_req_data,
  input  logic [BS_W-1:0]   sup_req_burst,
  output logic              sup_cpl_valid,
  input  logic              sup_cpl_ready,
  output logic [DATA_W-1:0] sup_cpl_data,
  // initiator devices, index 0..4 = I0..I4
  input  logic [4:0]        ini_req_valid,
  output logic [4:0]        ini_req_ready,
  input  logic [4:0]        ini_req_write,
  input  id_t               ini_req_dst   [5],
  input  logic [ADDR_W-1:0] ini_req_addr  [5],
  input  logic [DATA_W-1:0] ini_req_data  [5],
  input  logic [BS_W-1:0]   ini_req_burst [5],
  output logic [4:0]        ini_cpl_valid,
  input  logic [4:0]        ini_cpl_ready,
  output logic [DATA_W-1:0] ini_cpl_data  [5],
  output id_t               ini_id        [5],
  // target devices, index 0..1 = T0, T1
  output logic [1:0]        tgt_req_valid,
  input  logic [1:0]        tgt_req_ready,
  output logic [1:0]        tgt_req_write,
  output logic [ADDR_W-1:0] tgt_req_addr  [2],
  output logic [DATA_W-1:0] tgt_req_data  [2],
  output logic [BS_W-1:0]   tgt_req_burst [2],
  input  logic [1:0]        tgt_cpl_valid,
  output logic [1:0]        tgt_cpl_ready,
  input  logic [DATA_W-1:0] tgt_cpl_data  [2],
  output id_t               tgt_id        [2],
  output id_t               bridge_lower,
  output id_t               bridge_upper,
  // events
  output logic [4:0]        ev_ini_insert,
  output logic [4:0]        ev_ini_stall,
  output logic [4:0]        ev_ini_reserve,
  output logic [4:0]        ev_ini_bounce,
  output logic [4:0]        ev_ini_alert,
  output logic [1:0]        ev_tgt_insert,
  output logic [1:0]        ev_tgt_bounce,
  output logic              ev_bridge_bounce,
  output logic              ev_cross_down,
  output logic              ev_cross_up,
  output logic              ev_booked_use
);
  // ---------------- node outputs and pipe outputs ----------------
  // higher ring positions: 0 = S, 1 = I0, 2 = I1, 3 = bridge
  pkt_t hi_node_out [4], hi_node_in [4];
  // lower ring positions: 0 = bridge, 1 = I4, 2 = T0, 3 = I3, 4 = T1, 5 = I2
  pkt_t lo_node_out [6], lo_node_in [6];

  generate
    for (genvar i = 0; i < 4; i++) begin : g_hi_pipe
      ri_pipe_stage #(.STAGES(PIPES)) u_pipe (
        .clk, .rst_n, .d(hi_node_out[i]), .q(hi_node_in[(i + 1) % 4])
      );
    end
    for (genvar i = 0; i < 6; i++) begin : g_lo_pipe
      ri_pipe_stage #(.STAGES(PIPES)) u_pipe (
        .clk, .rst_n, .d(lo_node_out[i]), .q(lo_node_in[(i + 1) % 6])
      );
    end
  endgenerate

  // ---------------- supervisor ----------------
  logic sup_ins_unused;
  logic sup_bounce_unused;
  ri_supervisor_node #(.IN_DEPTH(ROB_DEPTH), .OUT_DEPTH(OUT_DEPTH), .RB(RB), .RAT(RAT)) u_sup (
    .clk, .rst_n, .ring_in(hi_node_in[0]), .ring_out(hi_node_out[0]),
    .init_req, .init_ack, .init_done, .max_id,
    .alert_valid, .alert_ready, .alert_code, .alert_cmd, .alert_src, .alert_dst, .alert_addr,
    .req_valid(sup_req_valid), .req_ready(sup_req_ready), .req_write(sup_req_write),
    .req_dst(sup_req_dst), .req_addr(sup_req_addr), .req_data(sup_req_data),
    .req_burst(sup_req_burst), .cpl_valid(sup_cpl_valid), .cpl_ready(sup_cpl_ready),
    .cpl_data(sup_cpl_data),
    .ev_insert(sup_ins_unused), .ev_bounce(sup_bounce_unused)
  );

  // ---------------- initiators ----------------
  // ring attachment of I0..I4
  pkt_t ini_in  [5];
  pkt_t ini_out [5];
  assign ini_in[0] = hi_node_in[1];  assign hi_node_out[1] = ini_out[0];
  assign ini_in[1] = hi_node_in[2];  assign hi_node_out[2] = ini_out[1];
  assign ini_in[2] = lo_node_in[5];  assign lo_node_out[5] = ini_out[2];
  assign ini_in[3] = lo_node_in[3];  assign lo_node_out[3] = ini_out[3];
  assign ini_in[4] = lo_node_in[1];  assign lo_node_out[1] = ini_out[4];

  logic [4:0] ini_idv_unused;
  generate
    for (genvar i = 0; i < 5; i++) begin : g_ini
      ri_initiator_node #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .RB(RB), .RAT(RAT)) u_ini (
        .clk, .rst_n, .ring_in(ini_in[i]), .ring_out(ini_out[i]),
        .req_valid(ini_req_valid[i]), .req_ready(ini_req_ready[i]),
        .req_write(ini_req_write[i]), .req_dst(ini_req_dst[i]), .req_addr(ini_req_addr[i]),
        .req_data(ini_req_data[i]), .req_burst(ini_req_burst[i]),
        .cpl_valid(ini_cpl_valid[i]), .cpl_ready(ini_cpl_ready[i]), .cpl_data(ini_cpl_data[i]),
        .my_id(ini_id[i]), .id_valid(ini_idv_unused[i]),
        .ev_insert(ev_ini_insert[i]), .ev_stall(ev_ini_stall[i]),
        .ev_reserve(ev_ini_reserve[i]), .ev_bounce(ev_ini_bounce[i]), .ev_alert(ev_ini_alert[i])
      );
    end
  endgenerate

  // ---------------- targets ----------------
  pkt_t tgt_in  [2];
  pkt_t tgt_out [2];
  assign tgt_in[0] = lo_node_in[2];  assign lo_node_out[2] = tgt_out[0];
  assign tgt_in[1] = lo_node_in[4];  assign lo_node_out[4] = tgt_out[1];

  logic [1:0] tgt_idv_unused, tgt_stall_unused, tgt_rsv_unused;
  generate
    for (genvar i = 0; i < 2; i++) begin : g_tgt
      ri_target_node #(.IN_DEPTH(ROB_DEPTH), .OUT_DEPTH(OUT_DEPTH), .RB(RB), .RAT(RAT)) u_tgt (
        .clk, .rst_n, .ring_in(tgt_in[i]), .ring_out(tgt_out[i]),
        .dev_req_valid(tgt_req_valid[i]), .dev_req_ready(tgt_req_ready[i]),
        .dev_req_write(tgt_req_write[i]), .dev_req_addr(tgt_req_addr[i]),
        .dev_req_data(tgt_req_data[i]), .dev_req_burst(tgt_req_burst[i]),
        .dev_cpl_valid(tgt_cpl_valid[i]), .dev_cpl_ready(tgt_cpl_ready[i]),
        .dev_cpl_data(tgt_cpl_data[i]),
        .my_id(tgt_id[i]), .id_valid(tgt_idv_unused[i]),
        .ev_insert(ev_tgt_insert[i]), .ev_stall(tgt_stall_unused[i]),
        .ev_reserve(tgt_rsv_unused[i]), .ev_bounce(ev_tgt_bounce[i])
      );
    end
  endgenerate

  // ---------------- bridge ----------------
  logic bounds_valid_unused;
  ri_bridge #(.ROB_DEPTH(ROB_DEPTH), .RB(RB), .RAT(RAT)) u_bridge (
    .clk, .rst_n,
    .hi_in(hi_node_in[3]), .hi_out(hi_node_out[3]),
    .lo_in(lo_node_in[0]), .lo_out(lo_node_out[0]),
    .lower_bound(bridge_lower), .upper_bound(bridge_upper), .bounds_valid(bounds_valid_unused),
    .ev_bounce(ev_bridge_bounce), .ev_cross_down, .ev_cross_up, .ev_booked_use
  );
endmodule
