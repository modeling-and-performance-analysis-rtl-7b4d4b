// tb_ini_driver: traffic source and checker standing in for the device of one initiator.
//
// After start it writes N words to target DST at addresses BASE..BASE+N-1 (data
// DATA_TAG | (IDX << 16) | k), then reads them back in bursts of BURST words and checks
// every completion, in order, against the written value. If XDST is not zero it finally
// sends one write and one read to node XDST (used to provoke alerts). done rises when all
// completions have arrived. The completion channel is made not-ready now and then
// (every STALL_EVERY-th cycle, 0 = never) to exercise device back-pressure.
module tb_ini_driver
  import ri_pkg::*;
#(
  parameter int  IDX         = 0,
  parameter id_t DST         = '0,
  parameter int  N           = 16,
  parameter int  BURST       = 8,
  parameter int  BASE        = 0,
  parameter id_t XDST        = '0,
  parameter int  STALL_EVERY = 0
) (
  input  logic              clk,
  input  logic              start,
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_write,
  output id_t               req_dst,
  output logic [ADDR_W-1:0] req_addr,
  output logic [DATA_W-1:0] req_data,
  output logic [BS_W-1:0]   req_burst,
  input  logic              cpl_valid,
  output logic              cpl_ready,
  input  logic [DATA_W-1:0] cpl_data,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                rd_backpressure,
  output int                n_cpl
);
  localparam logic [DATA_W-1:0] DATA_TAG = 32'hA000_0000;

  function automatic logic [DATA_W-1:0] wdata(input int k);
    return DATA_TAG | DATA_W'(IDX << 16) | DATA_W'(k);
  endfunction

  int cyc;
  initial begin
    req_valid = 0; req_write = 0; req_dst = '0; req_addr = '0; req_data = '0; req_burst = '0;
    done = 0; checks = 0; failures = 0; rd_backpressure = 0; n_cpl = 0; cyc = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req_valid && !req_ready && !req_write) rd_backpressure <= rd_backpressure + 1;
  end
  assign cpl_ready = (STALL_EVERY == 0) || (cyc % STALL_EVERY != 0);

  // drive at the falling edge, wait there until ready, handshake at the next rising edge
  task automatic send(input logic wr, input id_t d, input int a, input logic [DATA_W-1:0] v,
                      input int b);
    @(negedge clk);
    req_valid = 1'b1;
    req_write = wr;
    req_dst   = d;
    req_addr  = ADDR_W'(a);
    req_data  = v;
    req_burst = BS_W'(b);
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
  endtask

  initial begin
    wait (start);
    @(posedge clk);
    for (int k = 0; k < N; k++) send(1'b1, DST, BASE + k, wdata(k), 1);
    for (int k = 0; k < N; k += BURST) send(1'b0, DST, BASE + k, '0, BURST);
    if (XDST != '0) begin
      send(1'b1, XDST, 0, 32'hDEAD_0000 | DATA_W'(IDX), 1);
      send(1'b0, XDST, 0, '0, 1);
    end
    @(negedge clk);
    req_valid = 1'b0;
  end

  // completions arrive in issue order (counted once the system is running)
  always @(posedge clk) begin
    if (start && cpl_valid && cpl_ready) begin
      checks <= checks + 1;
      if (cpl_data !== wdata(n_cpl)) begin
        failures <= failures + 1;
        $display("initiator %0d: completion %0d = %h, expected %h", IDX, n_cpl, cpl_data,
                 wdata(n_cpl));
      end
      n_cpl <= n_cpl + 1;
      if (n_cpl + 1 == N) done <= 1'b1;
    end
  end
endmodule
