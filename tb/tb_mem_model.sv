// tb_mem_model: behavioural model of a vector memory attached to a target node.
//
// Accepts one request per cycle when idle. A write stores its word at addr mod WORDS. A
// read of N words makes the memory busy: it returns words addr, addr+1, ... one per cycle
// on the read-data channel and accepts no request until the last word has been taken.
// Contents start as INIT_BASE + address, so reads of unwritten words are predictable.
// Counts writes, reads and words returned for the testbench.
module tb_mem_model
  import ri_pkg::*;
#(
  parameter int WORDS = 1024,
  parameter logic [DATA_W-1:0] INIT_BASE = 32'h5000_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_data,
  input  logic [BS_W-1:0]   req_burst,
  output logic              cpl_valid,
  input  logic              cpl_ready,
  output logic [DATA_W-1:0] cpl_data,
  output int                n_writes,
  output int                n_reads
);
  logic [DATA_W-1:0] mem [WORDS];
  logic              busy;
  int                left;
  logic [ADDR_W-1:0] ptr;

  initial for (int i = 0; i < WORDS; i++) mem[i] = INIT_BASE + DATA_W'(i);

  assign req_ready = !busy;
  assign cpl_valid = busy;
  assign cpl_data  = mem[ptr % WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      left     <= 0;
      ptr      <= '0;
      n_writes <= 0;
      n_reads  <= 0;
    end else begin
      if (req_valid && req_ready) begin
        if (req_write) begin
          mem[req_addr % WORDS] <= req_data;
          n_writes <= n_writes + 1;
        end else begin
          busy    <= 1'b1;
          left    <= int'(req_burst);
          ptr     <= req_addr;
          n_reads <= n_reads + 1;
        end
      end
      if (cpl_valid && cpl_ready) begin
        ptr  <= ptr + 1'b1;
        left <= left - 1;
        if (left == 1) busy <= 1'b0;
      end
    end
  end
endmodule
