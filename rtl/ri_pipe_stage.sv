// ri_pipe_stage: optional pipe stages on the link between two adjacent ring nodes.
//
// A chain of STAGES registers. Each stage holds one more ring slot, so the total number of
// data packets circulating on a ring is the sum over all links of (pipe stages + 1), the
// "+1" being the output register of the upstream node's outgoing port. More stages give
// more slots (more bandwidth to insert into) at the price of a longer trip around the ring.
// STAGES = 0 is a plain wire. Reset empties every stage (invalid, unreserved slots).
// The default of one stage between adjacent nodes is the setting the document uses
// throughout its experiments.
module ri_pipe_stage
  import ri_pkg::*;
#(
  parameter int STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t d,
  output pkt_t q
);
  generate
    if (STAGES == 0) begin : g_wire
      assign q = d;
    end else begin : g_regs
      pkt_t stage [STAGES];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < STAGES; i++) stage[i] <= PKT_IDLE;
        end else begin
          stage[0] <= d;
          for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
        end
      end
      assign q = stage[STAGES-1];
    end
  endgenerate
endmodule
