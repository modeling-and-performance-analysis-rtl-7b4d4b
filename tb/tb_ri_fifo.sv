// tb_ri_fifo: random push/pop traffic against a queue model; checks the head packet,
// empty, full and count every cycle, including simultaneous push and pop when full.
module tb_ri_fifo;
  import ri_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  pkt_t push_pkt, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  ri_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [DATA_W-1:0] q [$];
  int n_full_pushpop = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  initial begin
    push = 0; pop = 0; push_pkt = PKT_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(head.data == q[0], $sformatf("head %h exp %h", head.data, q[0]));
      push = ($urandom % 3) != 0;
      pop  = ($urandom % 2) != 0;
      if (q.size() == DEPTH && !pop) push = 0;
      push_pkt = PKT_IDLE;
      push_pkt.valid = 1;
      push_pkt.data = $urandom;
      if (push && pop && q.size() == DEPTH) n_full_pushpop++;
      @(posedge clk);
      #1;
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(push_pkt.data);
    end
    chk(n_full_pushpop > 0, "push and pop while full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
