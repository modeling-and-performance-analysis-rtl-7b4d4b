// tb_ri_pipe_stage: a packet stream through 0, 1 and 3 pipe stages must come out
// unchanged and exactly STAGES cycles later; reset must leave idle (invalid) slots.
module tb_ri_pipe_stage;
  import ri_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pkt_t d, q0, q1, q3;
  ri_pipe_stage #(.STAGES(0)) u0 (.clk, .rst_n, .d, .q(q0));
  ri_pipe_stage #(.STAGES(1)) u1 (.clk, .rst_n, .d, .q(q1));
  ri_pipe_stage #(.STAGES(3)) u3 (.clk, .rst_n, .d, .q(q3));

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] hist [$];
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    d = PKT_IDLE;
    d.valid = 1; d.data = 32'h1234;
    repeat (2) @(negedge clk);
    chk(!q1.valid && !q3.valid, "reset empties the stages");
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      d = PKT_IDLE;
      d.valid = 1'b1;
      d.data  = DATA_W'(i * 7 + 1);
      hist.push_front(d.data);
      #1;
      chk(q0 == d, "zero stages is a wire");
      if (i >= 1) chk(q1.valid && q1.data == hist[1], $sformatf("1 stage at %0d", i));
      if (i >= 3) chk(q3.valid && q3.data == hist[3], $sformatf("3 stages at %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
