// tb_ri_rob: reorder buffer against a reference model.
// Each cycle the bench offers either a new packet or one that bounced earlier (carrying its
// ticket), and pops the head at random. New packets are numbered in the order they are
// first offered; the model predicts accept/bounce from the ticket distance and the bench
// checks that packets leave in exactly first-offered order, that the ticket of a bounce is
// the sequence number, and that both bouncing and re-entry happen. Outstanding tickets
// are kept below 40, as the number of packets on a ring bounds them in the design.
module tb_ri_rob;
  import ri_pkg::*;
  localparam int SIZE = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic offer, accept, head_valid, pop;
  pkt_t offer_pkt, head;
  logic [ORD_W-1:0] ticket;
  ri_rob #(.SIZE(SIZE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  int next_new = 0, next_out = 0, head_seq = 0, n_bounce = 0, n_reentry = 0;
  int circ [$];  // sequence numbers of bounced packets still on the ring
  bit stored [int];
  int seq_o;

  initial begin
    offer = 0; pop = 0; offer_pkt = PKT_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (next_out < 600) begin
      @(negedge clk);
      offer = 1'b0;
      offer_pkt = PKT_IDLE;
      seq_o = -1;
      if (circ.size() > 0 && ($urandom % 2)) begin
        int k;
        k = $urandom % circ.size();
        seq_o = circ[k];
        circ.delete(k);
        offer = 1'b1;
        offer_pkt.valid = 1'b1;
        offer_pkt.ord_valid = 1'b1;
        offer_pkt.ord_id = ORD_W'(seq_o);
        offer_pkt.data = DATA_W'(seq_o);
        n_reentry++;
      end else if (next_new < 600 && next_new - head_seq < 40 && ($urandom % 3) != 0) begin
        seq_o = next_new++;
        offer = 1'b1;
        offer_pkt.valid = 1'b1;
        offer_pkt.data = DATA_W'(seq_o);
      end
      pop = ($urandom % 3) == 0;
      #1;
      chk(head_valid == stored.exists(head_seq), "head valid");
      if (offer) begin
        chk(accept == ((seq_o - head_seq) < SIZE), $sformatf("accept of %0d (head %0d)", seq_o, head_seq));
        if (!accept) begin
          chk(ticket == ORD_W'(seq_o), "ticket equals first-seen number");
          circ.push_back(seq_o);
          n_bounce++;
        end else stored[seq_o] = 1;
      end
      if (head_valid && pop) begin
        chk(head.data == DATA_W'(next_out), $sformatf("order: got %0d exp %0d", head.data, next_out));
        chk(!head.ord_valid, "stored copy has no ticket flag");
        stored.delete(head_seq);
        head_seq++;
        next_out++;
      end
      @(posedge clk);
    end
    chk(n_bounce > 20 && n_reentry > 20, $sformatf("bounces %0d re-entries %0d", n_bounce, n_reentry));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
