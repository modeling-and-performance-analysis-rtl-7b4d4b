// tb_ri_ring_mist: three initiators sharing one target on a single ring (tb_mist_ring), run
// side by side in four configurations of the reservation mechanism and read burst size:
//   A: reservation budget unlimited, reserve-again threshold 0, bursts of 8 (fair setting)
//   B: budget 1, threshold 2, bursts of 8 (restricted reservation)
//   C: fair setting, bursts of 1 (single-word reads)
//   D: fair setting, no pipe stages (smallest ring: 5 slots)
// Each run must initialize correctly, move every word intact and in order, and finish.
// The test also requires that in A the initiators stalled and reserved slots, that the
// shared target bounced requests in at least one run (with a 5-entry buffer and a memory
// taking one write per cycle that happens once reads keep the memory busy), and that B
// reserved fewer slots than A. Cycle counts and per-initiator finish times are printed for comparison.
module tb_ri_ring_mist;
  import ri_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  always #5 clk = ~clk;

  logic ok [4], dn [4];
  int ck [4], fl [4], cy [4], st [4], rs [4], tb [4], mw [4], mr [4];
  int fc [4][3];

  tb_mist_ring #(.RB(-1), .RAT(0), .N(N), .BURST(8)) u_a (
    .clk, .rst_n, .go, .init_ok(ok[0]), .done(dn[0]), .checks(ck[0]), .failures(fl[0]),
    .cycles(cy[0]), .stalls(st[0]), .reserves(rs[0]), .tgt_bounces(tb[0]),
    .mem_writes(mw[0]), .mem_reads(mr[0]), .finish_cycle(fc[0]));
  tb_mist_ring #(.RB(1), .RAT(2), .N(N), .BURST(8)) u_b (
    .clk, .rst_n, .go, .init_ok(ok[1]), .done(dn[1]), .checks(ck[1]), .failures(fl[1]),
    .cycles(cy[1]), .stalls(st[1]), .reserves(rs[1]), .tgt_bounces(tb[1]),
    .mem_writes(mw[1]), .mem_reads(mr[1]), .finish_cycle(fc[1]));
  tb_mist_ring #(.RB(-1), .RAT(0), .N(N), .BURST(1)) u_c (
    .clk, .rst_n, .go, .init_ok(ok[2]), .done(dn[2]), .checks(ck[2]), .failures(fl[2]),
    .cycles(cy[2]), .stalls(st[2]), .reserves(rs[2]), .tgt_bounces(tb[2]),
    .mem_writes(mw[2]), .mem_reads(mr[2]), .finish_cycle(fc[2]));
  tb_mist_ring #(.RB(-1), .RAT(0), .N(N), .BURST(8), .PIPES(0)) u_d (
    .clk, .rst_n, .go, .init_ok(ok[3]), .done(dn[3]), .checks(ck[3]), .failures(fl[3]),
    .cycles(cy[3]), .stalls(st[3]), .reserves(rs[3]), .tgt_bounces(tb[3]),
    .mem_writes(mw[3]), .mem_reads(mr[3]), .finish_cycle(fc[3]));

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired: done %0d %0d %0d %0d", dn[0], dn[1], dn[2], dn[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  localparam string NAME [4] = '{"A fair, burst 8", "B RB=1 RAT=2", "C fair, burst 1", "D no pipes"};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(posedge clk);
    for (int r = 0; r < 4; r++) chk(ok[r], $sformatf("%s: initialization", NAME[r]));
    go = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    repeat (5) @(posedge clk);
    for (int r = 0; r < 4; r++) begin
      $display("%s: %0d cycles, finish I0/I1/I2 %0d/%0d/%0d, stalls %0d, reservations %0d, target bounces %0d",
               NAME[r], cy[r], fc[r][0], fc[r][1], fc[r][2], st[r], rs[r], tb[r]);
      checks += ck[r];
      failures += fl[r];
      chk(mw[r] == 3 * N, $sformatf("%s: memory writes %0d", NAME[r], mw[r]));
      chk(mr[r] == 3 * N / (r == 2 ? 1 : 8), $sformatf("%s: memory reads %0d", NAME[r], mr[r]));
    end
    chk(st[0] > 0, "A: initiators stalled");
    chk(rs[0] > 0, "A: initiators reserved slots");
    chk(tb[0] + tb[1] + tb[2] + tb[3] > 0, "target bounced requests in some run");
    chk(rs[1] < rs[0], "B: fewer reservations with a budget of one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
