// tb_lbra_node_configs -- the LBRA node at the other sizes the evaluation
// varies, each run through the full end-to-end scenario of
// lbra_node_harness (program, injected faults, remote rollback, lockstep):
//   a) 25-instruction p-XACTs (the smallest base size evaluated),
//   b) 100-instruction p-XACTs (log sized for five of them),
//   c) four in-flight p-XACTs instead of five,
//   d) 64-bit read/write signatures (the smallest evaluated, where false
//      positives turn into extra dependences and forced commits).
// Every configuration must pass its own checks and must have consolidated,
// recovered and gone through lockstep.
module tb_lbra_node_configs;
  localparam int NC = 4;
  int unsigned ck [NC], fl [NC];
  int unsigned cnt [NC][20];
  logic [NC-1:0] done;
  int unsigned checks, failures;

  lbra_node_harness #(.FULL(1'b0), .PXACT_H(25), .LOG_WORDS_H(1024), .WDT_H(20000), .SEED(11))
    u_a (.done(done[0]), .checks(ck[0]), .failures(fl[0]), .cnt(cnt[0]));
  lbra_node_harness #(.FULL(1'b0), .PXACT_H(100), .LOG_WORDS_H(1024), .WDT_H(20000), .SEED(12))
    u_b (.done(done[1]), .checks(ck[1]), .failures(fl[1]), .cnt(cnt[1]));
  lbra_node_harness #(.FULL(1'b0), .NPX_H(4), .LOG_WORDS_H(1024), .WDT_H(20000), .SEED(13))
    u_c (.done(done[2]), .checks(ck[2]), .failures(fl[2]), .cnt(cnt[2]));
  lbra_node_harness #(.FULL(1'b0), .SIG_H(64), .LOG_WORDS_H(1024), .WDT_H(20000), .SEED(14))
    u_d (.done(done[3]), .checks(ck[3]), .failures(fl[3]), .cnt(cnt[3]));

  initial begin : watchdog
    #40_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    wait (done === '1);
    checks = 0;
    failures = 0;
    for (int c = 0; c < NC; c++) begin
      checks += ck[c];
      failures += fl[c];
      // commit, consolidate, signature fault, recovery, lockstep
      foreach (cnt[c][k]) begin
        if (k == 0 || k == 5 || k == 8 || k == 11 || k == 17) begin
          checks++;
          if (cnt[c][k] == 0) begin
            failures++;
            $display("FAIL config %0d: mechanism %0d never happened", c, k);
          end
        end
      end
      $display("config %0d: commits=%0d forced=%0d ctx-stall=%0d recoveries=%0d",
               c, cnt[c][0], cnt[c][1], cnt[c][2], cnt[c][11]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
