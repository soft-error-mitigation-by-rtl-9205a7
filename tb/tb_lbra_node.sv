// tb_lbra_node -- end-to-end test of the LBRA node.
//
// Two environments run side by side: one around a node with every default
// parameter (five contexts, 50-instruction p-XACTs, 4 KB log, 2048-bit
// signatures, 100,000-cycle watchdog), one around a node with a 128-word
// log and a 2,000-cycle watchdog so that the log-full stall also occurs.
// Each runs a 4,000-instruction program with injected faults, a remote
// rollback request and a final I/O lockstep phase, and checks the results
// (see lbra_node_harness). This testbench adds up how often each mechanism
// happened in the two and counts a failure for every mechanism that never
// happened.
module tb_lbra_node;
  int unsigned ck [2], fl [2];
  int unsigned cnt_a [20], cnt_b [20];
  logic done_a, done_b;
  int unsigned checks, failures;
  string names [20] = '{"commit", "forced_commit", "stall_ctx", "stall_log", "log_wrap",
                        "consolidate", "dep_wait", "lookup", "sig_fault", "addr_fault",
                        "wdt_timeout", "recovery", "local_undo", "rb_sent", "prefetch",
                        "stale_flush", "ls_reissue", "lockstep", "fwd_hit", "rb_out"};

  lbra_node_harness #(.FULL(1'b1), .SEED(1)) u_full (
    .done(done_a), .checks(ck[0]), .failures(fl[0]), .cnt(cnt_a));
  lbra_node_harness #(.FULL(1'b0), .LOG_WORDS_H(128), .WDT_H(2000), .SEED(2)) u_small (
    .done(done_b), .checks(ck[1]), .failures(fl[1]), .cnt(cnt_b));

  initial begin : watchdog
    #40_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + 1, fl[0] + fl[1] + 1);
    $finish;
  end

  initial begin
    wait (done_a === 1'b1 && done_b === 1'b1);
    checks = ck[0] + ck[1];
    failures = fl[0] + fl[1];
    for (int k = 0; k < 20; k++) begin
      // stale_flush depends on timing only; it is reported, not required
      if (k != 15) begin
        checks++;
        if (cnt_a[k] + cnt_b[k] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[k]);
        end
      end
      $display("%-14s full=%0d small=%0d", names[k], cnt_a[k], cnt_b[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
