// tb_lbra_node_full -- the LBRA node with every parameter at its default,
// taken through a complete run: a 4,000-instruction program checked by the
// slave, a signature fault, an address fault, a watchdog timeout, a remote
// rollback request with its acknowledgement, and an I/O lockstep phase with
// one reissued instruction. The environment and its checks are those of
// lbra_node_harness. At the default sizes a p-XACT can never fill the log
// (five p-XACTs of at most 50 memory instructions need at most 500 of the
// 1,024 words), so the log-full stall is not expected here; it is covered
// by tb_lbra_node.
module tb_lbra_node_full;
  int unsigned ck, fl;
  int unsigned cnt [20];
  logic done;
  int unsigned checks, failures;

  lbra_node_harness #(.FULL(1'b1), .SEED(3)) u_env (
    .done, .checks(ck), .failures(fl), .cnt);

  initial begin : watchdog
    #40_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck + 1, fl + 1);
    $finish;
  end

  initial begin
    wait (done === 1'b1);
    checks = ck;
    failures = fl;
    // commit, consolidate, sig/addr fault, watchdog, recovery, undo, lockstep
    foreach (cnt[k]) begin
      if (k == 0 || k == 5 || (k >= 8 && k <= 12) || k == 16 || k == 17) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
