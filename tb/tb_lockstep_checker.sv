// tb_lockstep_checker -- self-checking test of the I/O lockstep mode.
// Checks the NORMAL -> DRAIN -> LOCKSTEP -> NORMAL sequence: drain is held
// until every p-XACT is consolidated, lockstep compares paired results
// (commit on match, reissue on mismatch), and io_done returns to normal.
module tb_lockstep_checker;
  import lbra_pkg::*;
  logic clk = 0, rst_n = 0, io_req = 0, io_done = 0, all_consolidated = 0;
  logic m_valid = 0, s_valid = 0;
  logic [RES_W-1:0] m_res, s_res;
  logic drain, lockstep, commit_ok, reissue;
  int checks = 0, failures = 0, commits = 0, reissues = 0;
  lockstep_checker dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_res = 0; s_res = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk); #1; check("normal", {drain, lockstep}, 0);
      m_valid = 1; s_valid = 1; m_res = 5; s_res = 6; #1;
      check("no compare in normal mode", {commit_ok, reissue}, 0);
      m_valid = 0; s_valid = 0;
      io_req = 1; @(negedge clk); io_req = 0;
      for (int i = 0; i < 5 + round; i++) begin
        #1; check("drain held", {drain, lockstep}, 2'b10);
        @(negedge clk);
      end
      all_consolidated = 1; @(negedge clk); all_consolidated = 0;
      for (int i = 0; i < 30; i++) begin
        bit same;
        #1; check("lockstep", {drain, lockstep}, 2'b01);
        m_valid = ($urandom_range(0, 3) != 0); s_valid = m_valid;
        m_res = {$urandom, $urandom};
        same = ($urandom_range(0, 3) != 0);
        s_res = same ? m_res : m_res ^ 64'h10;
        #1;
        check("commit_ok", commit_ok, m_valid && same);
        check("reissue", reissue, m_valid && !same);
        if (commit_ok) commits++;
        if (reissue) reissues++;
        @(negedge clk);
      end
      m_valid = 0; s_valid = 0;
      io_done = 1; @(negedge clk); io_done = 0;
    end
    check("commits and reissues seen", commits > 0 && reissues > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
