// tb_watchdog_timer -- self-checking test of the forward-progress watchdog.
// With LIMIT=20: the time-out must come exactly after 20 active cycles with
// no progress, must not come while progress pulses keep arriving or while
// nothing is in flight, and the count restarts after each time-out.
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, active = 0, progress = 0, timeout;
  int checks = 0, failures = 0;
  watchdog_timer #(.LIMIT(20)) dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    // idle: never fires
    repeat (50) begin @(negedge clk); check("idle", timeout, 0); end
    // active, no progress: fires on the 20th active cycle, then restarts
    for (int r = 0; r < 2; r++) begin
      for (int i = 1; i <= 20; i++) begin
        @(negedge clk); active = 1; #1;
        check("cycle count", timeout, i == 20);
      end
    end
    // steady progress every 10 cycles: never fires
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); progress = (i % 10 == 9); #1;
      check("progress", timeout, 0);
    end
    progress = 0;
    // inactive resets the count
    for (int i = 0; i < 15; i++) begin @(negedge clk); #1; end
    @(negedge clk); active = 0; @(negedge clk); active = 1;
    for (int i = 2; i <= 19; i++) begin @(negedge clk); #1; check("after idle", timeout, 0); end
    @(negedge clk); #1; check("fires again", timeout, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
