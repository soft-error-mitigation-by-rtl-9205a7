// tb_consolidation_unit -- self-checking test of verification and in-order
// consolidation. Checks that a matching p-XACT with no open dependence is
// consolidated exactly VERIF_LAT (10) cycles after the slave ends it, that a
// signature mismatch raises `fault` at that same point and never
// consolidates, and that with open dependences the unit sends one look-up per
// pending producer core, asks again after the retry interval, and
// consolidates only once the Consolidated-IDs check passes.
module tb_consolidation_unit;
  import lbra_pkg::*;
  logic clk = 0, rst_n = 0, cancel = 0, s_end = 0;
  logic [31:0] s_sig, m_sig;
  logic deps_done;
  logic [NCORES-1:0] deps_pending;
  logic lk_req_valid, lk_req_ready, consolidate, fault, busy, ev_dep_wait;
  core_t lk_req_core;
  int checks = 0, failures = 0, lookups = 0;
  int asked [NCORES];

  consolidation_unit #(.VERIF_LAT_P(10), .RETRY_P(16)) dut (.*);
  always #5 clk = ~clk;

  assign deps_done = (deps_pending == '0);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (lk_req_valid && lk_req_ready) begin
    lookups++;
    asked[lk_req_core]++;
    checks++;
    if (!deps_pending[lk_req_core]) begin failures++; $display("FAIL look-up to a core not pending"); end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit same, logic [NCORES-1:0] deps, int release_after,
                     output int lat, output bit faulted);
    s_sig = $urandom; m_sig = same ? s_sig : ~s_sig;
    deps_pending = deps;
    @(negedge clk); s_end = 1;
    @(negedge clk); s_end = 0; s_sig = $urandom;  // s_sig must have been latched
    lat = 1; faulted = 0;
    while (1) begin
      if (lat == release_after) deps_pending = '0;
      #1;
      if (fault) begin faulted = 1; break; end
      if (consolidate) break;
      @(negedge clk);
      lat++;
      if (lat > 500) break;
    end
    @(negedge clk);
  endtask

  initial begin
    int lat;
    bit f;
    s_sig = 0; m_sig = 0; deps_pending = '0; lk_req_ready = 1;
    foreach (asked[i]) asked[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      run(1, '0, 0, lat, f);
      check("latency without dependences", lat, 10);
      check("no fault", f, 0);
    end
    run(0, '0, 0, lat, f);
    check("mismatch faults", f, 1);
    check("fault at the verification latency", lat, 10);
    check("back to idle", busy, 0);
    // two producers not consolidated yet; released after 60 cycles
    foreach (asked[i]) asked[i] = 0;
    run(1, 16'h0410, 60, lat, f);
    check("waits for producers", lat, 60);
    check("core 4 asked again after retry", asked[4] >= 2, 1);
    check("core 10 asked", asked[10] >= 2, 1);
    check("other cores not asked", asked[0] + asked[5], 0);
    // cancel in the middle of the verification
    @(negedge clk); s_sig = 1; m_sig = 1; s_end = 1;
    @(negedge clk); s_end = 0;
    repeat (3) @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0;
    repeat (20) begin #1; check("cancelled", consolidate || fault, 0); @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
