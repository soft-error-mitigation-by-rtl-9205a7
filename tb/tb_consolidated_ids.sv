// tb_consolidated_ids -- self-checking test of the Consolidated-IDs register.
// Random updates from coherence responses, look-up answers and the node's
// own consolidations are applied to a reference array that only moves an
// entry forward (modulo-16 order); the register and the dependence check
// (all_done / pending) for random Consumer vectors are compared with it.
module tb_consolidated_ids;
  import lbra_pkg::*;
  logic clk = 0, rst_n = 0, init = 0;
  logic [1:0] upd_valid;
  core_t [1:0] upd_core;
  pxid_t [1:0] upd_id;
  logic own_valid;
  core_t own_core;
  pxid_t own_id;
  dep_vec_t query, ids;
  logic all_done;
  logic [NCORES-1:0] pending;
  int checks = 0, failures = 0, done_cnt = 0, notdone_cnt = 0;
  bit rv [NCORES];
  int rid [NCORES];

  consolidated_ids dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic bit ahead(int a, int b);   // b at or after a, mod 16
    return ((b - a + 16) % 16) < 8;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_core = 0; upd_id = 0; own_valid = 0; own_core = 3; own_id = 0; query = '0;
    foreach (rv[i]) begin rv[i] = 0; rid[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // compare state
      for (int c = 0; c < NCORES; c++) begin
        check("valid", ids[c].valid, rv[c]);
        if (rv[c]) check("id", ids[c].id, rid[c]);
      end
      // random query
      for (int c = 0; c < NCORES; c++) begin
        query[c].valid = ($urandom_range(0, 5) == 0);
        query[c].id    = rv[c] ? pxid_t'(rid[c] + 4 - $urandom_range(0, 5)) : pxid_t'($urandom);
      end
      #1;
      begin
        bit exp_all;
        exp_all = 1;
        for (int c = 0; c < NCORES; c++) begin
          bit d;
          d = !query[c].valid || (rv[c] && ahead(query[c].id, rid[c]));
          check("pending", pending[c], !d);
          if (!d) exp_all = 0;
        end
        check("all_done", all_done, exp_all);
        if (exp_all) done_cnt++; else notdone_cnt++;
      end
      // updates (ids move forward by small steps, sometimes stale)
      own_valid = ($urandom_range(0, 3) == 0);
      own_id = pxid_t'(rid[3] + 1);
      for (int u = 0; u < 2; u++) begin
        upd_valid[u] = $urandom_range(0, 1);
        upd_core[u]  = core_t'($urandom_range(0, NCORES - 1));
        upd_id[u]    = pxid_t'(rid[upd_core[u]] + $urandom_range(0, 4) - 1);
      end
      @(posedge clk);
      begin
        bit nv [NCORES];
        int nid [NCORES];
        for (int c = 0; c < NCORES; c++) begin nv[c] = rv[c]; nid[c] = rid[c]; end
        for (int c = 0; c < NCORES; c++) begin
          if (own_valid && own_core == c) begin nv[c] = 1; nid[c] = own_id; end
          else for (int u = 0; u < 2; u++)
            if (upd_valid[u] && upd_core[u] == c && (!nv[c] || ahead(nid[c], upd_id[u]))) begin
              nv[c] = 1; nid[c] = upd_id[u];
            end
        end
        for (int c = 0; c < NCORES; c++) begin rv[c] = nv[c]; rid[c] = nid[c]; end
      end
    end
    check("both outcomes seen", (done_cnt > 0) && (notdone_cnt > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
