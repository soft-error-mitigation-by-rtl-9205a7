// tb_slave_unit -- self-checking test of the slave side.
// The testbench holds a log (loads: value; stores: address, old value) and a
// list of committed p-XACTs, plays the p-XACT table (tail context, slave
// pointer) and a log buffer that misses at random, and drives the slave
// commit stream with the same instructions the master logged. Checks: each
// load gets its logged value, the pointer advances by one word per load and
// two per store, the slave waits while the log word is missing, s_end comes
// on the p-XACT's last instruction with the CRC-32 of the slave's results,
// the slave then waits for consolidation, a wrong store address raises
// addr_fault, and nothing runs before the p-XACT is committed.
module tb_slave_unit;
  import lbra_pkg::*;
  localparam int LW = 64;
  logic clk = 0, rst_n = 0, restart = 0, enable = 1;
  logic tail_valid = 0, tail_committed = 0; logic [15:0] tail_icnt = 0; logic [5:0] tail_s_ptr;
  logic s_ptr_valid; logic [5:0] s_ptr_val;
  logic s_valid = 0; op_kind_e s_kind; logic [31:0] s_addr; logic [63:0] s_res;
  logic s_ready; logic [31:0] s_ld_data;
  logic rd_valid, rd_two, rd_hit; logic [5:0] rd_off; logic [1:0][31:0] rd_data;
  logic s_end, addr_fault, cons_done = 0; logic [31:0] s_sig;
  int checks = 0, failures = 0, misses = 0, ends = 0, afaults = 0;
  logic [31:0] logm [LW];
  logic [31:0] crc_tab [256];
  int sp = 0;
  bit miss_now;

  slave_unit #(.LOG_WORDS_P(LW)) dut (.*);
  always #5 clk = ~clk;
  assign tail_s_ptr = sp[5:0];

  // log buffer model: random misses
  assign rd_hit = rd_valid && !miss_now;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] ref_fold(logic [31:0] c, logic [63:0] d);
    for (int b = 0; b < 8; b++) c = (c >> 8) ^ crc_tab[(c ^ d[8*b +: 8]) & 8'hFF];
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (s_ptr_valid) sp <= s_ptr_val;
    if (s_end) ends++;
    if (addr_fault) afaults++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_kind = OP_ALU; s_addr = 0; s_res = 0; miss_now = 0; rd_data = '0;
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c; c = i;
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      crc_tab[i] = c;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int px = 0; px < 12; px++) begin
      op_kind_e kinds [$]; logic [31:0] addrs [$]; logic [31:0] sig;
      int n, wp, start;
      bit bad;
      kinds.delete(); addrs.delete();
      n = $urandom_range(3, 12);
      bad = (px % 4 == 3);
      // the master's log for this p-XACT
      start = sp; wp = sp;
      for (int i = 0; i < n; i++) begin
        op_kind_e k; logic [31:0] a;
        k = op_kind_e'($urandom_range(0, 2)); a = $urandom;
        kinds.push_back(k); addrs.push_back(a);
        if (k == OP_LOAD) begin logm[wp] = $urandom; wp = (wp + 1) % LW; end
        if (k == OP_STORE) begin logm[wp] = a; logm[(wp + 1) % LW] = $urandom; wp = (wp + 2) % LW; end
      end
      tail_valid = 1; tail_committed = 0; tail_icnt = 16'(n);
      // not committed yet: the slave must wait
      @(negedge clk); s_valid = 1; s_kind = kinds[0]; s_addr = addrs[0]; s_res = 0; #1;
      check("waits for commit", s_ready, 0);
      s_valid = 0;
      tail_committed = 1;
      sig = 32'hFFFFFFFF;
      for (int i = 0; i < n; i++) begin
        int p0;
        @(negedge clk);
        p0 = sp;
        rd_data[0] = logm[p0];
        rd_data[1] = logm[(p0 + 1) % LW];
        s_valid = 1; s_kind = kinds[i]; s_addr = addrs[i];
        if (bad && kinds[i] == OP_STORE) s_addr = addrs[i] ^ 32'h40;
        miss_now = ($urandom_range(0, 2) == 0);
        if (miss_now && kinds[i] != OP_ALU) begin
          #1; check("waits on a log miss", s_ready, 0); misses++;
          @(negedge clk); miss_now = 0;
        end
        miss_now = 0;
        s_res = (kinds[i] == OP_LOAD) ? {32'h0, logm[p0]} : {$urandom, $urandom};
        #1;
        check("ready", s_ready, 1);
        if (kinds[i] == OP_LOAD) check("load value from the log", s_ld_data, logm[p0]);
        if (kinds[i] == OP_STORE) begin
          check("old value from the log", s_ld_data, logm[(p0 + 1) % LW]);
          check("store address check", addr_fault, bad);
        end
        check("read offset", rd_off, p0);
        sig = ref_fold(sig, s_res);
        check("end on last instruction", s_end, i == n - 1);
        if (i == n - 1) check("slave signature", s_sig, sig);
        @(posedge clk);
      end
      @(negedge clk); s_valid = 0;
      check("pointer advanced over the p-XACT", sp, wp);
      s_valid = 1; s_kind = OP_ALU; #1;
      check("waits for consolidation", s_ready, 0);
      s_valid = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      cons_done = 1; @(negedge clk); cons_done = 0;
    end
    check("ends seen", ends, 12);
    check("address faults seen", afaults > 0, 1);
    check("misses seen", misses > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
