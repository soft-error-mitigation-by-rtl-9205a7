// tb_log_buffer -- self-checking test of the slave log buffer.
// The testbench plays the master (writing random words into a 128-word log
// ring and advancing the committed pointer), the memory (answering block
// reads in order after 2 to 8 cycles with the ring's current contents) and
// the slave (reading one or two words at its pointer and moving on after a
// hit). Every word returned on a hit must equal the ring's word. It also
// checks that the buffer never holds more than three blocks, that
// prefetches ahead of the slave happen, and that a block read before the
// master finished it is dropped instead of returning stale words.
module tb_log_buffer;
  import lbra_pkg::*;
  localparam int W = 128;
  localparam int NE = 3;
  localparam logic [31:0] BASE = 32'h0002_0000;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [6:0] slave_ptr, commit_ptr, rd_off;
  logic rd_valid = 0, rd_two = 0, rd_hit;
  logic [1:0][31:0] rd_data;
  logic req_valid, req_prefetch, req_ready, resp_valid, stale_flush;
  logic [31:0] req_addr;
  logic [15:0][31:0] resp_data;
  int partial = 0;
  int checks = 0, failures = 0, hits = 0, prefetches = 0, stales = 0, requests = 0, words = 0;
  logic [31:0] mem [W];
  int sp = 0, cp = 0;
  int outstanding = 0;
  typedef struct { int blk; int due; } pend_t;
  pend_t pend [$];
  int cyc = 0;

  log_buffer #(.NE(NE), .LOG_WORDS_P(W)) dut (.cfg_base(BASE), .*);
  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: accepts one request per cycle, answers in order
  assign req_ready = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && stale_flush) stales++;
    if (rst_n && req_valid && req_ready) begin
      pend_t p;
      p.blk = (req_addr - BASE) / 64;
      p.due = cyc + $urandom_range(2, 8);
      if (pend.size() > 0 && pend[$].due > p.due) p.due = pend[$].due;
      pend.push_back(p);
      requests++;
      if (req_prefetch) prefetches++;
      if (dut.req_nwords < 16) partial++;
      checks++;
      if (p.blk < 0 || p.blk >= W / 16) begin failures++; $display("FAIL bad block address"); end
    end
  end
  always @(negedge clk) begin
    resp_valid = 0;
    if (pend.size() > 0 && pend[0].due <= cyc) begin
      pend_t p;
      p = pend.pop_front();
      for (int i = 0; i < 16; i++) resp_data[i] = mem[p.blk * 16 + i];
      resp_valid = 1;
    end
  end

  initial begin
    foreach (mem[i]) mem[i] = 32'hDEAD0000 + i;
    resp_data = '0;
    slave_ptr = 0; commit_ptr = 0; rd_off = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (words < 1500) begin
      @(negedge clk);
      #1;
      // slave: check and consume a hit from the previous setup
      if (rd_valid && rd_hit) begin
        check("word 0", rd_data[0], mem[sp]);
        if (rd_two) check("word 1", rd_data[1], mem[(sp + 1) % W]);
        hits++;
        sp = (sp + (rd_two ? 2 : 1)) % W;
        words += rd_two ? 2 : 1;
      end
      // master: commit a few words now and then, never overrunning the slave
      if ($urandom_range(0, 2) == 0) begin
        int n;
        n = $urandom_range(1, 6);
        for (int k = 0; k < n; k++)
          if ((cp - sp + W) % W < W - 3) begin
            mem[cp] = $urandom;
            cp = (cp + 1) % W;
          end
      end
      commit_ptr = cp[6:0];
      slave_ptr  = sp[6:0];
      // slave: ask for the next entry if the master committed it
      rd_two = $urandom_range(0, 1);
      rd_valid = ((cp - sp + W) % W) >= (rd_two ? 2 : 1) && $urandom_range(0, 3) != 0;
      rd_off = sp[6:0];
      checks++;
      if (dut.count > NE) begin failures++; $display("FAIL more than %0d blocks", NE); end
    end
    check("prefetches seen", prefetches > 10, 1);
    check("hits seen", hits > 500, 1);
    check("stale blocks dropped", stales > 0, 1);
    $display("partial=%0d", partial);
    $display("hits=%0d requests=%0d prefetches=%0d stale_flushes=%0d", hits, requests, prefetches, stales);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
