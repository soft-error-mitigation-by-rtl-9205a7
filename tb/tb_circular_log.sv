// tb_circular_log -- self-checking test of the master log pointer.
// A 32-word ring is filled with random loads (1 word) and stores (address
// then old value), released from the tail the way consolidations would do it
// and rewound the way a recovery would. Every log write address and datum,
// the pointer, the fill level, the wrap pulse and the full flag are compared
// with a reference model.
module tb_circular_log;
  import lbra_pkg::*;
  localparam int W = 32;
  localparam logic [31:0] BASE = 32'h0001_0000;
  logic clk = 0, rst_n = 0, init = 0;
  logic wr_valid = 0, wr_store = 0;
  logic [31:0] wr_addr, wr_data;
  logic [1:0] lw_valid;
  logic [1:0][31:0] lw_addr, lw_data;
  logic release_valid = 0, rewind_valid = 0;
  logic [4:0] release_ptr, rewind_ptr, ptr, tail;
  logic [5:0] used;
  logic full, wrapped;
  int checks = 0, failures = 0, wraps = 0, fulls = 0;
  int mptr = 0, mtail = 0;

  circular_log #(.LOG_WORDS_P(W)) dut (.cfg_base(BASE), .*);
  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_addr = 0; wr_data = 0; release_ptr = 0; rewind_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int m_used;
      @(negedge clk);
      m_used = (mptr - mtail + W) % W;
      check("used", used, m_used);
      check("full", full, m_used > W - 3);
      check("ptr", ptr, mptr);
      if (full) fulls++;
      wr_valid = 0; release_valid = 0; rewind_valid = 0;
      if (!full && $urandom_range(0, 3) != 0) begin
        wr_valid = 1;
        wr_store = $urandom_range(0, 1);
        wr_addr  = $urandom;
        wr_data  = $urandom;
        #1;
        check("lw_valid", lw_valid, wr_store ? 2'b11 : 2'b01);
        check("lw_addr0", lw_addr[0], BASE + 4 * mptr);
        check("lw_data0", lw_data[0], wr_store ? wr_addr : wr_data);
        if (wr_store) begin
          check("lw_addr1", lw_addr[1], BASE + 4 * ((mptr + 1) % W));
          check("lw_data1", lw_data[1], wr_data);
        end
        check("wrapped", wrapped, (mptr + (wr_store ? 2 : 1)) >= W);
        if (wrapped) wraps++;
        mptr = (mptr + (wr_store ? 2 : 1)) % W;
      end
      if (m_used > 0 && $urandom_range(0, 7) == 0) begin
        // consolidation releases part of the used words
        mtail = (mtail + $urandom_range(1, (m_used < 4) ? m_used : 4)) % W;
        release_valid = 1;
        release_ptr = mtail[4:0];
      end else if (!wr_valid && m_used > 2 && $urandom_range(0, 40) == 0) begin
        // recovery rewinds the pointer
        mptr = (mtail + 1) % W;
        rewind_valid = 1;
        rewind_ptr = mptr[4:0];
      end
    end
    @(negedge clk); wr_valid = 0; release_valid = 0; rewind_valid = 0;
    init = 1; @(negedge clk); init = 0;
    check("init ptr", ptr, 0); check("init used", used, 0);
    check("saw wraps", wraps > 2, 1);
    check("saw full", fulls > 0, 1);
    $display("wraps=%0d full_cycles=%0d", wraps, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
