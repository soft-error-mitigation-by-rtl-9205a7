// circular_log -- master side of the circular log (Master Log Pointer).
//
// For every memory instruction the master commits, this block produces the
// log write(s) the master issues: a load logs its value (one 32-bit word),
// a store logs its address and the old memory value (two words, address
// first), so the log is kept in program order. The log region is a ring of
// LOG_WORDS words starting at `cfg_base`. Unlike a plain transactional log,
// the pointer is never reset at commit: the next p-XACT continues where the
// previous one stopped and the pointer wraps at the end of the region. The
// `tail` marks the start of the oldest p-XACT not yet consolidated; words
// between tail and the pointer may not be overwritten, and `full` asks the
// master to stall once fewer than two free words are left (so one store
// entry always fits and the ring is never completely full, which keeps
// pointer differences unambiguous).
//
// From the description: what is logged per load and store, the continuation
// of the pointer across commits, the wrap, and the stall when the log space
// runs out. Own choices: word-granular offsets, entry word order, a
// power-of-two region size, and how release/rewind are signalled.
//
// Timing: `lw_*` are combinational from `wr_*` in the same cycle; the pointer
// advances at the clock edge. `release_valid` moves the tail to
// `release_ptr` (end of a consolidated p-XACT); `rewind_valid` moves the
// pointer back to `rewind_ptr` (log base of a p-XACT being rolled back);
// `init` empties the log.
module circular_log
  import lbra_pkg::*;
#(
  parameter int unsigned LOG_WORDS_P = lbra_pkg::LOG_WORDS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ADDR_W-1:0]         cfg_base,
  input  logic                      init,
  // master memory instruction at commit
  input  logic                      wr_valid,
  input  logic                      wr_store,
  input  logic [ADDR_W-1:0]         wr_addr,
  input  logic [WORD_W-1:0]         wr_data,   // loaded value, or old value for a store
  // log writes towards the master's L1
  output logic [1:0]                lw_valid,
  output logic [1:0][ADDR_W-1:0]    lw_addr,
  output logic [1:0][WORD_W-1:0]    lw_data,
  // pointer management
  input  logic                      release_valid,
  input  logic [$clog2(LOG_WORDS_P)-1:0] release_ptr,
  input  logic                      rewind_valid,
  input  logic [$clog2(LOG_WORDS_P)-1:0] rewind_ptr,
  output logic [$clog2(LOG_WORDS_P)-1:0] ptr,
  output logic [$clog2(LOG_WORDS_P)-1:0] tail,
  output logic [$clog2(LOG_WORDS_P):0]   used,
  output logic                      full,
  output logic                      wrapped     // pulses when the pointer passes the region end
);
  localparam int unsigned OW = $clog2(LOG_WORDS_P);
  typedef logic [OW-1:0] off_t;

  off_t p1, ptr_next;

  function automatic logic [ADDR_W-1:0] word_addr(off_t o);
    return cfg_base + (ADDR_W'(o) << 2);
  endfunction

  assign p1 = ptr + off_t'(1);
  assign used = {1'b0, off_t'(ptr - tail)};
  assign full = (used > (OW+1)'(LOG_WORDS_P - 3));

  always_comb begin
    lw_valid = '0;
    lw_addr  = '0;
    lw_data  = '0;
    ptr_next = ptr;
    if (wr_valid) begin
      lw_valid[0] = 1'b1;
      lw_addr[0]  = word_addr(ptr);
      if (wr_store) begin
        lw_data[0]  = wr_addr;
        lw_valid[1] = 1'b1;
        lw_addr[1]  = word_addr(p1);
        lw_data[1]  = wr_data;
        ptr_next    = ptr + off_t'(2);
      end else begin
        lw_data[0]  = wr_data;
        ptr_next    = p1;
      end
    end
  end

  assign wrapped = wr_valid && (ptr_next < ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      tail <= '0;
    end else if (init) begin
      ptr  <= '0;
      tail <= '0;
    end else begin
      if (rewind_valid)     ptr <= rewind_ptr;
      else                  ptr <= ptr_next;
      if (release_valid)    tail <= release_ptr;
    end
  end

  // The master must not write while the log is full.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> !full);
endmodule
