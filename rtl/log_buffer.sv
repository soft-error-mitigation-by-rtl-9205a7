// log_buffer -- slave-side FIFO of log blocks with next-block prefetch.
//
// When master and slave run on different cores, the slave reads the log
// through this small FIFO of whole cache blocks instead of pulling log lines
// into its own cache with coherent requests (which would make the master
// re-acquire write permission when it wraps around onto them). Misses are
// served with a non-coherent cache-to-cache read (`req_*` / `resp_*`), and
// whenever an entry is free the buffer asks for the next logical log block,
// wrapping at the end of the log region.
//
// From the description: FIFO of log blocks, 3 entries, non-coherent block
// reads, prefetch of the next logical block whenever at least one entry is
// free. Own choices: the buffer only asks for a block holding at least one
// word the master has already committed (`commit_ptr`), remembers how many
// of the block's words were committed when it was asked for, and treats a
// read beyond that count as a miss that flushes the buffer and refetches,
// so it never returns a stale log word. A block is dropped once the slave
// pointer has left it.
//
// Interface: word offsets into the log ring. `rd_valid/rd_off/rd_two` look up
// one or two consecutive words combinationally (`rd_hit`, `rd_data`).
// `req_valid/req_ready/req_addr` asks for one block; responses come back in
// request order on `resp_valid/resp_data`, one cycle or more later.
module log_buffer
  import lbra_pkg::*;
#(
  parameter int unsigned NE          = lbra_pkg::LOGBUF_ENTRIES,
  parameter int unsigned LOG_WORDS_P = lbra_pkg::LOG_WORDS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [ADDR_W-1:0]                  cfg_base,
  input  logic                               flush,
  input  logic [$clog2(LOG_WORDS_P)-1:0]     slave_ptr,
  input  logic [$clog2(LOG_WORDS_P)-1:0]     commit_ptr,
  // slave read port
  input  logic                               rd_valid,
  input  logic [$clog2(LOG_WORDS_P)-1:0]     rd_off,
  input  logic                               rd_two,
  output logic                               rd_hit,
  output logic [1:0][WORD_W-1:0]             rd_data,
  // non-coherent block reads
  output logic                               req_valid,
  output logic [ADDR_W-1:0]                  req_addr,
  output logic                               req_prefetch,  // request is ahead of the slave's block
  input  logic                               req_ready,
  input  logic                               resp_valid,
  input  logic [LINE_WORDS-1:0][WORD_W-1:0]  resp_data,
  output logic                               stale_flush    // pulse: a stale block was dropped
);
  localparam int unsigned OW = $clog2(LOG_WORDS_P);
  localparam int unsigned WB = $clog2(LINE_WORDS);
  localparam int unsigned BW = OW - WB;
  localparam int unsigned PW = (NE > 1) ? $clog2(NE) : 1;
  typedef logic [OW-1:0] off_t;
  typedef logic [BW-1:0] blk_t;

  typedef struct packed {
    logic  valid;
    logic  filled;
    blk_t  blk;
    logic [WB:0] nwords;
    logic [LINE_WORDS-1:0][WORD_W-1:0] data;
  } entry_t;

  entry_t [NE-1:0] ent;
  logic [PW-1:0] head;
  logic [PW:0]   count;
  logic [PW:0]   discard;
  blk_t          next_blk;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] i, int unsigned n);
    int unsigned v;
    v = (int'(i) + n) % NE;
    return PW'(v);
  endfunction

  // ---------------- lookup ----------------
  off_t rd_off1;
  logic [1:0] found, ok;
  logic stale;
  assign rd_off1 = rd_off + off_t'(1);

  always_comb begin
    found   = '0;
    ok      = '0;
    rd_data = '0;
    for (int e = 0; e < NE; e++) begin
      if (ent[e].valid && ent[e].filled) begin
        if (ent[e].blk == rd_off[OW-1:WB]) begin
          found[0]   = 1'b1;
          ok[0]      = ({1'b0, rd_off[WB-1:0]} < ent[e].nwords);
          rd_data[0] = ent[e].data[rd_off[WB-1:0]];
        end
        if (ent[e].blk == rd_off1[OW-1:WB]) begin
          found[1]   = 1'b1;
          ok[1]      = ({1'b0, rd_off1[WB-1:0]} < ent[e].nwords);
          rd_data[1] = ent[e].data[rd_off1[WB-1:0]];
        end
      end
    end
    rd_hit = rd_valid && ok[0] && (!rd_two || ok[1]);
    stale  = rd_valid && ((found[0] && !ok[0]) || (rd_two && found[1] && !ok[1]));
  end
  assign stale_flush = stale;

  // ---------------- prefetch decision ----------------
  off_t sbs, nbs, d_commit, d_next, d_slave, need;
  assign sbs      = {slave_ptr[OW-1:WB], WB'(0)};
  assign nbs      = {next_blk, WB'(0)};
  assign d_commit = commit_ptr - sbs;
  assign d_next   = nbs - sbs;
  assign d_slave  = slave_ptr - sbs;
  assign need     = (next_blk == slave_ptr[OW-1:WB]) ? d_slave : d_next;

  logic do_flush;
  assign do_flush  = flush || stale;
  assign req_valid = !do_flush && (count < (PW+1)'(NE)) && (d_commit > need)
                     && (d_next < off_t'(LOG_WORDS_P / 2));
  assign req_addr  = cfg_base + (ADDR_W'(nbs) << 2);
  assign req_prefetch = (next_blk != slave_ptr[OW-1:WB]);

  // committed words of the requested block
  logic [WB:0] req_nwords;
  always_comb begin
    off_t d;
    d = commit_ptr - nbs;
    req_nwords = (d >= off_t'(LINE_WORDS)) ? (WB+1)'(LINE_WORDS) : d[WB:0];
  end

  // ---------------- state ----------------
  logic pop;
  assign pop = (count != 0) && ent[head].valid && ent[head].filled &&
               (ent[head].blk != slave_ptr[OW-1:WB]);

  logic [PW:0] pending;
  always_comb begin
    pending = '0;
    for (int e = 0; e < NE; e++)
      if (ent[e].valid && !ent[e].filled) pending = pending + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    logic [PW-1:0] h;   // next head
    logic [PW:0]   c;   // next count
    logic [PW-1:0] i, t;
    logic          done;
    if (!rst_n) begin
      h = '0; c = '0; i = '0; t = '0; done = 1'b0;
      ent      <= '0;
      head     <= '0;
      count    <= '0;
      discard  <= '0;
      next_blk <= '0;
    end else if (do_flush) begin
      h = '0; c = '0; i = '0; t = '0; done = 1'b0;
      for (int e = 0; e < NE; e++) ent[e].valid <= 1'b0;
      head     <= '0;
      count    <= '0;
      // a response arriving now belongs either to an older flush or to a
      // pending entry that is being dropped
      discard  <= discard + pending - (PW+1)'(resp_valid);
      next_blk <= slave_ptr[OW-1:WB];
    end else begin
      h = head;
      c = count;
      // fill the oldest outstanding entry
      if (resp_valid) begin
        if (discard != 0) discard <= discard - 1'b1;
        else begin
          done = 1'b0;
          for (int k = 0; k < NE; k++) begin
            i = inc(head, k);
            if (!done && ent[i].valid && !ent[i].filled) begin
              ent[i].filled <= 1'b1;
              ent[i].data   <= resp_data;
              done = 1'b1;
            end
          end
        end
      end
      if (pop) begin
        ent[h].valid <= 1'b0;
        h = inc(h, 1);
        c = c - 1'b1;
      end
      if (req_valid && req_ready) begin
        t = inc(head, int'(count));
        ent[t].valid  <= 1'b1;
        ent[t].filled <= 1'b0;
        ent[t].blk    <= next_blk;
        ent[t].nwords <= req_nwords;
        next_blk      <= next_blk + 1'b1;
        c = c + 1'b1;
      end else if (count == 0 && next_blk != slave_ptr[OW-1:WB]) begin
        next_blk <= slave_ptr[OW-1:WB];
      end
      head  <= h;
      count <= c;
    end
  end
endmodule
