// tb_pxact_table -- self-checking test of the p-XACT contexts.
// Small configuration: 3 contexts, 4 memory instructions per p-XACT, 64-bit
// signatures, 64-word log. The testbench drives the master commit stream,
// keeps the log pointer as the circular log would, and checks:
//  * a p-XACT commits after its 4th memory instruction, with the right
//    instruction count, log range and CRC-32 of its results (reference CRC
//    computed independently, byte-wise with a table);
//  * the master stalls when all contexts are in use and resumes after a
//    consolidation frees the oldest;
//  * a forward request for a block the p-XACT wrote hits, names that
//    p-XACT and fills its Producer register;
//  * cycle avoidance: an open producer receiving produced data is committed
//    early and the dependence goes to the next p-XACT's Consumer register;
//    an open consumer that is asked for data is committed early and the
//    answer names the next p-XACT;
//  * popping the youngest context for recovery.
module tb_pxact_table;
  import lbra_pkg::*;
  localparam int NP = 3, SZ = 4, LW = 64;
  logic clk = 0, rst_n = 0, init = 0;
  logic m_valid = 0; op_kind_e m_kind; logic [31:0] m_pc, m_addr; logic [63:0] m_res;
  logic m_stall, m_accept;
  logic [5:0] log_ptr, commit_ptr;
  logic log_full = 0, drain = 0, hold = 0;
  logic fwd_valid = 0; core_t fwd_core; pxid_t fwd_id; logic [31:0] fwd_addr;
  logic fwd_hit, fwd_rd_hit; pxid_t fwd_prod_id;
  logic cresp_valid = 0; core_t cresp_core; pxid_t cresp_id;
  logic tail_valid, tail_committed; pxid_t tail_id;
  logic [5:0] tail_log_base, tail_m_ptr, tail_s_ptr;
  logic [15:0] tail_icnt; logic [31:0] tail_vsig; dep_vec_t tail_consumer;
  logic s_ptr_valid = 0; logic [5:0] s_ptr_val = 0; logic consolidate = 0;
  logic young_valid; pxid_t young_id; logic [31:0] young_begin_pc;
  logic [5:0] young_log_base, young_m_ptr; dep_vec_t young_producer;
  logic pop_young = 0;
  logic [NP-1:0] ctx_valid; pxid_t [NP-1:0] ctx_id;
  logic [1:0] n_inflight; logic cur_open; pxid_t cur_id;
  logic ev_commit, ev_forced_commit, ev_stall_ctx;
  int checks = 0, failures = 0, commits = 0, forced = 0, stalls = 0;
  logic [31:0] crc_tab [256];
  logic [31:0] ref_sig [int];
  int ref_icnt [int], ref_base [int], ref_end [int];
  int lp = 0;

  pxact_table #(.NPX_P(NP), .PXACT_SIZE_P(SZ), .SIG_BITS_P(64), .LOG_WORDS_P(LW)) dut (.*);
  always #5 clk = ~clk;
  assign log_ptr = lp[5:0];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] ref_fold(logic [31:0] c, logic [63:0] d);
    for (int b = 0; b < 8; b++) c = (c >> 8) ^ crc_tab[(c ^ d[8*b +: 8]) & 8'hFF];
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_commit) commits++;
    if (ev_forced_commit) forced++;
    if (ev_stall_ctx) stalls++;
  end

  // one master instruction; returns once accepted
  int cur = -1;   // id of the open p-XACT in the reference
  int nid = 0;
  task automatic instr(op_kind_e k, logic [31:0] a);
    @(negedge clk);
    m_valid = 1; m_kind = k; m_addr = a; m_res = {$urandom, $urandom}; m_pc = 32'h1000 + 4 * $urandom_range(0, 99);
    #1;
    while (!m_accept) begin @(negedge clk); #1; end
    if (cur < 0) begin
      cur = nid; nid = (nid + 1) % 16;
      ref_sig[cur] = 32'hFFFFFFFF; ref_icnt[cur] = 0; ref_base[cur] = lp;
    end
    ref_sig[cur] = ref_fold(ref_sig[cur], m_res);
    ref_icnt[cur]++;
    @(posedge clk);
    #1;
    lp = (lp + (k == OP_STORE ? 2 : k == OP_LOAD ? 1 : 0)) % LW;
    ref_end[cur] = lp;
    if (!cur_open) cur = -1;
    m_valid = 0;
  endtask

  task automatic check_tail(int id);
    check("tail valid", tail_valid, 1);
    check("tail committed", tail_committed, 1);
    check("tail id", tail_id, id);
    check("tail icnt", tail_icnt, ref_icnt[id]);
    check("tail vsig", tail_vsig, ref_sig[id]);
    check("tail log base", tail_log_base, ref_base[id]);
    check("tail log end", tail_m_ptr, ref_end[id]);
  endtask

  task automatic do_consolidate();
    @(negedge clk); consolidate = 1; @(negedge clk); consolidate = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c; c = i;
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      crc_tab[i] = c;
    end
    m_kind = OP_ALU; m_addr = 0; m_pc = 0; m_res = 0;
    fwd_core = 0; fwd_id = 0; fwd_addr = 0; cresp_core = 0; cresp_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- p-XACT 0: ALU, LOAD, STORE(0x4000), ALU, LOAD, LOAD -> commits on 4th mem op
    instr(OP_ALU, 0); instr(OP_LOAD, 32'h100); instr(OP_STORE, 32'h4000); instr(OP_ALU, 0);
    instr(OP_LOAD, 32'h140);
    check("still open", cur_open, 1);
    instr(OP_STORE, 32'h4040);
    check("committed after 4 memory instructions", cur_open, 0);
    check_tail(0);
    // ---- forward request to a block written by p-XACT 0
    @(negedge clk); fwd_valid = 1; fwd_core = 7; fwd_id = 9; fwd_addr = 32'h4004; #1;
    check("fwd hit", fwd_hit, 1);
    check("fwd names p-XACT 0", fwd_prod_id, 0);
    @(negedge clk); fwd_valid = 0;
    check("producer register filled", young_producer[7].valid && young_producer[7].id == 9, 1);
    // ---- p-XACT 1 and 2 fill all contexts
    repeat (4) instr(OP_LOAD, 32'h200);
    repeat (4) instr(OP_STORE, 32'h8000);
    check("3 in flight", n_inflight, 3);
    // master needs a 4th context: stalls
    @(negedge clk); m_valid = 1; m_kind = OP_ALU; #1;
    check("stall without free context", m_stall, 1);
    @(negedge clk); #1; check("still stalled", m_stall, 1);
    m_valid = 0;
    do_consolidate();
    check_tail(1);
    // ---- p-XACT 3: producer, then consumes -> forced commit
    instr(OP_STORE, 32'hC000);
    @(negedge clk); fwd_valid = 1; fwd_core = 2; fwd_id = 4; fwd_addr = 32'hC000; #1;
    check("hit on open p-XACT", fwd_hit && fwd_prod_id == 3, 1);
    @(negedge clk); fwd_valid = 0;
    check("open p-XACT is producer", young_producer[2].valid, 1);
    do_consolidate(); do_consolidate();    // free p1, p2
    @(negedge clk); cresp_valid = 1; cresp_core = 5; cresp_id = 11; #1;
    check("forced commit of producer", ev_forced_commit, 1);
    @(negedge clk); cresp_valid = 0; #1;
    check("p-XACT 3 committed early", cur_open, 0);
    cur = -1;
    instr(OP_LOAD, 32'hD000);              // opens p-XACT 4 with the dependence
    check("dependence in p-XACT 4", young_id == 4 && dut.ctx[dut.young].consumer[5].valid
          && dut.ctx[dut.young].consumer[5].id == 11, 1);
    // ---- p-XACT 4 is a consumer; a request for its data forces a commit
    instr(OP_STORE, 32'hE000);
    @(negedge clk); fwd_valid = 1; fwd_core = 6; fwd_id = 1; fwd_addr = 32'hE000; #1;
    check("consumer asked for data: forced", ev_forced_commit, 1);
    check("answer names the next p-XACT", fwd_prod_id, 5);
    @(negedge clk); fwd_valid = 0;
    cur = -1;
    instr(OP_ALU, 0);
    check("p-XACT 5 open and producer", young_id == 5 && young_producer[6].valid && young_producer[6].id == 1, 1);
    // ---- recovery pops the youngest
    @(negedge clk); hold = 1; pop_young = 1; #1;
    @(negedge clk); pop_young = 0; #1;
    check("youngest popped", young_id, 4);
    check("id counter rewound", cur_id, 5);
    hold = 0;
    check("commits seen", commits >= 5, 1);
    check("forced commits seen", forced, 2);
    check("context stall seen", stalls > 0, 1);
    $display("commits=%0d forced=%0d stall_cycles=%0d", commits, forced, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
