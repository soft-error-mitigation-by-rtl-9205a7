// lbra_node_harness -- system environment around one lbra_node, used by the
// end-to-end testbenches.
//
// The harness plays every party the node talks to:
//   * a master thread and a slave thread that commit the same synthetic
//     program (instruction i is a pure function of i: kind, address, store
//     data, ALU result). The master loads from a memory model, the slave
//     only ever sees load values through the node (s_ld_data);
//   * the master's cache, which absorbs the log writes and answers the
//     slave's non-coherent log block reads after LB_LAT cycles;
//   * three remote cores (ids 1..3) that forward requests to the node's
//     written blocks, return data that was produced by their own in-flight
//     p-XACTs, answer look-ups with their last consolidated id, acknowledge
//     rollback requests and, once, ask the node itself to roll back;
//   * the software undo handler, which walks the logged store entries of a
//     p-XACT backwards and writes the old values back into memory;
//   * an I/O device that at the end of the program requests lockstep mode.
// Faults are injected once each: a wrong slave result (signature mismatch),
// a wrong slave store address (address check), a slave that stops
// (watchdog) and a wrong slave result during lockstep (reissue).
//
// Checks: every slave load sees the master's value; after a recovery the
// restored checkpoint equals the slave state at the resume point; the
// remote core that requested a rollback gets an acknowledgement, at once
// when the p-XACT it names is no longer in flight; the node
// ends with nothing in flight; and the final memory equals a golden memory
// built by applying every store of the program once, in program order.
// `cnt` counts how often each mechanism happened.
//
// FULL=1 instantiates the node with all of its default parameters; FULL=0
// uses the sizes given by the *_H parameters (contexts, p-XACT size,
// signature bits, log words, watchdog limit).
module lbra_node_harness
  import lbra_pkg::*;
#(
  parameter bit          FULL        = 1'b1,
  parameter int unsigned LOG_WORDS_H = 128,
  parameter int unsigned WDT_H       = 2000,
  parameter int unsigned NPX_H       = 5,
  parameter int unsigned PXACT_H     = 50,
  parameter int unsigned SIG_H       = 2048,
  parameter int unsigned N_INSTR     = 4000,
  parameter int unsigned SEED        = 1
)(
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned cnt [20]
);
  localparam int unsigned LWORDS = FULL ? LOG_WORDS : LOG_WORDS_H;
  localparam int unsigned WDT    = FULL ? 100_000 : WDT_H;
  localparam int unsigned NPXN   = FULL ? NPX : NPX_H;
  localparam int unsigned LB_LAT = 6;
  localparam logic [31:0] LOG_BASE  = 32'h0010_0000;
  localparam logic [31:0] PRIV_BASE = 32'h0000_1000;
  localparam logic [31:0] REM_BASE  = 32'h0000_8000;
  localparam int unsigned SIGF_IDX  = 300;
  localparam int unsigned ADDRF_IDX = 700;
  localparam int unsigned RBIN_IDX  = 1100;
  localparam int unsigned HANG_IDX  = 1500;
  localparam int unsigned LS_N      = 12;
  localparam int unsigned LS_BAD    = 4;

  // ---------------- DUT signals (names match the node's ports) ----------
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  core_t my_core = '0;
  logic [ADDR_W-1:0] cfg_log_base = LOG_BASE;
  logic m_valid = 1'b0;
  op_kind_e m_kind = OP_ALU;
  logic [ADDR_W-1:0] m_pc = '0, m_addr = '0;
  logic [WORD_W-1:0] m_wdata = '0;
  logic [RES_W-1:0] m_res = '0;
  logic m_stall;
  pxid_t m_cur_id;
  logic [1:0] lw_valid;
  logic [1:0][ADDR_W-1:0] lw_addr;
  logic [1:0][WORD_W-1:0] lw_data;
  logic s_valid = 1'b0;
  op_kind_e s_kind = OP_ALU;
  logic [ADDR_W-1:0] s_addr = '0;
  logic [RES_W-1:0] s_res;
  logic s_ready;
  logic [WORD_W-1:0] s_ld_data;
  logic lb_req_valid;
  logic [ADDR_W-1:0] lb_req_addr;
  logic lb_req_ready = 1'b1;
  logic lb_resp_valid = 1'b0;
  logic [LINE_WORDS-1:0][WORD_W-1:0] lb_resp_data = '0;
  logic fwd_valid = 1'b0;
  core_t fwd_core = '0;
  pxid_t fwd_id = '0;
  logic [ADDR_W-1:0] fwd_addr = '0;
  logic fwd_hit, fwd_rd_hit;
  pxid_t fwd_prod_id;
  dep_t my_cons;
  logic cresp_valid = 1'b0, cresp_prod = 1'b0;
  core_t cresp_core = '0;
  pxid_t cresp_id = '0;
  dep_t cresp_cons = '0;
  logic lk_req_valid;
  core_t lk_req_core;
  logic lk_req_ready = 1'b1;
  logic lk_resp_valid = 1'b0;
  core_t lk_resp_core = '0;
  pxid_t lk_resp_id = '0;
  logic rb_in_valid = 1'b0;
  core_t rb_in_core = '0;
  pxid_t rb_in_id = '0;
  logic rb_out_valid;
  core_t rb_out_core;
  pxid_t rb_out_id;
  logic rb_out_ready = 1'b1;
  logic ack_in_valid = 1'b0;
  core_t ack_in_core = '0;
  logic ack_out_valid;
  core_t ack_out_core;
  logic ack_out_ready = 1'b1;
  logic undo_req;
  logic [ADDR_W-1:0] undo_from, undo_to;
  logic undo_done = 1'b0;
  logic [31:0][63:0] s_arch_regs = '0;
  logic restore_valid;
  logic [31:0][63:0] restore_regs;
  logic resume_valid;
  logic [ADDR_W-1:0] resume_pc;
  logic rec_busy;
  logic io_req = 1'b0, io_done = 1'b0;
  logic lockstep, ls_commit;
  logic [$clog2(NPXN+1)-1:0] n_inflight;
  lbra_events_t ev;

  if (FULL) begin : g_full
    lbra_node u_dut (.*);
  end else begin : g_small
    lbra_node #(.NPX_P(NPX_H), .PXACT_SIZE_P(PXACT_H), .SIG_BITS_P(SIG_H),
               .LOG_WORDS_P(LOG_WORDS_H), .WDT_LIMIT_P(WDT_H)) u_dut (.*);
  end

  always #5 clk = ~clk;

  // ---------------- the synthetic program ----------------
  function automatic logic [31:0] mix(input logic [31:0] v);
    logic [31:0] x;
    x = v ^ (SEED * 32'h9e37_79b9);
    x = x ^ (x >> 16);
    x = x * 32'h7feb_352d;
    x = x ^ (x >> 15);
    x = x * 32'h846c_a68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic op_kind_e kind_of(input int unsigned i);
    logic [31:0] h;
    h = mix(i);
    if (h[2:0] < 3'd4) return OP_ALU;
    else if (h[2:0] < 3'd6) return OP_LOAD;
    else return OP_STORE;
  endfunction

  function automatic logic [31:0] addr_of(input int unsigned i);
    logic [31:0] h;
    h = mix(i ^ 32'h0123_4567);
    if (kind_of(i) == OP_LOAD && h[31]) return REM_BASE + {26'd0, h[3:0], 2'b00};
    return PRIV_BASE + {24'd0, h[9:4], 2'b00};
  endfunction

  function automatic logic [31:0] sdata_of(input int unsigned i);
    return mix(i ^ 32'hABCD_EF01);
  endfunction

  function automatic logic [63:0] alu_of(input int unsigned i);
    return {mix(i + 32'd7), mix(i + 32'd9)};
  endfunction

  // ---------------- memory, log and bookkeeping ----------------
  logic [31:0] priv [64];
  logic [31:0] rem  [16];
  logic [31:0] logmem [LWORDS];
  logic [1:0]  logkind [LWORDS];       // 0 load value, 1 store address, 2 old value
  logic [31:0] mload [N_INSTR + LS_N]; // value each master load returned

  function automatic logic [31:0] mem_rd(input logic [31:0] a);
    if (a >= REM_BASE) return rem[(a - REM_BASE) >> 2];
    return priv[(a - PRIV_BASE) >> 2];
  endfunction

  int unsigned m_i, s_i, cycle;
  int unsigned rid [4];                 // remote cores' current p-XACT ids
  logic [31:0] last_store_addr;
  logic sigf_used, addrf_used, rbin_used, hang_used, hang, ls_bad_used;
  logic s_corrupt, s_use_ld;
  logic [63:0] s_res_base;
  logic resume_seen;
  int unsigned resume_idx;
  int unsigned rbin_core;
  logic ack_expected;
  logic stale_rb_used, stale_ack_expected;  // request for a p-XACT no longer in flight
  int unsigned stale_rb_cycle;
  int unsigned phase;                   // 0 run, 1 I/O requested, 2 lockstep, 3 end
  int unsigned ls_done;
  int unsigned undo_cnt;
  logic undo_busy;
  logic go = 1'b0;                     // environment running (after init)
  // log block read and ack queues
  logic [31:0] lbq_addr [$];
  int unsigned lbq_due [$];
  int unsigned lkq_core [$];
  int unsigned lkq_due [$];
  int unsigned akq_core [$];
  int unsigned akq_due [$];

  assign s_res = ((s_kind == OP_LOAD && s_use_ld) ? {32'd0, s_ld_data} : s_res_base)
                 ^ (s_corrupt ? 64'h8 : 64'h0);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL %s", $time, what);
    end
  endtask

  function automatic int unsigned remote_cons(input int unsigned c);
    return rid[c] - 2;
  endfunction

  // walk the logged entries between two byte addresses backwards and put
  // the old values back (software undo handler)
  task automatic sw_undo(input logic [31:0] from, input logic [31:0] upto);
    int unsigned f, t, w, n;
    f = (from - LOG_BASE) >> 2;
    t = (upto - LOG_BASE) >> 2;
    n = (t + LWORDS - f) % LWORDS;
    w = t;
    while (n > 0) begin
      w = (w + LWORDS - 1) % LWORDS;
      if (logkind[w] == 2'd2) begin
        int unsigned wa;
        logic [31:0] a;
        wa = (w + LWORDS - 1) % LWORDS;
        a  = logmem[wa];
        chk(logkind[wa] == 2'd1 && a >= PRIV_BASE && a < PRIV_BASE + 256,
            "undo: store entry has a valid address word");
        if (a >= PRIV_BASE && a < PRIV_BASE + 256) priv[(a - PRIV_BASE) >> 2] = logmem[w];
        w = wa;
        n -= 2;
      end else begin
        n -= 1;
      end
    end
  endtask

  // ---------------- the environment, one step per clock ----------------
  always @(posedge clk) begin
    if (go) begin
      cycle++;
      // ---- mechanism counters ----
      if (ev.commit)        cnt[0]++;
      if (ev.forced_commit) cnt[1]++;
      if (ev.stall_ctx)     cnt[2]++;
      if (ev.stall_log)     cnt[3]++;
      if (ev.log_wrap)      cnt[4]++;
      if (ev.consolidate)   cnt[5]++;
      if (ev.dep_wait)      cnt[6]++;
      if (ev.lookup)        cnt[7]++;
      if (ev.sig_fault)     cnt[8]++;
      if (ev.addr_fault)    cnt[9]++;
      if (ev.wdt_timeout)   cnt[10]++;
      if (ev.recovery)      cnt[11]++;
      if (ev.local_undo)    cnt[12]++;
      if (ev.rb_sent)       cnt[13]++;
      if (ev.prefetch)      cnt[14]++;
      if (ev.stale_flush)   cnt[15]++;
      if (ev.ls_reissue)    cnt[16]++;
      if (fwd_valid && fwd_hit) cnt[18]++;

      // ---- log writes land in the master's cache ----
      for (int k = 0; k < 2; k++)
        if (lw_valid[k]) begin
          int unsigned w;
          w = (lw_addr[k] - LOG_BASE) >> 2;
          logmem[w]  = lw_data[k];
          logkind[w] = lw_valid[1] ? 2'(k + 1) : 2'd0;
        end

      // ---- master ----
      if (m_valid && !m_stall && !lockstep) begin
        if (m_kind == OP_LOAD) mload[m_i] = m_wdata;
        if (m_kind == OP_STORE) begin
          priv[(m_addr - PRIV_BASE) >> 2] = sdata_of(m_i);
          last_store_addr = m_addr;
        end
        m_i++;
      end

      // ---- slave ----
      if (s_valid && s_ready && !lockstep) begin
        if (s_kind == OP_LOAD)
          chk(s_ld_data == mload[s_i], $sformatf("slave load %0d sees the master's value", s_i));
        if (s_corrupt) sigf_used = 1'b1;
        if (s_kind == OP_STORE && s_addr != addr_of(s_i)) addrf_used = 1'b1;
        s_i++;
      end

      // ---- lockstep pairs ----
      if (lockstep && m_valid && s_valid) begin
        if (ls_commit) begin
          if (m_kind == OP_STORE) priv[(m_addr - PRIV_BASE) >> 2] = sdata_of(m_i);
          m_i++;
          s_i++;
          ls_done++;
        end else begin
          ls_bad_used = 1'b1;
        end
      end

      // ---- recovery bookkeeping ----
      if (resume_valid) begin
        resume_seen = 1'b1;
        resume_idx  = resume_pc >> 2;
        m_i = resume_idx;
        s_i = resume_idx;
      end
      if (restore_valid) begin
        if (resume_seen)
          chk(restore_regs[0] == 64'(resume_idx), $sformatf("checkpoint %0d matches the resume point %0d", restore_regs[0], resume_idx));
        else
          chk(s_i == m_i, "no p-XACT undone: slave had caught up");
        resume_seen = 1'b0;
      end
      if (ev.wdt_timeout) begin
        hang = 1'b0;
        hang_used = 1'b1;
      end

      // ---- software undo handler ----
      undo_done <= 1'b0;
      if (undo_req && !undo_busy) begin
        sw_undo(undo_from, undo_to);
        undo_busy = 1'b1;
        undo_cnt  = 4;
      end else if (undo_busy) begin
        if (undo_cnt == 0) begin
          undo_done <= 1'b1;
          undo_busy = 1'b0;
        end else undo_cnt--;
      end

      // ---- log block reads from the master's cache ----
      lb_resp_valid <= 1'b0;
      if (lb_req_valid && lb_req_ready) begin
        lbq_addr.push_back(lb_req_addr);
        lbq_due.push_back(cycle + LB_LAT);
      end
      if (lbq_due.size() > 0 && lbq_due[0] <= cycle) begin
        logic [LINE_WORDS-1:0][WORD_W-1:0] d;
        int unsigned w0;
        w0 = (lbq_addr[0] - LOG_BASE) >> 2;
        for (int k = 0; k < LINE_WORDS; k++) d[k] = logmem[(w0 + k) % LWORDS];
        lb_resp_data  <= d;
        lb_resp_valid <= 1'b1;
        void'(lbq_addr.pop_front());
        void'(lbq_due.pop_front());
      end

      // ---- remote cores ----
      if (cycle % 150 == 0) for (int c = 1; c < 4; c++) rid[c] = (rid[c] + 1) % 16;
      if ($urandom_range(0, 3) == 0) rem[$urandom_range(0, 15)] = $urandom;
      // look-ups
      lk_resp_valid <= 1'b0;
      if (lk_req_valid && lk_req_ready) begin
        lkq_core.push_back(int'(lk_req_core));
        lkq_due.push_back(cycle + 5);
      end
      if (lkq_due.size() > 0 && lkq_due[0] <= cycle) begin
        lk_resp_valid <= 1'b1;
        lk_resp_core  <= core_t'(lkq_core[0]);
        lk_resp_id    <= pxid_t'(remote_cons(lkq_core[0]));
        void'(lkq_core.pop_front());
        void'(lkq_due.pop_front());
      end
      // rollback requests from the node are acknowledged later
      ack_in_valid <= 1'b0;
      if (rb_out_valid && rb_out_ready) begin
        akq_core.push_back(int'(rb_out_core));
        akq_due.push_back(cycle + 20);
        cnt[19]++;
      end
      if (akq_due.size() > 0 && akq_due[0] <= cycle) begin
        ack_in_valid <= 1'b1;
        ack_in_core  <= core_t'(akq_core[0]);
        void'(akq_core.pop_front());
        void'(akq_due.pop_front());
      end
      if (ack_out_valid && ack_out_ready && ack_out_core == core_t'(rbin_core) && ack_expected) begin
        ack_expected = 1'b0;
        chk(1'b1, "remote rollback requester acknowledged");
      end
      // forward requests and data responses
      fwd_valid <= 1'b0;
      cresp_valid <= 1'b0;
      if (phase == 0 && !rec_busy) begin
        if ($urandom_range(0, 199) == 0 && last_store_addr != 0) begin
          int unsigned c;
          c = $urandom_range(1, 3);
          fwd_valid <= 1'b1;
          fwd_core  <= core_t'(c);
          fwd_id    <= pxid_t'(rid[c]);
          fwd_addr  <= last_store_addr;
        end else if ($urandom_range(0, 149) == 0) begin
          int unsigned c;
          c = $urandom_range(1, 3);
          cresp_valid <= 1'b1;
          cresp_core  <= core_t'(c);
          cresp_prod  <= 1'b1;
          cresp_id    <= pxid_t'(rid[c]);
          cresp_cons  <= '{valid: 1'b1, id: pxid_t'(remote_cons(c))};
        end
      end
      // one rollback request from a remote producer
      rb_in_valid <= 1'b0;
      if (!rbin_used && phase == 0 && m_i >= RBIN_IDX && n_inflight >= 2 && !rec_busy
          && !rb_in_valid) begin
        rbin_used = 1'b1;
        rbin_core = 2;
        ack_expected = 1'b1;
        rb_in_valid <= 1'b1;
        rb_in_core  <= core_t'(rbin_core);
        rb_in_id    <= m_cur_id - pxid_t'(1);
      end

      // a rollback request for a p-XACT that is no longer in flight is
      // acknowledged at once and starts no recovery
      if (stale_ack_expected && ack_out_valid && ack_out_ready && ack_out_core == core_t'(3)) begin
        stale_ack_expected = 1'b0;
        chk(cycle - stale_rb_cycle <= 3, "request for an undone p-XACT acknowledged at once");
      end
      if (stale_ack_expected && !rec_busy) chk(!ev.recovery, "no recovery for an undone p-XACT");
      if (!stale_rb_used && rbin_used && !rec_busy && phase == 0 && !rb_in_valid && !ack_expected) begin
        stale_rb_used = 1'b1;
        stale_ack_expected = 1'b1;
        stale_rb_cycle = cycle;
        rb_in_valid <= 1'b1;
        rb_in_core  <= core_t'(3);
        rb_in_id    <= m_cur_id + pxid_t'(6);
      end

      // ---- phase control ----
      if (phase == 0 && m_i >= N_INSTR && !rec_busy) begin
        phase = 1;
        io_req <= 1'b1;
      end
      if (phase == 1 && lockstep) begin
        phase = 2;
        io_req <= 1'b0;
        cnt[17]++;
      end
      io_done <= 1'b0;
      if (phase == 2 && ls_done == LS_N) begin
        phase = 3;
        io_done <= 1'b1;
      end

      // ---- drive the master for the next cycle ----
      if (phase == 0 && m_i < N_INSTR && $urandom_range(0, 9) != 0) begin
        m_valid <= 1'b1;
      end else if (phase == 2 && lockstep && ls_done < LS_N) begin
        m_valid <= 1'b1;
      end else begin
        m_valid <= 1'b0;
      end
      m_kind <= kind_of(m_i);
      m_pc   <= 32'(m_i) << 2;
      m_addr <= addr_of(m_i);
      begin
        logic [31:0] v;
        v = mem_rd(addr_of(m_i));
        m_wdata <= v;
        case (kind_of(m_i))
          OP_LOAD:  m_res <= {32'd0, v};
          OP_STORE: m_res <= {32'd0, sdata_of(m_i)};
          default:  m_res <= alu_of(m_i);
        endcase
        // ---- drive the slave for the next cycle ----
        if (!hang_used && phase == 0 && s_i >= HANG_IDX) hang = 1'b1;
        s_kind <= kind_of(s_i);
        s_addr <= addr_of(s_i);
        s_corrupt <= 1'b0;
        if (phase == 2 && lockstep && ls_done < LS_N) begin
          s_valid <= 1'b1;
          s_use_ld <= 1'b0;
          case (kind_of(s_i))
            OP_LOAD:  s_res_base <= {32'd0, v};
            OP_STORE: s_res_base <= {32'd0, sdata_of(s_i)};
            default:  s_res_base <= alu_of(s_i);
          endcase
          if (!ls_bad_used && ls_done == LS_BAD) s_corrupt <= 1'b1;
        end else begin
          s_valid  <= !hang && s_i < m_i && !rec_busy && $urandom_range(0, 1) == 0 && phase != 2;
          s_use_ld <= 1'b1;
          s_res_base <= (kind_of(s_i) == OP_STORE) ? {32'd0, sdata_of(s_i)} : alu_of(s_i);
          if (!sigf_used && s_i == SIGF_IDX) s_corrupt <= 1'b1;
          if (!addrf_used && s_i >= ADDRF_IDX && kind_of(s_i) == OP_STORE)
            s_addr <= addr_of(s_i) ^ 32'h4;
        end
      end
      s_arch_regs[0] <= 64'(s_i);
    end
  end

  // ---------------- sequence ----------------
  initial begin
    logic [31:0] gold [64];
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int k = 0; k < 20; k++) cnt[k] = 0;
    for (int k = 0; k < 64; k++) begin
      priv[k] = mix(32'(k) + 32'd100);
      gold[k] = priv[k];
    end
    for (int k = 0; k < 16; k++) rem[k] = mix(32'(k) + 32'd200);
    for (int k = 0; k < int'(LWORDS); k++) begin
      logmem[k] = '0;
      logkind[k] = '0;
    end
    for (int k = 0; k < int'(N_INSTR + LS_N); k++) mload[k] = '0;
    m_i = 0; s_i = 0; cycle = 0;
    for (int c = 0; c < 4; c++) rid[c] = 2;
    last_store_addr = 0;
    sigf_used = 0; addrf_used = 0; rbin_used = 0; hang_used = 0; hang = 0;
    ls_bad_used = 0; s_corrupt = 0; s_use_ld = 1; s_res_base = '0;
    resume_seen = 0; resume_idx = 0; rbin_core = 0; ack_expected = 0;
    stale_rb_used = 0; stale_ack_expected = 0; stale_rb_cycle = 0;
    phase = 0; ls_done = 0; undo_cnt = 0; undo_busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    @(posedge clk);
    go = 1'b1;
    wait (phase == 3);
    repeat (20) @(posedge clk);
    // golden memory: every store of the program applied once, in order
    for (int unsigned i = 0; i < N_INSTR + LS_N; i++)
      if (kind_of(i) == OP_STORE) gold[(addr_of(i) - PRIV_BASE) >> 2] = sdata_of(i);
    for (int k = 0; k < 64; k++)
      chk(priv[k] == gold[k], $sformatf("final memory word %0d", k));
    chk(m_i == N_INSTR + LS_N, "every instruction committed");
    chk(n_inflight == 0, "nothing left in flight");
    chk(!ack_expected && !stale_ack_expected && stale_rb_used, "rollback requesters acknowledged");
    chk(sigf_used && addrf_used && hang_used && ls_bad_used && rbin_used,
        "every fault was injected");
    done = 1'b1;
  end
endmodule
