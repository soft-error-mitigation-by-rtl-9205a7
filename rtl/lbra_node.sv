// lbra_node -- LBRA hardware of one redundant master/slave pair (top).
//
// LBRA (Log-Based Redundant Architecture) detects and recovers from soft
// errors by running every thread twice. The master runs ahead, grouping its
// instructions into p-XACTs, logging load values and store address/old
// value pairs into a circular log in its cache, and hashing its results into
// a CRC-32 verification signature. The slave, on another core, re-executes
// each committed p-XACT with its loads served from the log through a small
// prefetching log buffer, and compares signatures. Matching p-XACTs are
// consolidated in order, after every p-XACT they consumed data from has been
// consolidated; a mismatch starts a recovery that undoes the core's p-XACTs
// youngest first and asks the consumers of shared data to roll back too.
//
// This module wires one node: p-XACT table (contexts, signatures,
// Producer/Consumer registers), circular log, slave unit, log buffer,
// consolidation unit, Consolidated-IDs register, recovery controller,
// watchdog, register checkpoint and the lockstep checker used around I/O.
// The pipelines of the two threads, the caches, the coherence protocol and
// the on-chip network are outside it: their side of every exchange is a port.
//
// Interfaces (all single-cycle, valid/ready where a ready exists):
//   master commit stream  m_*   one instruction per cycle, held while m_stall
//   log writes            lw_*  to the master's L1
//   slave commit stream   s_*   valid/ready; loads get s_ld_data
//   log block reads       lb_*  non-coherent block reads from the master cache
//   forward requests      fwd_* answered combinationally (fwd_hit, fwd_prod_id)
//   data responses        cresp_* producer p-XACT and its last consolidated id
//   look-ups              lk_*  last consolidated id of a producer core
//   rollback / ack        rb_*, ack_*
//   software undo         undo_* log range of the p-XACT to undo
//   checkpoint            s_arch_regs in, restore_* / resume_* out
//   I/O                   io_req / io_done, lockstep compare results
// The coherence message formats and all handshakes are this design's own;
// what is exchanged follows the description. So are the log size, the
// watchdog limit, and the moments the register checkpoint is taken (every
// consolidation, `init`, and the end of lockstep mode). Lint reports rst_n
// as used both asynchronously and synchronously: the synchronous use is the
// `disable iff` of the handshake assertions in the sub-blocks.
module lbra_node
  import lbra_pkg::*;
#(
  parameter int unsigned NPX_P        = lbra_pkg::NPX,
  parameter int unsigned PXACT_SIZE_P = lbra_pkg::PXACT_SIZE,
  parameter int unsigned SIG_BITS_P   = lbra_pkg::SIG_BITS,
  parameter int unsigned LOG_WORDS_P  = lbra_pkg::LOG_WORDS,
  parameter int unsigned LOGBUF_P     = lbra_pkg::LOGBUF_ENTRIES,
  parameter int unsigned VERIF_LAT_P  = lbra_pkg::VERIF_LAT,
  parameter int unsigned WDT_LIMIT_P  = 100_000,
  parameter int unsigned NREGS_P      = 32,
  parameter int unsigned XLEN_P       = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  core_t                my_core,
  input  logic [ADDR_W-1:0]    cfg_log_base,
  // master commit stream
  input  logic                 m_valid,
  input  op_kind_e             m_kind,
  input  logic [ADDR_W-1:0]    m_pc,
  input  logic [ADDR_W-1:0]    m_addr,
  input  logic [WORD_W-1:0]    m_wdata,    // loaded value, or old value for a store
  input  logic [RES_W-1:0]     m_res,
  output logic                 m_stall,
  output pxid_t                m_cur_id,
  // log writes
  output logic [1:0]           lw_valid,
  output logic [1:0][ADDR_W-1:0] lw_addr,
  output logic [1:0][WORD_W-1:0] lw_data,
  // slave commit stream
  input  logic                 s_valid,
  input  op_kind_e             s_kind,
  input  logic [ADDR_W-1:0]    s_addr,
  input  logic [RES_W-1:0]     s_res,
  output logic                 s_ready,
  output logic [WORD_W-1:0]    s_ld_data,
  // log block reads
  output logic                 lb_req_valid,
  output logic [ADDR_W-1:0]    lb_req_addr,
  input  logic                 lb_req_ready,
  input  logic                 lb_resp_valid,
  input  logic [LINE_WORDS-1:0][WORD_W-1:0] lb_resp_data,
  // forward requests from other cores
  input  logic                 fwd_valid,
  input  core_t                fwd_core,
  input  pxid_t                fwd_id,
  input  logic [ADDR_W-1:0]    fwd_addr,
  output logic                 fwd_hit,
  output pxid_t                fwd_prod_id,
  output logic                 fwd_rd_hit,
  output dep_t                 my_cons,     // last consolidated id, sent with responses
  // data responses produced by remote p-XACTs
  input  logic                 cresp_valid,
  input  core_t                cresp_core,
  input  logic                 cresp_prod,  // the block came from an in-flight p-XACT
  input  pxid_t                cresp_id,
  input  dep_t                 cresp_cons,  // producer's last consolidated id
  // look-ups
  output logic                 lk_req_valid,
  output core_t                lk_req_core,
  input  logic                 lk_req_ready,
  input  logic                 lk_resp_valid,
  input  core_t                lk_resp_core,
  input  pxid_t                lk_resp_id,
  // rollback requests and acknowledgements
  input  logic                 rb_in_valid,
  input  core_t                rb_in_core,
  input  pxid_t                rb_in_id,
  output logic                 rb_out_valid,
  output core_t                rb_out_core,
  output pxid_t                rb_out_id,
  input  logic                 rb_out_ready,
  input  logic                 ack_in_valid,
  input  core_t                ack_in_core,
  output logic                 ack_out_valid,
  output core_t                ack_out_core,
  input  logic                 ack_out_ready,
  // software undo
  output logic                 undo_req,
  output logic [ADDR_W-1:0]    undo_from,
  output logic [ADDR_W-1:0]    undo_to,
  input  logic                 undo_done,
  // checkpoint
  input  logic [NREGS_P-1:0][XLEN_P-1:0] s_arch_regs,
  output logic                 restore_valid,
  output logic [NREGS_P-1:0][XLEN_P-1:0] restore_regs,
  output logic                 resume_valid,
  output logic [ADDR_W-1:0]    resume_pc,
  output logic                 rec_busy,
  // I/O and lockstep
  input  logic                 io_req,
  input  logic                 io_done,
  output logic                 lockstep,
  output logic                 ls_commit,
  // status
  output logic [$clog2(NPX_P+1)-1:0] n_inflight,
  output lbra_events_t         ev
);
  localparam int unsigned OW = $clog2(LOG_WORDS_P);
  typedef logic [OW-1:0] off_t;

  // ---------------- wires ----------------
  off_t log_ptr, log_tail, commit_ptr;
  logic log_full, log_wrapped;
  logic [OW:0] log_used;
  logic m_accept, drain, tbl_hold;
  logic tail_valid, tail_committed;
  pxid_t tail_id;
  off_t tail_log_base, tail_m_ptr, tail_s_ptr;
  logic [15:0] tail_icnt;
  logic [31:0] tail_vsig;
  dep_vec_t tail_consumer, young_producer;
  logic s_ptr_valid;
  off_t s_ptr_val;
  logic consolidate;
  logic young_valid;
  pxid_t young_id;
  logic [ADDR_W-1:0] young_begin_pc;
  off_t young_log_base, young_m_ptr;
  logic pop_young;
  logic [NPX_P-1:0] ctx_valid;
  pxid_t [NPX_P-1:0] ctx_id;
  logic cur_open;
  logic ev_commit, ev_forced, ev_stall_ctx;
  logic rd_valid, rd_two, rd_hit;
  off_t rd_off;
  logic [1:0][WORD_W-1:0] rd_data;
  logic s_end, addr_fault;
  logic [31:0] s_sig;
  logic cons_fault, cons_busy, ev_dep_wait;
  logic deps_done;
  logic [NCORES-1:0] deps_pending;
  dep_vec_t cons_ids;
  logic wdt_timeout;
  logic rewind_valid;
  off_t rewind_ptr, undo_from_off, undo_to_off;
  logic rec_restore, ev_rec_start, ev_local_undo, ev_rb_sent;
  logic ls_reissue, lb_prefetch, lb_stale;
  logic local_fault;
  logic tbl_m_valid;

  // ---------------- lockstep / I/O ----------------
  lockstep_checker u_ls (
    .clk, .rst_n, .io_req, .io_done,
    .all_consolidated(n_inflight == '0 && !cons_busy),
    .m_valid, .m_res, .s_valid, .s_res,
    .drain, .lockstep, .commit_ok(ls_commit), .reissue(ls_reissue)
  );

  // ---------------- p-XACT table ----------------
  logic tbl_stall;
  assign tbl_hold    = rec_busy || lockstep;
  assign tbl_m_valid = m_valid && !lockstep;
  assign m_stall     = lockstep ? !(m_valid && s_valid) : tbl_stall;

  pxact_table #(
    .NPX_P(NPX_P), .PXACT_SIZE_P(PXACT_SIZE_P), .SIG_BITS_P(SIG_BITS_P),
    .LOG_WORDS_P(LOG_WORDS_P)
  ) u_tbl (
    .clk, .rst_n, .init,
    .m_valid(tbl_m_valid), .m_kind, .m_pc, .m_addr, .m_res,
    .m_stall(tbl_stall), .m_accept,
    .log_ptr, .log_full, .commit_ptr,
    .drain, .hold(tbl_hold),
    .fwd_valid, .fwd_core, .fwd_id, .fwd_addr, .fwd_hit, .fwd_prod_id, .fwd_rd_hit,
    .cresp_valid(cresp_valid && cresp_prod), .cresp_core, .cresp_id,
    .tail_valid, .tail_committed, .tail_id, .tail_log_base, .tail_m_ptr, .tail_s_ptr,
    .tail_icnt, .tail_vsig, .tail_consumer,
    .s_ptr_valid, .s_ptr_val, .consolidate,
    .young_valid, .young_id, .young_begin_pc, .young_log_base, .young_m_ptr,
    .young_producer, .pop_young, .ctx_valid, .ctx_id, .n_inflight,
    .cur_open, .cur_id(m_cur_id),
    .ev_commit, .ev_forced_commit(ev_forced), .ev_stall_ctx
  );

  // ---------------- circular log ----------------
  circular_log #(.LOG_WORDS_P(LOG_WORDS_P)) u_log (
    .clk, .rst_n, .cfg_base(cfg_log_base), .init,
    .wr_valid(m_accept && (m_kind != OP_ALU)), .wr_store(m_kind == OP_STORE),
    .wr_addr(m_addr), .wr_data(m_wdata),
    .lw_valid, .lw_addr, .lw_data,
    .release_valid(consolidate), .release_ptr(tail_m_ptr),
    .rewind_valid, .rewind_ptr,
    .ptr(log_ptr), .tail(log_tail), .used(log_used), .full(log_full),
    .wrapped(log_wrapped)
  );

  // ---------------- slave ----------------
  slave_unit #(.LOG_WORDS_P(LOG_WORDS_P)) u_slave (
    .clk, .rst_n, .restart(init || rec_busy), .enable(!rec_busy && !lockstep),
    .tail_valid, .tail_committed, .tail_icnt, .tail_s_ptr,
    .s_ptr_valid, .s_ptr_val,
    .s_valid, .s_kind, .s_addr, .s_res, .s_ready, .s_ld_data,
    .rd_valid, .rd_off, .rd_two, .rd_hit, .rd_data,
    .s_end, .s_sig, .addr_fault, .cons_done(consolidate)
  );

  log_buffer #(.NE(LOGBUF_P), .LOG_WORDS_P(LOG_WORDS_P)) u_lbuf (
    .clk, .rst_n, .cfg_base(cfg_log_base), .flush(init || rec_busy),
    .slave_ptr(tail_valid ? tail_s_ptr : log_tail), .commit_ptr,
    .rd_valid, .rd_off, .rd_two, .rd_hit, .rd_data,
    .req_valid(lb_req_valid), .req_addr(lb_req_addr), .req_prefetch(lb_prefetch),
    .req_ready(lb_req_ready), .resp_valid(lb_resp_valid), .resp_data(lb_resp_data),
    .stale_flush(lb_stale)
  );

  // ---------------- consolidation ----------------
  consolidation_unit #(.VERIF_LAT_P(VERIF_LAT_P)) u_cons (
    .clk, .rst_n, .cancel(rec_busy),
    .s_end, .s_sig, .m_sig(tail_vsig),
    .deps_done, .deps_pending,
    .lk_req_valid, .lk_req_core, .lk_req_ready,
    .consolidate, .fault(cons_fault), .busy(cons_busy), .ev_dep_wait
  );

  consolidated_ids u_cids (
    .clk, .rst_n, .init,
    .upd_valid({lk_resp_valid, cresp_valid && cresp_cons.valid}),
    .upd_core({lk_resp_core, cresp_core}),
    .upd_id({lk_resp_id, cresp_cons.id}),
    .own_valid(consolidate), .own_core(my_core), .own_id(tail_id),
    .query(tail_consumer), .all_done(deps_done), .pending(deps_pending),
    .ids(cons_ids)
  );
  assign my_cons = cons_ids[my_core];

  // ---------------- fault handling ----------------
  watchdog_timer #(.LIMIT(WDT_LIMIT_P)) u_wdt (
    .clk, .rst_n, .active(n_inflight != '0 && !rec_busy && !lockstep),
    .progress(consolidate), .timeout(wdt_timeout)
  );

  assign local_fault = cons_fault || addr_fault || wdt_timeout;

  recovery_controller #(.NPX_P(NPX_P), .LOG_WORDS_P(LOG_WORDS_P)) u_rec (
    .clk, .rst_n, .local_fault,
    .rb_in_valid, .rb_in_core, .rb_in_id,
    .ctx_valid, .ctx_id, .young_valid, .young_id, .young_producer,
    .young_log_base, .young_m_ptr, .young_begin_pc,
    .pop_young, .rewind_valid, .rewind_ptr,
    .rb_out_valid, .rb_out_core, .rb_out_id, .rb_out_ready,
    .ack_in_valid, .ack_in_core, .ack_out_valid, .ack_out_core, .ack_out_ready,
    .undo_req, .undo_from(undo_from_off), .undo_to(undo_to_off), .undo_done,
    .busy(rec_busy), .restore(rec_restore), .resume_valid, .resume_pc,
    .ev_start(ev_rec_start), .ev_local_undo, .ev_rb_sent
  );
  assign undo_from = cfg_log_base + (ADDR_W'(undo_from_off) << 2);
  assign undo_to   = cfg_log_base + (ADDR_W'(undo_to_off) << 2);

  checkpoint_regs #(.NREGS(NREGS_P), .XLEN(XLEN_P)) u_ckpt (
    .clk, .rst_n, .capture(consolidate || init || (lockstep && io_done)), .cap_regs(s_arch_regs),
    .restore(rec_restore), .rst_valid(restore_valid), .rst_regs(restore_regs)
  );

  // ---------------- events ----------------
  always_comb begin
    ev = '0;
    ev.commit        = ev_commit;
    ev.forced_commit = ev_forced;
    ev.stall_ctx     = ev_stall_ctx;
    ev.stall_log     = m_valid && log_full && !tbl_hold && !drain;
    ev.log_wrap      = log_wrapped;
    ev.consolidate   = consolidate;
    ev.dep_wait      = ev_dep_wait;
    ev.lookup        = lk_req_valid && lk_req_ready;
    ev.sig_fault     = cons_fault;
    ev.addr_fault    = addr_fault;
    ev.wdt_timeout   = wdt_timeout;
    ev.recovery      = ev_rec_start;
    ev.local_undo    = ev_local_undo;
    ev.rb_sent       = ev_rb_sent;
    ev.prefetch      = lb_req_valid && lb_req_ready && lb_prefetch;
    ev.stale_flush   = lb_stale;
    ev.ls_reissue    = ls_reissue;
  end

  // unused status
  logic unused_ok;
  assign unused_ok = ^{log_used, cur_open, tail_log_base};
endmodule
