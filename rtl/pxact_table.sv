// pxact_table -- in-flight p-XACT contexts and the master's p-XACT lifecycle.
//
// The master thread's instructions are grouped into pseudo-transactions
// (p-XACTs). Up to NPX_P of them may be in flight: the youngest is being
// executed by the master, the older ones are committed and wait for the
// slave to verify and consolidate them, oldest first. Each has a small
// context (as in the per-p-XACT hardware of the design): log base, Begin PC,
// master and slave log pointers, read and write signatures, the master's
// verification signature, and the Producer and Consumer registers.
//
// Master side. A p-XACT is opened at the first instruction the master
// commits when none is open; its log base is the current master log
// pointer. Every result is hashed into the verification signature; loads
// and stores add their block address to the read or write signature. The
// p-XACT commits when it holds PXACT_SIZE_P memory instructions, or when it
// is forced to (cycle avoidance, below) or drained before an I/O event. The
// master stalls (`m_stall`) when it needs a new context and all are in use,
// when the log is full, and during recovery.
//
// Dependence tracking. A forward request from another core (`fwd_*`) is
// checked against the write signatures of all in-flight p-XACTs; the
// youngest that hits becomes a producer and records the requesting core and
// p-XACT in its Producer register, and the answer carries this p-XACT's id
// (`fwd_hit`, `fwd_prod_id`). A data response that was produced by a remote
// p-XACT (`cresp_*`) is recorded in the Consumer register of the open
// p-XACT. To keep the dependence graph acyclic a p-XACT is never producer
// and consumer at once: an open producer that is about to consume is
// committed first and the dependence goes to the next p-XACT; an open
// consumer that is asked for data is committed and the dependence is
// recorded in (and answered with the id of) the next p-XACT.
//
// All of the above is from the description. Own choices: p-XACT ids are a
// 4-bit sequence number; a context counts instructions so that the slave
// can find the same boundary; a Producer/Consumer entry keeps one id per
// core (the first one for a producer, the newest for a consumer); the
// forward-request answer is combinational and the registers update at the
// next edge.
//
// Slave/consolidation side: the oldest context is shown on `tail_*`; the
// slave advances its pointer with `s_ptr_*`; `consolidate` frees it.
// Recovery side: the youngest context is shown on `young_*`; `pop_young`
// frees it and rewinds the id counter.
module pxact_table
  import lbra_pkg::*;
#(
  parameter int unsigned NPX_P        = lbra_pkg::NPX,
  parameter int unsigned PXACT_SIZE_P = lbra_pkg::PXACT_SIZE,
  parameter int unsigned SIG_BITS_P   = lbra_pkg::SIG_BITS,
  parameter int unsigned LOG_WORDS_P  = lbra_pkg::LOG_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  // master commit stream
  input  logic                 m_valid,
  input  op_kind_e             m_kind,
  input  logic [ADDR_W-1:0]    m_pc,
  input  logic [ADDR_W-1:0]    m_addr,
  input  logic [RES_W-1:0]     m_res,
  output logic                 m_stall,
  output logic                 m_accept,     // instruction is taken into a p-XACT
  // circular log
  input  logic [$clog2(LOG_WORDS_P)-1:0] log_ptr,
  input  logic                 log_full,
  output logic [$clog2(LOG_WORDS_P)-1:0] commit_ptr, // end of the youngest committed p-XACT
  // mode control
  input  logic                 drain,
  input  logic                 hold,         // recovery in progress / lockstep
  // forward requests from other cores
  input  logic                 fwd_valid,
  input  core_t                fwd_core,
  input  pxid_t                fwd_id,
  input  logic [ADDR_W-1:0]    fwd_addr,
  output logic                 fwd_hit,
  output pxid_t                fwd_prod_id,
  output logic                 fwd_rd_hit,
  // data responses produced by remote p-XACTs
  input  logic                 cresp_valid,
  input  core_t                cresp_core,
  input  pxid_t                cresp_id,
  // oldest context (slave / consolidation)
  output logic                 tail_valid,
  output logic                 tail_committed,
  output pxid_t                tail_id,
  output logic [$clog2(LOG_WORDS_P)-1:0] tail_log_base,
  output logic [$clog2(LOG_WORDS_P)-1:0] tail_m_ptr,
  output logic [$clog2(LOG_WORDS_P)-1:0] tail_s_ptr,
  output logic [15:0]          tail_icnt,
  output logic [31:0]          tail_vsig,
  output dep_vec_t             tail_consumer,
  input  logic                 s_ptr_valid,
  input  logic [$clog2(LOG_WORDS_P)-1:0] s_ptr_val,
  input  logic                 consolidate,
  // youngest context (recovery)
  output logic                 young_valid,
  output pxid_t                young_id,
  output logic [ADDR_W-1:0]    young_begin_pc,
  output logic [$clog2(LOG_WORDS_P)-1:0] young_log_base,
  output logic [$clog2(LOG_WORDS_P)-1:0] young_m_ptr,
  output dep_vec_t             young_producer,
  input  logic                 pop_young,
  output logic [NPX_P-1:0]     ctx_valid,
  output pxid_t [NPX_P-1:0]    ctx_id,
  output logic [$clog2(NPX_P+1)-1:0] n_inflight,
  output logic                 cur_open,
  output pxid_t                cur_id,       // p-XACT the master is executing (or opens next)
  // event pulses
  output logic                 ev_commit,
  output logic                 ev_forced_commit,
  output logic                 ev_stall_ctx
);
  localparam int unsigned OW = $clog2(LOG_WORDS_P);
  localparam int unsigned PW = (NPX_P > 1) ? $clog2(NPX_P) : 1;
  localparam int unsigned CW = $clog2(NPX_P + 1);
  typedef logic [OW-1:0] off_t;
  typedef logic [PW-1:0] slot_t;

  typedef struct packed {
    logic               valid;
    logic               committed;
    pxid_t              id;
    off_t               log_base;
    off_t               m_ptr;
    off_t               s_ptr;
    logic [ADDR_W-1:0]  begin_pc;
    logic [31:0]        vsig;
    logic [15:0]        mcnt;     // memory instructions
    logic [15:0]        icnt;     // all instructions
    dep_vec_t           producer;
    dep_vec_t           consumer;
  } ctx_t;

  ctx_t [NPX_P-1:0] ctx;
  slot_t            head, tail;   // head: next slot to open; tail: oldest
  logic [CW-1:0]    count;
  pxid_t            next_id;
  dep_vec_t         pend_cons, pend_prod;

  function automatic slot_t nxt(slot_t s);
    return (s == slot_t'(NPX_P - 1)) ? '0 : s + 1'b1;
  endfunction
  function automatic slot_t prv(slot_t s);
    return (s == '0) ? slot_t'(NPX_P - 1) : s - 1'b1;
  endfunction

  slot_t young;
  assign young = prv(head);

  // ---------------- open p-XACT state ----------------
  logic  open_now;      // a p-XACT is open (executing) in slot `young`
  assign open_now = (count != 0) && ctx[young].valid && !ctx[young].committed;
  assign cur_open = open_now;
  assign cur_id   = open_now ? ctx[young].id : next_id;

  logic is_mem;
  assign is_mem = (m_kind == OP_LOAD) || (m_kind == OP_STORE);

  logic need_new;       // this instruction would have to open a p-XACT
  assign need_new = !open_now;
  logic ctx_free;
  assign ctx_free = (count < CW'(NPX_P));

  assign m_stall  = hold || log_full || drain || (need_new && !ctx_free);
  assign m_accept = m_valid && !m_stall;

  // master verification signature
  logic [31:0] msig, msig_next;
  crc32_sig #(.DATA_W(RES_W)) u_msig (
    .clk, .rst_n, .clear(m_accept && need_new), .valid(m_accept), .data(m_res),
    .sig(msig), .sig_next(msig_next)
  );

  // ---------------- signatures per context ----------------
  logic [NPX_P-1:0] wsig_hit, rsig_hit, sig_clear, wsig_ins, rsig_ins;
  slot_t ins_slot;
  assign ins_slot = need_new ? head : young;

  for (genvar g = 0; g < NPX_P; g++) begin : g_sig
    assign wsig_ins[g] = m_accept && (m_kind == OP_STORE) && (ins_slot == slot_t'(g));
    assign rsig_ins[g] = m_accept && (m_kind == OP_LOAD)  && (ins_slot == slot_t'(g));
    dbs_signature #(.SIG_BITS(SIG_BITS_P)) u_wsig (
      .clk, .rst_n, .clear(sig_clear[g]), .insert(wsig_ins[g]), .ins_addr(m_addr),
      .test_addr(fwd_addr), .hit(wsig_hit[g])
    );
    dbs_signature #(.SIG_BITS(SIG_BITS_P)) u_rsig (
      .clk, .rst_n, .clear(sig_clear[g]), .insert(rsig_ins[g]), .ins_addr(m_addr),
      .test_addr(fwd_addr), .hit(rsig_hit[g])
    );
  end

  // ---------------- forward requests ----------------
  logic  fwd_found;
  slot_t fwd_slot;
  always_comb begin
    slot_t s;
    fwd_found = 1'b0;
    fwd_slot  = '0;
    fwd_rd_hit = 1'b0;
    // scan from the youngest towards the oldest
    s = young;
    for (int k = 0; k < NPX_P; k++) begin
      if (k < int'(count) && ctx[s].valid) begin
        if (!fwd_found && wsig_hit[s]) begin
          fwd_found = 1'b1;
          fwd_slot  = s;
        end
        if (rsig_hit[s]) fwd_rd_hit = 1'b1;
      end
      s = prv(s);
    end
  end

  function automatic logic dep_any(dep_vec_t v);
    logic r;
    r = 1'b0;
    for (int c = 0; c < NCORES; c++) r |= v[c].valid;
    return r;
  endfunction

  // forced commits (cycle avoidance)
  logic force_fwd, force_resp;
  assign force_fwd  = fwd_valid && fwd_found && open_now && (fwd_slot == young) &&
                      dep_any(ctx[young].consumer);
  assign force_resp = cresp_valid && open_now && dep_any(ctx[young].producer);

  assign fwd_hit     = fwd_valid && fwd_found;
  // a forced commit hands the dependence to the next p-XACT
  assign fwd_prod_id = force_fwd ? next_id : ctx[fwd_slot].id;

  // ---------------- commit decision ----------------
  logic [15:0] mcnt_after;
  assign mcnt_after = (need_new ? 16'd0 : ctx[young].mcnt) + (is_mem ? 16'd1 : 16'd0);

  logic size_commit, do_commit;
  slot_t commit_slot;
  assign size_commit = m_accept && is_mem && (mcnt_after >= 16'(PXACT_SIZE_P));
  // the open p-XACT (possibly opened by this very instruction) commits when:
  logic will_be_open;
  assign will_be_open = open_now || (m_accept && need_new);
  assign do_commit    = will_be_open && (size_commit || force_fwd || force_resp ||
                        (drain && open_now));
  assign commit_slot  = open_now ? young : head;

  assign ev_commit        = do_commit;
  assign ev_forced_commit = will_be_open && (force_fwd || force_resp) && !size_commit;
  assign ev_stall_ctx     = m_valid && need_new && !ctx_free && !hold && !drain && !log_full;

  // ---------------- outputs ----------------
  assign tail_valid     = (count != 0) && ctx[tail].valid;
  assign tail_committed = ctx[tail].committed;
  assign tail_id        = ctx[tail].id;
  assign tail_log_base  = ctx[tail].log_base;
  assign tail_m_ptr     = ctx[tail].m_ptr;
  assign tail_s_ptr     = ctx[tail].s_ptr;
  assign tail_icnt      = ctx[tail].icnt;
  assign tail_vsig      = ctx[tail].vsig;
  assign tail_consumer  = ctx[tail].consumer;

  assign young_valid    = (count != 0);
  assign young_id       = ctx[young].id;
  assign young_begin_pc = ctx[young].begin_pc;
  assign young_log_base = ctx[young].log_base;
  assign young_m_ptr    = open_now ? log_ptr : ctx[young].m_ptr;
  assign young_producer = ctx[young].producer;
  assign n_inflight     = count;

  always_comb begin
    for (int i = 0; i < NPX_P; i++) begin
      ctx_valid[i] = ctx[i].valid;
      ctx_id[i]    = ctx[i].id;
    end
  end

  // youngest committed end pointer
  off_t last_commit_ptr;
  assign commit_ptr = last_commit_ptr;

  // signature clears: when a slot is freed
  always_comb begin
    sig_clear = '0;
    if (consolidate && tail_valid) sig_clear[tail] = 1'b1;
    if (pop_young && young_valid)  sig_clear[young] = 1'b1;
    if (init) sig_clear = '1;
  end

  // ---------------- state update ----------------
  off_t log_ptr_after;
  assign log_ptr_after = log_ptr + ((m_kind == OP_STORE) ? off_t'(2) :
                                    (m_kind == OP_LOAD)  ? off_t'(1) : off_t'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    // next-state temporaries (count, head, tail, next id, slot)
    logic [CW-1:0] c;
    slot_t h, t, s;
    pxid_t nid;
    if (!rst_n) begin
      c = '0; h = '0; t = '0; s = '0; nid = '0;
      ctx  <= '0;
      head <= '0;
      tail <= '0;
      count <= '0;
      next_id <= '0;
      pend_cons <= '0;
      pend_prod <= '0;
      last_commit_ptr <= '0;
    end else if (init) begin
      c = '0; h = '0; t = '0; s = '0; nid = '0;
      ctx  <= '0;
      head <= '0;
      tail <= '0;
      count <= '0;
      next_id <= '0;
      pend_cons <= '0;
      pend_prod <= '0;
      last_commit_ptr <= log_ptr;
    end else begin
      c = count; h = head; t = tail; nid = next_id;

      // -------- master: open / update / commit --------
      if (m_accept) begin
        if (need_new) begin
          s = head;
          ctx[s].valid     <= 1'b1;
          ctx[s].committed <= 1'b0;
          ctx[s].id        <= nid;
          ctx[s].log_base  <= log_ptr;
          ctx[s].s_ptr     <= log_ptr;
          ctx[s].begin_pc  <= m_pc;
          ctx[s].producer  <= pend_prod;
          ctx[s].consumer  <= pend_cons;
          ctx[s].mcnt      <= is_mem ? 16'd1 : 16'd0;
          ctx[s].icnt      <= 16'd1;
          pend_cons <= '0;
          pend_prod <= '0;
              nid = nid + 1'b1;
          h = nxt(h);
          c = c + 1'b1;
        end else begin
          s = young;
          ctx[s].mcnt <= mcnt_after;
          ctx[s].icnt <= ctx[s].icnt + 16'd1;
        end
        ctx[s].m_ptr <= log_ptr_after;
        ctx[s].vsig  <= msig_next;
      end
      if (do_commit) begin
        ctx[commit_slot].committed <= 1'b1;
        if (!m_accept) ctx[commit_slot].vsig <= msig;
        if (!m_accept) ctx[commit_slot].m_ptr <= log_ptr;
        last_commit_ptr <= m_accept ? log_ptr_after : log_ptr;
      end

      // -------- forward request: producer register --------
      if (fwd_valid && fwd_found) begin
        if (force_fwd) begin
          pend_prod[fwd_core].valid <= 1'b1;
          pend_prod[fwd_core].id    <= fwd_id;
        end else if (!ctx[fwd_slot].producer[fwd_core].valid) begin
          ctx[fwd_slot].producer[fwd_core].valid <= 1'b1;
          ctx[fwd_slot].producer[fwd_core].id    <= fwd_id;
        end
      end

      // -------- data response: consumer register --------
      if (cresp_valid) begin
        if (open_now && !force_resp && !do_commit) begin
          if (!ctx[young].consumer[cresp_core].valid ||
              id_le(ctx[young].consumer[cresp_core].id, cresp_id)) begin
            ctx[young].consumer[cresp_core].valid <= 1'b1;
            ctx[young].consumer[cresp_core].id    <= cresp_id;
          end
        end else if (!pend_cons[cresp_core].valid ||
                     id_le(pend_cons[cresp_core].id, cresp_id)) begin
          pend_cons[cresp_core].valid <= 1'b1;
          pend_cons[cresp_core].id    <= cresp_id;
        end
      end

      // -------- slave pointer --------
      if (s_ptr_valid && tail_valid) ctx[tail].s_ptr <= s_ptr_val;

      // -------- consolidation frees the oldest --------
      if (consolidate && tail_valid) begin
        ctx[tail].valid <= 1'b0;
        t = nxt(t);
        c = c - 1'b1;
      end

      // -------- recovery frees the youngest --------
      if (pop_young && young_valid) begin
        ctx[young].valid <= 1'b0;
        h = prv(h);
        c = c - 1'b1;
        nid = ctx[young].id;
        last_commit_ptr <= ctx[young].log_base;
        pend_cons <= '0;
        pend_prod <= '0;
        end

      head <= h; tail <= t; count <= c; next_id <= nid;
    end
  end

  // ---------------- rules ----------------
  a_no_open_on_stall: assert property (@(posedge clk) disable iff (!rst_n)
    (count <= CW'(NPX_P)));
  a_no_pop_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    pop_young |-> !m_accept);
endmodule
