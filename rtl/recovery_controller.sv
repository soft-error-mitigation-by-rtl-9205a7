// recovery_controller -- local and global fault recovery.
//
// Recovery starts on a fault detected in this node (signature mismatch,
// store-address mismatch or watchdog time-out) or on a rollback request
// from another core whose faulty p-XACT this node consumed from. It undoes
// the in-flight p-XACTs of the core one by one, youngest first:
//   * a p-XACT whose Producer register is empty shared nothing, so it is
//     undone locally at once;
//   * a producer first sends a rollback request to every consumer listed in
//     its Producer register and waits for all their acknowledgements, then
//     is undone locally.
// Undoing a p-XACT locally means handing its log range to the software abort
// handler, which writes the logged old values back (`undo_*` handshake), and
// then freeing its context and rewinding the log pointer. When no p-XACT is
// left, the register checkpoint is written back to master and slave
// (`restore`) and execution resumes at the Begin PC of the oldest undone
// p-XACT. A rollback request for one of this node's p-XACTs is acknowledged
// as soon as that p-XACT has been undone, or at once if it is not in flight
// (already undone); requests keep being served while this node itself waits
// for acknowledgements, which is what keeps crossing rollbacks from
// deadlocking.
//
// From the description: youngest-first order, the consumer and producer
// cases, acknowledgements, the software undo, the final checkpoint restore.
// Own choices: one request or acknowledgement sent per cycle, a one-id-per-
// core table of requests waiting for their acknowledgement, and that every
// recovery undoes all in-flight p-XACTs of the core.
module recovery_controller
  import lbra_pkg::*;
#(
  parameter int unsigned NPX_P       = lbra_pkg::NPX,
  parameter int unsigned LOG_WORDS_P = lbra_pkg::LOG_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 local_fault,
  // rollback requests from other cores
  input  logic                 rb_in_valid,
  input  core_t                rb_in_core,
  input  pxid_t                rb_in_id,
  // p-XACT table
  input  logic [NPX_P-1:0]     ctx_valid,
  input  pxid_t [NPX_P-1:0]    ctx_id,
  input  logic                 young_valid,
  input  pxid_t                young_id,
  input  dep_vec_t             young_producer,
  input  logic [$clog2(LOG_WORDS_P)-1:0] young_log_base,
  input  logic [$clog2(LOG_WORDS_P)-1:0] young_m_ptr,
  input  logic [ADDR_W-1:0]    young_begin_pc,
  output logic                 pop_young,
  output logic                 rewind_valid,
  output logic [$clog2(LOG_WORDS_P)-1:0] rewind_ptr,
  // rollback requests to consumers
  output logic                 rb_out_valid,
  output core_t                rb_out_core,
  output pxid_t                rb_out_id,
  input  logic                 rb_out_ready,
  input  logic                 ack_in_valid,
  input  core_t                ack_in_core,
  // acknowledgements to requesters
  output logic                 ack_out_valid,
  output core_t                ack_out_core,
  input  logic                 ack_out_ready,
  // software undo of one p-XACT
  output logic                 undo_req,
  output logic [$clog2(LOG_WORDS_P)-1:0] undo_from,
  output logic [$clog2(LOG_WORDS_P)-1:0] undo_to,
  input  logic                 undo_done,
  // end of recovery
  output logic                 busy,
  output logic                 restore,
  output logic                 resume_valid,
  output logic [ADDR_W-1:0]    resume_pc,
  // event pulses
  output logic                 ev_start,
  output logic                 ev_local_undo,
  output logic                 ev_rb_sent
);
  typedef enum logic [2:0] {IDLE, SEL, SEND, WAITACK, UNDO, RESTORE} state_e;
  state_e state;

  logic [NCORES-1:0] to_send, outstanding, ack_due, pend_v;
  pxid_t [NCORES-1:0] pend_id;
  pxid_t [NCORES-1:0] send_id;
  logic               have_resume;

  // is the requested p-XACT still in flight here?
  logic in_table;
  always_comb begin
    in_table = 1'b0;
    for (int i = 0; i < NPX_P; i++)
      if (ctx_valid[i] && ctx_id[i] == rb_in_id) in_table = 1'b1;
  end

  assign busy = (state != IDLE);

  // ---------------- outputs ----------------
  always_comb begin
    rb_out_valid = 1'b0;
    rb_out_core  = '0;
    rb_out_id    = '0;
    if (state == SEND)
      for (int c = NCORES - 1; c >= 0; c--)
        if (to_send[c]) begin
          rb_out_valid = 1'b1;
          rb_out_core  = core_t'(c);
          rb_out_id    = send_id[c];
        end
  end

  always_comb begin
    ack_out_valid = 1'b0;
    ack_out_core  = '0;
    for (int c = NCORES - 1; c >= 0; c--)
      if (ack_due[c]) begin
        ack_out_valid = 1'b1;
        ack_out_core  = core_t'(c);
      end
  end

  assign undo_req     = (state == UNDO);
  assign undo_from    = young_log_base;
  assign undo_to      = young_m_ptr;
  assign pop_young    = (state == UNDO) && undo_done;
  assign rewind_valid = pop_young;
  assign rewind_ptr   = young_log_base;
  assign restore      = (state == RESTORE);
  assign resume_valid = (state == RESTORE) && have_resume;

  function automatic logic any_dep(dep_vec_t v);
    logic r;
    r = 1'b0;
    for (int c = 0; c < NCORES; c++) r |= v[c].valid;
    return r;
  endfunction

  logic start;
  assign start = (state == IDLE) && (local_fault || (rb_in_valid && in_table));
  assign ev_start      = start;
  assign ev_local_undo = pop_young;
  assign ev_rb_sent    = rb_out_valid && rb_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    logic [NCORES-1:0] due, pv;   // next ack_due / pend_v
    if (!rst_n) begin
      due = '0; pv = '0;
      state       <= IDLE;
      to_send     <= '0;
      outstanding <= '0;
      ack_due     <= '0;
      pend_v      <= '0;
      pend_id     <= '0;
      send_id     <= '0;
      have_resume <= 1'b0;
      resume_pc   <= '0;
    end else begin
      due = ack_due;
      pv  = pend_v;

      // acknowledgement leaving
      if (ack_out_valid && ack_out_ready) due[ack_out_core] = 1'b0;

      // p-XACT undone: acknowledge the requests that were waiting for it
      if (pop_young)
        for (int c = 0; c < NCORES; c++)
          if (pv[c] && pend_id[c] == young_id) begin
            pv[c]  = 1'b0;
            due[c] = 1'b1;
          end

      // incoming rollback request
      if (rb_in_valid) begin
        if (in_table && !(pop_young && rb_in_id == young_id)) begin
          if (!pv[rb_in_core] || id_le(rb_in_id, pend_id[rb_in_core]))
            pend_id[rb_in_core] <= rb_in_id;
          pv[rb_in_core] = 1'b1;
        end else begin
          due[rb_in_core] = 1'b1;
        end
      end

      // acknowledgements arriving for our own requests
      if (ack_in_valid) outstanding[ack_in_core] <= 1'b0;

      case (state)
        IDLE: if (start) begin
          state       <= SEL;
          have_resume <= 1'b0;
        end
        SEL: begin
          if (!young_valid) state <= RESTORE;
          else if (any_dep(young_producer)) begin
            for (int c = 0; c < NCORES; c++) begin
              to_send[c]     <= young_producer[c].valid;
              outstanding[c] <= young_producer[c].valid &&
                                !(ack_in_valid && ack_in_core == core_t'(c));
              send_id[c]     <= young_producer[c].id;
            end
            state <= SEND;
          end else state <= UNDO;
        end
        SEND: begin
          if (rb_out_valid && rb_out_ready) to_send[rb_out_core] <= 1'b0;
          if (to_send == '0 || (to_send == (NCORES'(1) << rb_out_core) && rb_out_ready))
            state <= WAITACK;
        end
        WAITACK: begin
          if (outstanding == '0 ||
              (ack_in_valid && outstanding == (NCORES'(1) << ack_in_core)))
            state <= UNDO;
        end
        UNDO: if (undo_done) begin
          resume_pc   <= young_begin_pc;
          have_resume <= 1'b1;
          state       <= SEL;
        end
        RESTORE: begin
          // nothing left in flight: whatever still waits is acknowledged
          for (int c = 0; c < NCORES; c++) if (pv[c]) begin
            pv[c]  = 1'b0;
            due[c] = 1'b1;
          end
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase

      ack_due <= due;
      pend_v  <= pv;
    end
  end

  a_send_only_when_sending: assert property (@(posedge clk) disable iff (!rst_n)
    rb_out_valid |-> (state == SEND));
endmodule
