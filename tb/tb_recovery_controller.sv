// tb_recovery_controller -- self-checking test of local and global recovery.
// The testbench models the p-XACT table (a list of contexts, youngest
// last), the software undo handler (answers after a few cycles) and the
// other cores (acknowledge rollback requests after a delay). Scenario 1,
// after Fig.-4 style: a local fault with four p-XACTs, the oldest a producer
// for cores 1 and 3; p3, p2, p1 must be undone locally in that order, then
// rollback requests go to cores 1 and 3, p0 is undone only after both
// acknowledgements, and the checkpoint is restored. Meanwhile core 1 asks to
// roll back p3 (already undone: acknowledged at once) and core 5 asks for p0
// (acknowledged only when p0 is undone). Scenario 2: a rollback request from
// another core for p2 starts a recovery; it is acknowledged when p2 is
// undone and the recovery goes on down to the oldest p-XACT.
module tb_recovery_controller;
  import lbra_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0, local_fault = 0;
  logic rb_in_valid = 0; core_t rb_in_core; pxid_t rb_in_id;
  logic [NP-1:0] ctx_valid; pxid_t [NP-1:0] ctx_id;
  logic young_valid; pxid_t young_id; dep_vec_t young_producer;
  logic [9:0] young_log_base, young_m_ptr, rewind_ptr, undo_from, undo_to;
  logic [31:0] young_begin_pc, resume_pc;
  logic pop_young, rewind_valid;
  logic rb_out_valid, rb_out_ready = 1; core_t rb_out_core; pxid_t rb_out_id;
  logic ack_in_valid = 0; core_t ack_in_core;
  logic ack_out_valid, ack_out_ready = 1; core_t ack_out_core;
  logic undo_req, undo_done = 0, busy, restore, resume_valid;
  logic ev_start, ev_local_undo, ev_rb_sent;
  int checks = 0, failures = 0;

  recovery_controller #(.NPX_P(NP), .LOG_WORDS_P(1024)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int id; dep_vec_t prod; int base; int mptr; int pc; } ctx_m;
  ctx_m ctxs [$];
  int popped [$];
  int acks_to [$];
  int rb_to [$];
  int restores = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // table model
  always_comb begin
    ctx_valid = '0; ctx_id = '0;
    foreach (ctxs[i]) begin ctx_valid[i] = 1; ctx_id[i] = pxid_t'(ctxs[i].id); end
    young_valid = ctxs.size() > 0;
    young_id = '0; young_producer = '0; young_log_base = '0; young_m_ptr = '0; young_begin_pc = '0;
    if (young_valid) begin
      young_id       = pxid_t'(ctxs[$].id);
      young_producer = ctxs[$].prod;
      young_log_base = 10'(ctxs[$].base);
      young_m_ptr    = 10'(ctxs[$].mptr);
      young_begin_pc = ctxs[$].pc;
    end
  end

  // undo handler: answers 3 cycles after the request
  int undo_wait = 0;
  always @(posedge clk) begin
    if (pop_young) begin
      checks++;
      if (undo_from != young_log_base || undo_to != young_m_ptr || rewind_ptr != young_log_base) begin
        failures++; $display("FAIL undo range");
      end
      popped.push_back(ctxs[$].id);
      void'(ctxs.pop_back());
    end
    if (rst_n && ack_out_valid && ack_out_ready) acks_to.push_back(ack_out_core);
    if (rst_n && rb_out_valid && rb_out_ready) rb_to.push_back(rb_out_core * 100 + rb_out_id);
    if (restore) restores++;
  end
  always @(negedge clk) begin
    undo_done = 0;
    if (undo_req) begin
      undo_wait++;
      if (undo_wait == 3) begin undo_done = 1; undo_wait = 0; end
    end
  end

  function automatic dep_vec_t deps(int c0, int i0, int c1, int i1);
    dep_vec_t v;
    v = '0;
    if (c0 >= 0) begin v[c0].valid = 1; v[c0].id = pxid_t'(i0); end
    if (c1 >= 0) begin v[c1].valid = 1; v[c1].id = pxid_t'(i1); end
    return v;
  endfunction

  task automatic fill(int first_id);
    ctxs.delete();
    for (int i = 0; i < 4; i++) begin
      ctx_m c;
      c.id = first_id + i; c.prod = '0; c.base = 100 * i; c.mptr = 100 * i + 37; c.pc = 'h400 + 16 * i;
      ctxs.push_back(c);
    end
  endtask

  task automatic send_rb(int core, int id);
    @(negedge clk); rb_in_valid = 1; rb_in_core = core_t'(core); rb_in_id = pxid_t'(id);
    @(negedge clk); rb_in_valid = 0;
  endtask

  task automatic send_ack(int core);
    @(negedge clk); ack_in_valid = 1; ack_in_core = core_t'(core);
    @(negedge clk); ack_in_valid = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rb_in_core = 0; rb_in_id = 0; ack_in_core = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- scenario 1 ----------------
    fill(0);
    ctxs[0].prod = deps(1, 2, 3, 0);
    @(negedge clk); local_fault = 1; @(negedge clk); local_fault = 0;
    wait (rb_to.size() == 2);
    check("p3,p2,p1 undone first", popped.size(), 3);
    check("order p3", popped[0], 3); check("order p2", popped[1], 2); check("order p1", popped[2], 1);
    check("rollback to core 1 for its p2", rb_to[0], 102);
    check("rollback to core 3 for its p0", rb_to[1], 300);
    send_rb(1, 3);               // p3 already undone: acknowledged at once
    repeat (2) @(negedge clk);
    check("immediate ack to core 1", acks_to.size() == 1 && acks_to[0] == 1, 1);
    send_rb(5, 0);               // p0 still in flight: wait
    send_ack(3);
    repeat (10) @(negedge clk);
    check("p0 waits for the second ack", popped.size(), 3);
    check("core 5 not yet acknowledged", acks_to.size(), 1);
    send_ack(1);
    wait (!busy);
    repeat (3) @(negedge clk);
    check("p0 undone last", popped.size() == 4 && popped[3] == 0, 1);
    check("core 5 acknowledged after p0", acks_to.size() == 2 && acks_to[1] == 5, 1);
    check("checkpoint restored once", restores, 1);
    check("resume at Begin PC of p0", resume_pc, 'h400);
    // ---------------- scenario 2 ----------------
    popped.delete(); acks_to.delete(); rb_to.delete(); restores = 0;
    fill(6);
    send_rb(2, 8);
    wait (!busy);
    repeat (3) @(negedge clk);
    check("all four undone", popped.size(), 4);
    check("youngest first", popped[0], 9);
    check("oldest last", popped[3], 6);
    check("requester acknowledged", acks_to.size() == 1 && acks_to[0] == 2, 1);
    check("no rollback requests", rb_to.size(), 0);
    check("restored", restores, 1);
    // a request for a p-XACT that is not in flight is acknowledged, no recovery
    send_rb(4, 3);
    repeat (3) @(negedge clk);
    check("stray request acknowledged", acks_to.size() == 2 && acks_to[1] == 4, 1);
    check("no recovery started", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
