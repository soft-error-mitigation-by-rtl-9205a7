// slave_unit -- slave-thread side of a master/slave pair.
//
// The slave re-executes each committed p-XACT of the master. Its memory
// instructions never touch memory: the address of every load and store is
// replaced by the Slave Log Pointer of the p-XACT being checked, a load takes
// the value the master logged, and a store reads back the logged address and
// old value (the slave's stores are already visible through the master). The
// logged store address is compared with the address the slave computed; a
// difference is reported at once (`addr_fault`). Every slave result is hashed
// into the slave's own CRC-32 signature. After as many instructions as the
// master put into the p-XACT, the slave raises `s_end` with its signature and
// waits (`s_ready` low) until the consolidation unit has dealt with it.
//
// From the description: the redirection of loads and stores through the
// slave log pointer, the pointer advancing entry by entry, the per-p-XACT
// slave signature, and the log content of loads and stores. Own choices: the
// slave only starts a p-XACT that the master has committed; p-XACT ends are
// found by instruction count; the store address check is done as soon as
// the entry is read.
//
// Timing: `s_valid/s_ready` is a valid/ready handshake per instruction; a
// memory instruction is accepted in the cycle its log word(s) hit in the log
// buffer, with `s_ld_data` valid in that cycle.
module slave_unit
  import lbra_pkg::*;
#(
  parameter int unsigned LOG_WORDS_P = lbra_pkg::LOG_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic                 enable,
  // oldest p-XACT context
  input  logic                 tail_valid,
  input  logic                 tail_committed,
  input  logic [15:0]          tail_icnt,
  input  logic [$clog2(LOG_WORDS_P)-1:0] tail_s_ptr,
  output logic                 s_ptr_valid,
  output logic [$clog2(LOG_WORDS_P)-1:0] s_ptr_val,
  // slave commit stream
  input  logic                 s_valid,
  input  op_kind_e             s_kind,
  input  logic [ADDR_W-1:0]    s_addr,
  input  logic [RES_W-1:0]     s_res,
  output logic                 s_ready,
  output logic [WORD_W-1:0]    s_ld_data,
  // log buffer read port
  output logic                 rd_valid,
  output logic [$clog2(LOG_WORDS_P)-1:0] rd_off,
  output logic                 rd_two,
  input  logic                 rd_hit,
  input  logic [1:0][WORD_W-1:0] rd_data,
  // to consolidation
  output logic                 s_end,
  output logic [31:0]          s_sig,
  output logic                 addr_fault,
  input  logic                 cons_done
);
  localparam int unsigned OW = $clog2(LOG_WORDS_P);
  typedef enum logic {RUN, WAIT} state_e;
  state_e state;
  logic [15:0] icnt;

  logic run_ok, is_mem, acc;
  assign run_ok = enable && (state == RUN) && tail_valid && tail_committed;
  assign is_mem = (s_kind == OP_LOAD) || (s_kind == OP_STORE);

  assign rd_valid = s_valid && run_ok && is_mem;
  assign rd_off   = tail_s_ptr;
  assign rd_two   = (s_kind == OP_STORE);

  assign s_ready  = run_ok && (!is_mem || rd_hit);
  assign acc      = s_valid && s_ready;
  assign s_ld_data = (s_kind == OP_STORE) ? rd_data[1] : rd_data[0];

  assign s_ptr_valid = acc && is_mem;
  assign s_ptr_val   = tail_s_ptr + ((s_kind == OP_STORE) ? OW'(2) : OW'(1));

  assign addr_fault  = acc && (s_kind == OP_STORE) && (rd_data[0] != s_addr);

  logic [31:0] sig_q, sig_n;
  crc32_sig #(.DATA_W(RES_W)) u_ssig (
    .clk, .rst_n, .clear(acc && icnt == 16'd0), .valid(acc), .data(s_res),
    .sig(sig_q), .sig_next(sig_n)
  );

  assign s_end = acc && (icnt + 16'd1 == tail_icnt);
  assign s_sig = sig_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RUN;
      icnt  <= '0;
    end else if (restart) begin
      state <= RUN;
      icnt  <= '0;
    end else begin
      if (s_end) begin
        state <= WAIT;
        icnt  <= '0;
      end else if (acc) begin
        icnt <= icnt + 16'd1;
      end
      if (state == WAIT && cons_done) state <= RUN;
    end
  end

  // the registered signature is only read through sig_next
  logic unused_sig;
  assign unused_sig = ^sig_q;
endmodule
