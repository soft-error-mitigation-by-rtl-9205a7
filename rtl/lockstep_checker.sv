// lockstep_checker -- I/O synchronisation and lockstep execution mode.
//
// I/O and system calls cannot be undone, so they may only run on a state
// known to be correct. On `io_req` the checker enters DRAIN: the master
// closes its current p-XACT and opens no new one (`drain`) until every
// in-flight p-XACT has been consolidated (`all_consolidated`). It then
// switches to LOCKSTEP, where master and slave execute the same instruction
// in the same cycle and their results are compared: a match commits the
// instruction (`commit_ok`), a mismatch asks for it to be reissued
// (`reissue`). `io_done` returns to the normal decoupled mode. The sequence
// and the compare/reissue rule are from the description; the handshake
// signals are this implementation's own.
module lockstep_checker
  import lbra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              io_req,
  input  logic              io_done,
  input  logic              all_consolidated,
  input  logic              m_valid,
  input  logic [RES_W-1:0]  m_res,
  input  logic              s_valid,
  input  logic [RES_W-1:0]  s_res,
  output logic              drain,
  output logic              lockstep,
  output logic              commit_ok,
  output logic              reissue
);
  typedef enum logic [1:0] {NORMAL, DRAIN, LOCKSTEP} mode_e;
  mode_e mode;

  assign drain     = (mode == DRAIN);
  assign lockstep  = (mode == LOCKSTEP);
  assign commit_ok = lockstep && m_valid && s_valid && (m_res == s_res);
  assign reissue   = lockstep && m_valid && s_valid && (m_res != s_res);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= NORMAL;
    else case (mode)
      NORMAL:   if (io_req) mode <= DRAIN;
      DRAIN:    if (all_consolidated) mode <= LOCKSTEP;
      LOCKSTEP: if (io_done) mode <= NORMAL;
      default:  mode <= NORMAL;
    endcase
  end

  // In lockstep both threads present their instruction in the same cycle.
  a_paired: assert property (@(posedge clk) disable iff (!rst_n)
    lockstep |-> (m_valid == s_valid));
endmodule
