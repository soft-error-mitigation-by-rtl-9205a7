// checkpoint_regs -- register-file checkpoint.
//
// Keeps a copy of the architectural registers as they were at the start of
// the oldest p-XACT that is not yet consolidated. After a recovery has undone
// every in-flight p-XACT of the core, this copy is written back to both the
// master and the slave contexts. The copy is taken (`capture`) from the
// slave's registers when a p-XACT consolidates, since the slave has then
// just finished exactly that p-XACT, and at thread start. The checkpoint and
// its use in recovery are from the description; the capture source and the
// register count and width (32 x 64 bits) are this implementation's choice.
// `restore` shows the stored copy on `rst_regs` with `rst_valid` one cycle
// later.
module checkpoint_regs #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      capture,
  input  logic [NREGS-1:0][XLEN-1:0] cap_regs,
  input  logic                      restore,
  output logic                      rst_valid,
  output logic [NREGS-1:0][XLEN-1:0] rst_regs
);
  logic [NREGS-1:0][XLEN-1:0] ckpt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ckpt      <= '0;
      rst_valid <= 1'b0;
      rst_regs  <= '0;
    end else begin
      if (capture) ckpt <= cap_regs;
      rst_valid <= restore;
      if (restore) rst_regs <= ckpt;
    end
  end
endmodule
