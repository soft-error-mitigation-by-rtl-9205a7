// watchdog_timer -- forward-progress watchdog.
//
// If the slave thread is hit by a soft error that makes it hang, its p-XACT
// is never consolidated and the master would eventually stall for ever. This
// timer counts the cycles during which p-XACTs are in flight (`active`)
// without any consolidation (`progress`) and raises `timeout` for one cycle
// after LIMIT such cycles, which starts the recovery mechanism. The watchdog
// itself is from the description; its limit is not given and the default
// here is this implementation's choice. The count restarts on progress, when
// nothing is in flight, and after a timeout.
module watchdog_timer #(
  parameter int unsigned LIMIT = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic active,
  input  logic progress,
  output logic timeout
);
  localparam int unsigned CW = $clog2(LIMIT + 1);
  logic [CW-1:0] cnt;

  assign timeout = active && !progress && (cnt == CW'(LIMIT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt <= '0;
    else if (!active || progress || timeout) cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end
endmodule
