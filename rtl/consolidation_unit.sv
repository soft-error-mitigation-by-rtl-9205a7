// consolidation_unit -- verification and in-order consolidation.
//
// When the slave finishes a p-XACT (`s_end`) its signature is compared with
// the master's, which takes VERIF_LAT_P cycles. A mismatch is a detected
// fault (`fault`). On a match the p-XACT may only be consolidated once every
// p-XACT it consumed data from (its Consumer register) is consolidated, as
// told by the Consolidated-IDs register (`deps_done`). If a dependence is
// still open the unit sends a look-up request to each producer core in turn
// (`lk_*`) asking for its last consolidated id, and asks again every
// RETRY_P cycles until all dependences are met. Because consolidation
// follows the p-XACT order of each core and the producers of the other cores,
// a faulty value can never be consolidated inside a consumer.
//
// From the description: signature comparison, the 10-cycle verification
// latency, the Consumer/Consolidated-IDs check and the look-up of producers.
// Own choices: one look-up request per cycle, the retry interval.
//
// Timing: with no open dependence `consolidate` pulses VERIF_LAT_P cycles
// after `s_end`. `cancel` (recovery) returns the unit to idle.
module consolidation_unit
  import lbra_pkg::*;
#(
  parameter int unsigned VERIF_LAT_P = lbra_pkg::VERIF_LAT,
  parameter int unsigned RETRY_P     = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cancel,
  input  logic              s_end,
  input  logic [31:0]       s_sig,
  input  logic [31:0]       m_sig,
  input  logic              deps_done,
  input  logic [NCORES-1:0] deps_pending,
  output logic              lk_req_valid,
  output core_t             lk_req_core,
  input  logic              lk_req_ready,
  output logic              consolidate,
  output logic              fault,
  output logic              busy,
  output logic              ev_dep_wait     // one pulse per consolidation that had to wait
);
  typedef enum logic [1:0] {IDLE, VERIFY, DEPS} state_e;
  state_e state;
  localparam int unsigned LW = $clog2(VERIF_LAT_P + 1);
  localparam int unsigned RW = $clog2(RETRY_P + 1);
  logic [LW-1:0] lat;
  logic [RW-1:0] retry;
  logic [31:0]   sig_l;
  logic [NCORES-1:0] asked;
  logic          waited;

  assign busy = (state != IDLE);

  logic verify_done, match;
  assign verify_done = (state == VERIFY) && (lat <= LW'(1));
  assign match       = (sig_l == m_sig);

  // look-up request: lowest pending core not asked yet
  logic [NCORES-1:0] to_ask;
  assign to_ask = deps_pending & ~asked;
  always_comb begin
    lk_req_valid = 1'b0;
    lk_req_core  = '0;
    if (state == DEPS && !deps_done) begin
      for (int c = NCORES - 1; c >= 0; c--) begin
        if (to_ask[c]) begin
          lk_req_valid = 1'b1;
          lk_req_core  = core_t'(c);
        end
      end
    end
  end

  assign consolidate = !cancel && deps_done &&
                       ((state == DEPS) || (verify_done && match));
  assign fault       = !cancel && verify_done && !match;
  assign ev_dep_wait = consolidate && waited;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      lat    <= '0;
      retry  <= '0;
      sig_l  <= '0;
      asked  <= '0;
      waited <= 1'b0;
    end else if (cancel) begin
      state <= IDLE;
    end else begin
      case (state)
        IDLE: if (s_end) begin
          sig_l <= s_sig;
          lat   <= LW'(VERIF_LAT_P);
          state <= VERIFY;
        end
        VERIFY: begin
          lat <= lat - 1'b1;
          if (verify_done) begin
            state  <= (match && !deps_done) ? DEPS : IDLE;
            asked  <= '0;
            retry  <= '0;
            waited <= 1'b0;
          end
        end
        DEPS: begin
          if (deps_done) state <= IDLE;
          else begin
            waited <= 1'b1;
            if (lk_req_valid && lk_req_ready) asked[lk_req_core] <= 1'b1;
            if (to_ask == '0) begin
              if (retry == RW'(RETRY_P - 1)) begin
                retry <= '0;
                asked <= '0;
              end else retry <= retry + 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
