// Per-block refresh counters of the mirror cache.
//
// Each logical block has a four-state counter FSM (2 bits per block) that measures how
// long the block's data has been held in its current segment. Writing the block (a CPU
// store, a refill or the completion of a refresh) puts its counter back to state 0. On
// every counter-clock tick each enabled counter below state P = 3 advances by one. A
// counter in state P stays there and raises `pending` for its block until the cache
// controller refreshes it. A counter is enabled while its block is valid, so empty
// frames are never refreshed.
//
// Two clear ports exist because a CPU write and a finishing refresh of different blocks
// can complete in the same cycle; a clear wins over a tick in the same cycle. Counters
// reset to state 0. The FSM size, the clear-on-write rule and the trigger at state P are
// the document's; the two clear ports and the saturating state P are this design's.
module mc_refresh_counters #(
  parameter int unsigned LINES = mc_pkg::DEF_CACHE_BYTES / mc_pkg::DEF_LINE_BYTES,
  localparam int unsigned IW = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,          // counter clock enable, period C
  input  logic [LINES-1:0] enable,        // block valid
  input  logic             clr_a_valid,
  input  logic [IW-1:0]    clr_a_idx,
  input  logic             clr_b_valid,
  input  logic [IW-1:0]    clr_b_idx,
  output logic [LINES-1:0] pending        // counter has reached state P
);
  import mc_pkg::*;

  cnt_state_e state [LINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) state[i] <= CNT_S0;
    end else begin
      for (int i = 0; i < LINES; i++) begin
        if ((clr_a_valid && clr_a_idx == IW'(i)) || (clr_b_valid && clr_b_idx == IW'(i))) begin
          state[i] <= CNT_S0;
        end else if (tick && enable[i]) begin
          unique case (state[i])
            CNT_S0:  state[i] <= CNT_S1;
            CNT_S1:  state[i] <= CNT_S2;
            CNT_S2:  state[i] <= CNT_S3;
            default: state[i] <= CNT_S3;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < LINES; i++) pending[i] = enable[i] && (state[i] == CNT_S3);
  end

endmodule
