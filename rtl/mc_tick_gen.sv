// Refresh-counter clock of the mirror cache.
//
// Every block's refresh counter advances once per counter clock period C = R / P, where R
// is the retention time and P = S - 1 for an S-state counter. This module produces that
// clock as a one-cycle enable pulse derived from the core clock: a down-counter reloads
// with PERIOD - 1 and pulses `tick` in the cycle it reaches zero, so ticks are exactly
// PERIOD core cycles apart and the first tick comes PERIOD cycles after reset.
// The formula for C is the document's; generating it as an enable from the core clock,
// rather than as a separate clock, is this design's choice. The default period is
// 200000 / 3 = 66666 cycles (100 us retention at 2 GHz, rounded down so a block is never
// refreshed later than the formula asks).
module mc_tick_gen #(
  parameter int unsigned PERIOD = mc_pkg::DEF_RETENTION_CYCLES / mc_pkg::CNT_P
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= CW'(PERIOD - 1);
    end else if (count == '0) begin
      count <= CW'(PERIOD - 1);
    end else begin
      count <= count - 1'b1;
    end
  end

  assign tick = (count == '0);

endmodule
