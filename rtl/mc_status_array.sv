// Status array of the mirror cache.
//
// One bit per logical block tells which segment holds the block's live copy: 0 for the
// main segment, 1 for the auxiliary segment (512 bits for the 32 KB cache). The bit is
// cleared when a block is inserted by a CPU write or a refill, since such blocks always
// go to the main segment, and it is inverted when a refresh moves the block to the other
// segment. Two combinational read ports serve the CPU path and the refresh engine.
// Updates take effect at the next clock edge; a clear and an invert of the same block in
// one cycle resolve to the clear. Bits reset to 0. The encoding and the update rules are
// the document's; the port structure and the reset are this design's.
module mc_status_array #(
  parameter int unsigned LINES = mc_pkg::DEF_CACHE_BYTES / mc_pkg::DEF_LINE_BYTES,
  localparam int unsigned IW = $clog2(LINES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] rd_a_idx,
  output mc_pkg::seg_e  rd_a_seg,
  input  logic [IW-1:0] rd_b_idx,
  output mc_pkg::seg_e  rd_b_seg,
  input  logic          clr_valid,    // block inserted into the main segment
  input  logic [IW-1:0] clr_idx,
  input  logic          flip_valid,   // block refreshed into the other segment
  input  logic [IW-1:0] flip_idx
);
  import mc_pkg::*;

  logic [LINES-1:0] status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
    end else begin
      if (flip_valid) status[flip_idx] <= ~status[flip_idx];
      if (clr_valid)  status[clr_idx]  <= 1'b0;
    end
  end

  assign rd_a_seg = seg_e'(status[rd_a_idx]);
  assign rd_b_seg = seg_e'(status[rd_b_idx]);

endmodule
