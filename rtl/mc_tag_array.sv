// Tag array of the mirror cache.
//
// The tag array keeps the geometry of the 32 KB logical cache (128 sets of 4 ways for
// 64 B lines) even though the data store is twice that size: which of the two segments
// holds a block is recorded in the separate status array, so the tag comparison is the
// same as in an ordinary cache. Each entry holds a tag, a valid bit and a dirty bit.
//
// Lookup is combinational: for `lk_set` and `lk_tag` it returns hit, the hit way, and
// every way's valid, dirty and tag bits (used to pick and write back a victim). A write
// (`wr_valid`) installs a tag as valid with the given dirty bit; `dirty_valid` marks an
// existing entry dirty. Both take effect at the next clock edge. `valid_vec` gives the
// valid bit of every block, indexed set * WAYS + way, for the refresh counters. Entries
// reset to invalid. Keeping the tags at the logical size is the document's; the entry
// fields and ports are this design's (write-back, write-allocate cache).
module mc_tag_array #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = mc_pkg::DEF_WAYS,
  parameter int unsigned TAG_W = 19,
  localparam int unsigned SW = $clog2(SETS),
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [SW-1:0]               lk_set,
  input  logic [TAG_W-1:0]            lk_tag,
  output logic                        lk_hit,
  output logic [WW-1:0]               lk_way,
  output logic [WAYS-1:0]             lk_valid,
  output logic [WAYS-1:0]             lk_dirty,
  output logic [WAYS-1:0][TAG_W-1:0]  lk_tags,
  input  logic                        wr_valid,
  input  logic [SW-1:0]               wr_set,
  input  logic [WW-1:0]               wr_way,
  input  logic [TAG_W-1:0]            wr_tag,
  input  logic                        wr_dirty,
  input  logic                        dirty_valid,
  input  logic [SW-1:0]               dirty_set,
  input  logic [WW-1:0]               dirty_way,
  output logic [SETS*WAYS-1:0]        valid_vec
);
  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  dirty [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
      end
    end else begin
      if (dirty_valid) dirty[dirty_set][dirty_way] <= 1'b1;
      if (wr_valid) begin
        valid[wr_set][wr_way] <= 1'b1;
        dirty[wr_set][wr_way] <= wr_dirty;
      end
    end
  end

  // Tags carry no reset; a tag is only compared while its valid bit is set.
  always_ff @(posedge clk) begin
    if (wr_valid) tags[wr_set][wr_way] <= wr_tag;
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      lk_valid[w] = valid[lk_set][w];
      lk_dirty[w] = dirty[lk_set][w];
      lk_tags[w]  = tags[lk_set][w];
      if (valid[lk_set][w] && tags[lk_set][w] == lk_tag && !lk_hit) begin
        lk_hit = 1'b1;
        lk_way = WW'(w);
      end
    end
  end

  always_comb begin
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++)
        valid_vec[s*WAYS + w] = valid[s][w];
  end

endmodule
