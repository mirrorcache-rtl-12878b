// Tree pseudo-LRU replacement state of the mirror cache.
//
// Block replacement in the mirror cache uses an ordinary policy; this design uses a
// binary-tree pseudo-LRU with WAYS - 1 bits per set (3 bits for 4 ways). Node n has
// children 2n+1 and 2n+2; a node bit of 0 sends the victim search to the left child.
// Touching a way sets every node on its path to point away from it. `vic_way` is
// combinational for `vic_set`; a touch takes effect at the next clock edge. State resets
// to all zeros, so the first victim of a set is way 0. The document allows LRU or
// pseudo-LRU; the tree form is this design's choice. WAYS must be a power of two.
module mc_plru #(
  parameter int unsigned SETS = 128,
  parameter int unsigned WAYS = mc_pkg::DEF_WAYS,
  localparam int unsigned SW = $clog2(SETS),
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned NB = (WAYS > 1) ? WAYS - 1 : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          touch_valid,
  input  logic [SW-1:0] touch_set,
  input  logic [WW-1:0] touch_way,
  input  logic [SW-1:0] vic_set,
  output logic [WW-1:0] vic_way
);
  logic [NB-1:0] bits [SETS];
  logic [NB-1:0] next_bits;

  // Bits of the touched set after pointing its path away from the touched way.
  always_comb begin
    int unsigned n;
    logic dir;
    next_bits = bits[touch_set];
    n = 0;
    for (int l = WW - 1; l >= 0; l--) begin
      dir = touch_way[l];
      next_bits[n] = ~dir;
      n = 2 * n + 1 + int'(dir);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) bits[s] <= '0;
    end else if (touch_valid) begin
      bits[touch_set] <= next_bits;
    end
  end

  always_comb begin
    int unsigned n;
    logic dir;
    n = 0;
    vic_way = '0;
    for (int l = WW - 1; l >= 0; l--) begin
      dir = bits[vic_set][n];
      vic_way[l] = dir;
      n = 2 * n + 1 + int'(dir);
    end
  end

endmodule
