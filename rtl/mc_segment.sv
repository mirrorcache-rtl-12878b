// One data segment of the mirror cache (main or auxiliary).
//
// The mirror cache has two segments of identical organisation, each the size of the
// logical cache (512 lines of 64 B for 32 KB). This module is one of them: a single-port
// array of relaxed-retention STTRAM lines. A read (`en` with `we` low) returns the line
// in `rdata` one cycle later (the 1-cycle hit latency of the STTRAM cache). A write
// (`en` with `we` high) stores the bytes selected by `wmask` and then holds the port
// busy for WRITE_LAT cycles in all (3 for the 100 us retention cell, 4, 5 and 7 for
// 1 ms, 10 ms and 100 ms); `ready` is low while a write is in progress and no access may
// be issued then. The new data is stored at the first edge; only the port occupancy
// models the long STTRAM write. Loss of data after the retention time is a property of
// the cell and is not modelled here. Latencies are the document's; the single port,
// byte mask and registered read are this design's.
module mc_segment #(
  parameter int unsigned LINES     = mc_pkg::DEF_CACHE_BYTES / mc_pkg::DEF_LINE_BYTES,
  parameter int unsigned LINE_W    = mc_pkg::DEF_LINE_BYTES * 8,
  parameter int unsigned WRITE_LAT = mc_pkg::DEF_WRITE_LAT,
  localparam int unsigned IW = $clog2(LINES),
  localparam int unsigned NBYTES = LINE_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              we,
  input  logic [IW-1:0]     idx,
  input  logic [LINE_W-1:0] wdata,
  input  logic [NBYTES-1:0] wmask,
  output logic [LINE_W-1:0] rdata,
  output logic              ready
);
  localparam int unsigned BW = (WRITE_LAT > 1) ? $clog2(WRITE_LAT) : 1;

  logic [LINE_W-1:0] mem [LINES];
  logic [BW-1:0]     busy_cnt;

  always_ff @(posedge clk) begin
    if (en && ready) begin
      if (we) begin
        for (int b = 0; b < NBYTES; b++)
          if (wmask[b]) mem[idx][b*8 +: 8] <= wdata[b*8 +: 8];
      end else begin
        rdata <= mem[idx];
      end
    end
  end

  // Remaining busy cycles of the write in progress.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt <= '0;
    end else if (en && we && ready) begin
      busy_cnt <= BW'(WRITE_LAT - 1);
    end else if (busy_cnt != '0) begin
      busy_cnt <= busy_cnt - 1'b1;
    end
  end

  assign ready = (busy_cnt == '0);

  a_no_access_while_busy: assert property (@(posedge clk) disable iff (!rst_n) en |-> ready)
    else $error("segment accessed while a write is in progress");

endmodule
