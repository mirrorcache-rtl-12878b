// Read/refresh multiplexer of the mirror cache.
//
// Both segments' read data meet in this multiplexer. Its output is both the line returned
// towards the CPU (and towards write-back) and the line fed back to the refresh
// demultiplexer when a block is copied to the other segment. `sel` is the segment that
// was read in the previous cycle, that is the status bit of the block registered
// alongside the read, because segment read data arrives one cycle after the read. It is
// purely combinational. The mux and its place in the datapath are the document's.
module mc_read_refresh_mux #(
  parameter int unsigned LINE_W = mc_pkg::DEF_LINE_BYTES * 8
) (
  input  mc_pkg::seg_e      sel,
  input  logic [LINE_W-1:0] main_rdata,
  input  logic [LINE_W-1:0] aux_rdata,
  output logic [LINE_W-1:0] rdata
);
  assign rdata = (sel == mc_pkg::SEG_AUX) ? aux_rdata : main_rdata;
endmodule
