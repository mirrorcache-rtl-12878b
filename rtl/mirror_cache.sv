// Mirror cache: relaxed-retention STTRAM L1 data cache with in-cache refresh.
//
// A relaxed-retention STTRAM cell writes faster and with less energy than a full-retention
// one but forgets its data after the retention time R (100 us by default). Blocks that
// must stay longer are refreshed. Instead of copying them through an external refresh
// buffer, this cache has a data store twice the logical size, made of a main segment and
// an equal auxiliary segment, and refreshes a block by copying it to the other segment.
// A status bit per block says which segment is live; the tag array keeps the 32 KB
// logical geometry (128 sets x 4 ways x 64 B lines).
//
// This top wires the cache controller (tags, replacement, status array, refresh counters
// and counter clock inside) to the two segments, the read/refresh mux that selects the
// segment read in the previous cycle, and the refresh demux that steers refresh writes to
// the other segment and CPU writes and refills to the main segment.
//
// Interfaces: a CPU word request channel (valid/ready, store with byte enables, one
// outstanding request, response pulse `cpu_resp_valid`), and a lower-level line channel
// (read request valid/ready, read data returned with `mem_rd_resp_valid`, write-back
// valid/ready). Latencies at the defaults: load hit 1 cycle after acceptance, store
// hit 3 cycles after its segment write is issued (WRITE_LAT), refresh of one block 1
// read cycle + 1 capture cycle + WRITE_LAT write cycles.
module mirror_cache #(
  parameter int unsigned CACHE_BYTES      = mc_pkg::DEF_CACHE_BYTES,
  parameter int unsigned LINE_BYTES       = mc_pkg::DEF_LINE_BYTES,
  parameter int unsigned WAYS             = mc_pkg::DEF_WAYS,
  parameter int unsigned ADDR_W           = mc_pkg::DEF_ADDR_W,
  parameter int unsigned WORD_W           = mc_pkg::DEF_WORD_W,
  parameter int unsigned RETENTION_CYCLES = mc_pkg::DEF_RETENTION_CYCLES,
  parameter int unsigned WRITE_LAT        = mc_pkg::DEF_WRITE_LAT,
  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned WB     = WORD_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [WORD_W-1:0] cpu_req_wdata,
  input  logic [WB-1:0]     cpu_req_be,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  output logic              mem_rd_valid,
  input  logic              mem_rd_ready,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_resp_valid,
  input  logic [LINE_W-1:0] mem_rd_resp_data,
  output logic              mem_wr_valid,
  input  logic              mem_wr_ready,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [LINE_W-1:0] mem_wr_data
);
  import mc_pkg::*;

  localparam int unsigned IW = $clog2(LINES);

  logic              rd_valid;
  seg_e              rd_seg, rd_sel, ref_src;
  logic [IW-1:0]     rd_idx, cpu_wr_idx, ref_wr_idx;
  logic [LINE_W-1:0] line_rdata, cpu_wr_data, ref_wr_data;
  logic [LINE_BYTES-1:0] cpu_wr_mask;
  logic              cpu_wr_valid, ref_wr_valid;
  logic              main_ready, aux_ready;

  logic              main_en, main_we, aux_en, aux_we;
  logic [IW-1:0]     main_idx, aux_idx;
  logic [LINE_W-1:0] main_wdata, aux_wdata, main_rdata, aux_rdata;
  logic [LINE_BYTES-1:0] main_wmask, aux_wmask;

  mc_controller #(
    .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .WAYS(WAYS),
    .ADDR_W(ADDR_W), .WORD_W(WORD_W), .RETENTION_CYCLES(RETENTION_CYCLES)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_we, .cpu_req_addr, .cpu_req_wdata, .cpu_req_be,
    .cpu_resp_valid, .cpu_resp_rdata,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rd_resp_valid, .mem_rd_resp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .rd_valid, .rd_seg, .rd_idx, .rd_sel, .line_rdata,
    .cpu_wr_valid, .cpu_wr_idx, .cpu_wr_data, .cpu_wr_mask,
    .ref_wr_valid, .ref_wr_idx, .ref_src, .ref_wr_data,
    .main_ready, .aux_ready
  );

  mc_refresh_demux #(.LINES(LINES), .LINE_W(LINE_W)) u_demux (
    .cpu_wr_valid, .cpu_wr_idx, .cpu_wr_data, .cpu_wr_mask,
    .ref_wr_valid, .ref_wr_idx, .ref_src, .ref_wr_data,
    .rd_valid, .rd_seg, .rd_idx,
    .main_en, .main_we, .main_idx, .main_wdata, .main_wmask,
    .aux_en, .aux_we, .aux_idx, .aux_wdata, .aux_wmask
  );

  mc_segment #(.LINES(LINES), .LINE_W(LINE_W), .WRITE_LAT(WRITE_LAT)) u_main (
    .clk, .rst_n, .en(main_en), .we(main_we), .idx(main_idx), .wdata(main_wdata),
    .wmask(main_wmask), .rdata(main_rdata), .ready(main_ready)
  );

  mc_segment #(.LINES(LINES), .LINE_W(LINE_W), .WRITE_LAT(WRITE_LAT)) u_aux (
    .clk, .rst_n, .en(aux_en), .we(aux_we), .idx(aux_idx), .wdata(aux_wdata),
    .wmask(aux_wmask), .rdata(aux_rdata), .ready(aux_ready)
  );

  mc_read_refresh_mux #(.LINE_W(LINE_W)) u_mux (
    .sel(rd_sel), .main_rdata, .aux_rdata, .rdata(line_rdata)
  );

endmodule
