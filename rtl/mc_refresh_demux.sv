// Refresh demultiplexer and segment port steering of the mirror cache.
//
// Writes reach the segments from two sources. A CPU store or a refill from the lower
// level always goes to the main segment. A refresh write carries a line read through the
// read/refresh mux and goes to the segment opposite the one the block is in (`ref_src`
// is the block's current status bit). This module routes both onto the two segment
// ports, and places the controller's single read (`rd_*`) on the port of the segment it
// names. It is combinational. The controller never drives two accesses onto one segment
// in a cycle; an assertion checks that. The routing rule is the document's; merging the
// read request into the same steering block is this design's.
module mc_refresh_demux #(
  parameter int unsigned LINES  = mc_pkg::DEF_CACHE_BYTES / mc_pkg::DEF_LINE_BYTES,
  parameter int unsigned LINE_W = mc_pkg::DEF_LINE_BYTES * 8,
  localparam int unsigned IW = $clog2(LINES),
  localparam int unsigned NBYTES = LINE_W / 8
) (
  // CPU store or refill, to the main segment
  input  logic              cpu_wr_valid,
  input  logic [IW-1:0]     cpu_wr_idx,
  input  logic [LINE_W-1:0] cpu_wr_data,
  input  logic [NBYTES-1:0] cpu_wr_mask,
  // refresh write, to the segment other than ref_src
  input  logic              ref_wr_valid,
  input  logic [IW-1:0]     ref_wr_idx,
  input  mc_pkg::seg_e      ref_src,
  input  logic [LINE_W-1:0] ref_wr_data,
  // single line read
  input  logic              rd_valid,
  input  mc_pkg::seg_e      rd_seg,
  input  logic [IW-1:0]     rd_idx,
  // segment ports
  output logic              main_en,
  output logic              main_we,
  output logic [IW-1:0]     main_idx,
  output logic [LINE_W-1:0] main_wdata,
  output logic [NBYTES-1:0] main_wmask,
  output logic              aux_en,
  output logic              aux_we,
  output logic [IW-1:0]     aux_idx,
  output logic [LINE_W-1:0] aux_wdata,
  output logic [NBYTES-1:0] aux_wmask
);
  import mc_pkg::*;

  logic ref_to_main, ref_to_aux, rd_main, rd_aux;

  assign ref_to_main = ref_wr_valid && (ref_src == SEG_AUX);
  assign ref_to_aux  = ref_wr_valid && (ref_src == SEG_MAIN);
  assign rd_main     = rd_valid && (rd_seg == SEG_MAIN);
  assign rd_aux      = rd_valid && (rd_seg == SEG_AUX);

  always_comb begin
    main_en    = cpu_wr_valid || ref_to_main || rd_main;
    main_we    = cpu_wr_valid || ref_to_main;
    main_idx   = rd_idx;
    main_wdata = cpu_wr_data;
    main_wmask = cpu_wr_mask;
    if (cpu_wr_valid) begin
      main_idx = cpu_wr_idx;
    end else if (ref_to_main) begin
      main_idx   = ref_wr_idx;
      main_wdata = ref_wr_data;
      main_wmask = '1;
    end

    aux_en    = ref_to_aux || rd_aux;
    aux_we    = ref_to_aux;
    aux_idx   = ref_to_aux ? ref_wr_idx : rd_idx;
    aux_wdata = ref_wr_data;
    aux_wmask = '1;
  end

  // At most one access per segment per cycle.
  always_comb begin
    a_main_one_user: assert ((int'(cpu_wr_valid) + int'(ref_to_main) + int'(rd_main)) <= 1)
      else $error("two accesses steered to the main segment");
    a_aux_one_user: assert ((int'(ref_to_aux) + int'(rd_aux)) <= 1)
      else $error("two accesses steered to the auxiliary segment");
  end

endmodule
