// Cache controller of the mirror cache.
//
// The controller owns the tag array, the replacement state, the status array, the
// per-block refresh counters and the counter clock, and it sequences every access to the
// two data segments. It runs two machines side by side.
//
// The CPU machine serves one load or store at a time on a valid/ready request channel.
// A load hit is accepted when the segment named by the block's status bit can be read in
// that cycle, and its word is returned one cycle later. A store hit to a block in the
// main segment writes the word in place. A store hit to a block in the auxiliary segment
// reads the line from the auxiliary segment, merges the word and writes the whole line
// to the main segment, because CPU writes and refills always go to the main segment and
// clear the status bit. A miss picks a victim (an invalid way first, otherwise the
// pseudo-LRU way), writes a dirty victim back from whichever segment holds it, requests
// the line from the lower level and writes it, merged with the store data if any, to
// the main segment. Store and miss responses come when the segment write has finished
// (WRITE_LAT cycles after it was issued). Every block write clears the block's counter.
//
// The refresh engine takes the lowest-numbered block whose counter has reached state P,
// reads it through the read/refresh mux from the segment its status bit names, writes it
// to the other segment, and when that write has finished inverts the status bit and
// clears the counter. Until then loads of that block are still served from the old
// segment, so a refresh never stalls a read of the block being refreshed. The refresh
// engine has priority on the single read slot and on the segment ports; a CPU access
// waits while its segment is busy. A block the CPU machine is working on is not picked
// for refresh, and a store or miss on a block that is being refreshed waits until the
// refresh has finished.
//
// The segment organisation, status-bit rules, counter and refresh direction are the
// document's. The request/response channels, write-back write-allocate policy, one
// outstanding request, refresh priority and lowest-index refresh order are this design's.
module mc_controller #(
  parameter int unsigned CACHE_BYTES      = mc_pkg::DEF_CACHE_BYTES,
  parameter int unsigned LINE_BYTES       = mc_pkg::DEF_LINE_BYTES,
  parameter int unsigned WAYS             = mc_pkg::DEF_WAYS,
  parameter int unsigned ADDR_W           = mc_pkg::DEF_ADDR_W,
  parameter int unsigned WORD_W           = mc_pkg::DEF_WORD_W,
  parameter int unsigned RETENTION_CYCLES = mc_pkg::DEF_RETENTION_CYCLES,
  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned SETS   = LINES / WAYS,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned NBYTES = LINE_BYTES,
  localparam int unsigned IW     = $clog2(LINES),
  localparam int unsigned WB     = WORD_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU request / response
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [WORD_W-1:0] cpu_req_wdata,
  input  logic [WB-1:0]     cpu_req_be,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  // lower level: line read
  output logic              mem_rd_valid,
  input  logic              mem_rd_ready,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_resp_valid,
  input  logic [LINE_W-1:0] mem_rd_resp_data,
  // lower level: line write-back
  output logic              mem_wr_valid,
  input  logic              mem_wr_ready,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [LINE_W-1:0] mem_wr_data,
  // datapath: single read through the read/refresh mux
  output logic              rd_valid,
  output mc_pkg::seg_e      rd_seg,
  output logic [IW-1:0]     rd_idx,
  output mc_pkg::seg_e      rd_sel,       // segment read in the previous cycle
  input  logic [LINE_W-1:0] line_rdata,   // read/refresh mux output
  // datapath: CPU store or refill to the main segment
  output logic              cpu_wr_valid,
  output logic [IW-1:0]     cpu_wr_idx,
  output logic [LINE_W-1:0] cpu_wr_data,
  output logic [NBYTES-1:0] cpu_wr_mask,
  // datapath: refresh write to the other segment
  output logic              ref_wr_valid,
  output logic [IW-1:0]     ref_wr_idx,
  output mc_pkg::seg_e      ref_src,
  output logic [LINE_W-1:0] ref_wr_data,
  input  logic              main_ready,
  input  logic              aux_ready
);
  import mc_pkg::*;

  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned SW    = $clog2(SETS);
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = ADDR_W - SW - OFF_W;
  localparam int unsigned BOFF  = $clog2(WB);
  localparam int unsigned WPL   = LINE_W / WORD_W;
  localparam int unsigned WIW   = (WPL > 1) ? $clog2(WPL) : 1;

  // ---------------------------------------------------------------- helpers
  function automatic logic [SW-1:0] set_of(logic [ADDR_W-1:0] a);
    return a[OFF_W +: SW];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic logic [WIW-1:0] word_of(logic [ADDR_W-1:0] a);
    return WIW'(a[OFF_W-1:BOFF]);
  endfunction
  function automatic logic [IW-1:0] line_of(logic [SW-1:0] s, logic [WW-1:0] w);
    return IW'({s, w});
  endfunction
  // Line with the enabled bytes of one word replaced.
  function automatic logic [LINE_W-1:0] merge(logic [LINE_W-1:0] line, logic [WIW-1:0] wi,
                                              logic [WORD_W-1:0] d, logic [WB-1:0] be);
    logic [LINE_W-1:0] r;
    r = line;
    for (int b = 0; b < WB; b++)
      if (be[b]) r[int'(wi)*WORD_W + b*8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  cpu_state_e        cst;
  ref_state_e        rst_q;
  logic [ADDR_W-1:0] req_addr;
  logic              req_we;
  logic [WORD_W-1:0] req_wdata;
  logic [WB-1:0]     req_be;
  logic [WW-1:0]     req_way;
  logic [LINE_W-1:0] line_buf;
  logic [ADDR_W-1:0] wb_addr;
  logic [WIW-1:0]    resp_wi;
  logic [WORD_W-1:0] resp_word;
  logic [IW-1:0]     ref_idx;
  seg_e              ref_seg;
  logic [LINE_W-1:0] ref_buf;
  seg_e              rd_sel_q;

  // ---------------------------------------------------------------- submodules
  logic [SW-1:0]             lk_set;
  logic [TAG_W-1:0]          lk_tag;
  logic                      lk_hit;
  logic [WW-1:0]             lk_way;
  logic [WAYS-1:0]           lk_valid, lk_dirty;
  logic [WAYS-1:0][TAG_W-1:0] lk_tags;
  logic                      tag_wr, dirty_wr;
  logic [LINES-1:0]          valid_vec;
  logic [WW-1:0]             plru_way;
  logic                      touch;
  logic [WW-1:0]             touch_way;
  logic [IW-1:0]             st_a_idx;
  seg_e                      st_a_seg, st_b_seg;
  logic                      st_clr, st_flip;
  logic                      cnt_clr_cpu, cnt_clr_ref;
  logic [LINES-1:0]          pending;
  logic                      tick;
  logic                      cpu_lock;
  logic [IW-1:0]             cpu_line;
  logic [IW-1:0]             ref_pick_idx;
  logic                      ref_pick_any;

  mc_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .lk_set, .lk_tag, .lk_hit, .lk_way, .lk_valid, .lk_dirty, .lk_tags,
    .wr_valid(tag_wr), .wr_set(set_of(req_addr)), .wr_way(req_way), .wr_tag(tag_of(req_addr)),
    .wr_dirty(req_we),
    .dirty_valid(dirty_wr), .dirty_set(set_of(req_addr)), .dirty_way(req_way),
    .valid_vec
  );

  mc_plru #(.SETS(SETS), .WAYS(WAYS)) u_plru (
    .clk, .rst_n,
    .touch_valid(touch), .touch_set(lk_set), .touch_way,
    .vic_set(lk_set), .vic_way(plru_way)
  );

  mc_status_array #(.LINES(LINES)) u_status (
    .clk, .rst_n,
    .rd_a_idx(st_a_idx), .rd_a_seg(st_a_seg),
    .rd_b_idx(ref_pick_idx), .rd_b_seg(st_b_seg),
    .clr_valid(st_clr), .clr_idx(line_of(set_of(req_addr), req_way)),
    .flip_valid(st_flip), .flip_idx(ref_idx)
  );

  mc_tick_gen #(.PERIOD(RETENTION_CYCLES / CNT_P)) u_tick (
    .clk, .rst_n, .tick
  );

  mc_refresh_counters #(.LINES(LINES)) u_cnt (
    .clk, .rst_n, .tick, .enable(valid_vec),
    .clr_a_valid(cnt_clr_cpu), .clr_a_idx(line_of(set_of(req_addr), req_way)),
    .clr_b_valid(cnt_clr_ref), .clr_b_idx(ref_idx),
    .pending
  );

  // ---------------------------------------------------------------- refresh pick

  assign cpu_line = line_of(set_of(req_addr), req_way);
  assign cpu_lock = (cst != C_IDLE) && (cst != C_RD_RESP);

  always_comb begin
    ref_pick_any = 1'b0;
    ref_pick_idx = '0;
    for (int i = 0; i < LINES; i++) begin
      if (pending[i] && !(cpu_lock && cpu_line == IW'(i)) && !ref_pick_any) begin
        ref_pick_any = 1'b1;
        ref_pick_idx = IW'(i);
      end
    end
  end

  // ---------------------------------------------------------------- refresh engine
  logic ref_rd_now;          // refresh reads its source this cycle
  logic ref_wr_now;          // refresh writes its target this cycle
  logic ref_active;          // a block is between refresh read and status flip
  logic main_for_cpu, aux_for_cpu;

  function automatic logic seg_ready(seg_e s, logic m, logic a);
    return (s == SEG_AUX) ? a : m;
  endfunction

  always_comb begin
    ref_rd_now = 1'b0;
    ref_wr_now = 1'b0;
    st_flip    = 1'b0;
    cnt_clr_ref = 1'b0;
    unique case (rst_q)
      R_IDLE: ref_rd_now = ref_pick_any && seg_ready(st_b_seg, main_ready, aux_ready);
      R_WR:   ref_wr_now = seg_ready(ref_seg == SEG_MAIN ? SEG_AUX : SEG_MAIN, main_ready, aux_ready);
      R_WAIT: begin
        st_flip     = seg_ready(ref_seg == SEG_MAIN ? SEG_AUX : SEG_MAIN, main_ready, aux_ready);
        cnt_clr_ref = st_flip;
      end
      default: ;
    endcase
  end

  assign ref_active = (rst_q != R_IDLE);

  // Segment ports left to the CPU machine in this cycle.
  assign main_for_cpu = main_ready
                     && !(ref_rd_now && st_b_seg == SEG_MAIN)
                     && !(ref_wr_now && ref_seg == SEG_AUX);
  assign aux_for_cpu  = aux_ready
                     && !(ref_rd_now && st_b_seg == SEG_AUX)
                     && !(ref_wr_now && ref_seg == SEG_MAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q   <= R_IDLE;
      ref_idx <= '0;
      ref_seg <= SEG_MAIN;
    end else begin
      unique case (rst_q)
        R_IDLE: if (ref_rd_now) begin
          ref_idx <= ref_pick_idx;
          ref_seg <= st_b_seg;
          rst_q   <= R_CAP;
        end
        R_CAP:  rst_q <= R_WR;
        R_WR:   if (ref_wr_now) rst_q <= R_WAIT;
        R_WAIT: if (st_flip) rst_q <= R_IDLE;
        default: rst_q <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst_q == R_CAP) ref_buf <= line_rdata;
  end

  // ---------------------------------------------------------------- CPU machine
  logic          acc;           // request accepted this cycle
  logic [WW-1:0] victim_way;
  logic          cpu_rd_now;
  seg_e          cpu_rd_seg;
  logic          line_ref_locked;
  logic          go_fill;

  assign lk_set = (cst == C_IDLE) ? set_of(cpu_req_addr) : set_of(req_addr);
  assign lk_tag = (cst == C_IDLE) ? tag_of(cpu_req_addr) : tag_of(req_addr);
  assign st_a_idx = (cst == C_IDLE) ? line_of(set_of(cpu_req_addr), lk_way) : cpu_line;
  assign line_ref_locked = ref_active && (ref_idx == cpu_line);

  always_comb begin
    victim_way = plru_way;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!lk_valid[w]) victim_way = WW'(w);
  end

  always_comb begin
    acc          = 1'b0;
    cpu_req_ready = 1'b0;
    cpu_rd_now   = 1'b0;
    cpu_rd_seg   = st_a_seg;
    cpu_wr_valid = 1'b0;
    cpu_wr_data  = line_buf;
    cpu_wr_mask  = '1;
    tag_wr       = 1'b0;
    dirty_wr     = 1'b0;
    st_clr       = 1'b0;
    cnt_clr_cpu  = 1'b0;
    touch        = 1'b0;
    touch_way    = req_way;
    mem_rd_valid = (cst == C_FILL_REQ);
    mem_wr_valid = (cst == C_WB);
    cpu_resp_valid = 1'b0;
    cpu_resp_rdata = resp_word;
    go_fill      = 1'b0;
    unique case (cst)
      C_IDLE: if (cpu_req_valid) begin
        if (!cpu_req_we && lk_hit) begin
          // load hit: needs the read slot and its segment now
          if (!ref_rd_now && ((st_a_seg == SEG_MAIN) ? main_for_cpu : aux_for_cpu)) begin
            cpu_req_ready = 1'b1;
            acc        = 1'b1;
            cpu_rd_now = 1'b1;
            touch      = 1'b1;
            touch_way  = lk_way;
          end
        end else begin
          cpu_req_ready = 1'b1;
          acc = 1'b1;
        end
      end
      C_RD_RESP: begin
        cpu_resp_valid = 1'b1;
        cpu_resp_rdata = line_rdata[int'(resp_wi)*WORD_W +: WORD_W];
      end
      C_WR: if (!line_ref_locked) begin
        if (st_a_seg == SEG_MAIN) begin
          if (main_for_cpu) begin
            cpu_wr_valid = 1'b1;
            cpu_wr_data  = {WPL{req_wdata}};
            cpu_wr_mask  = '0;
            cpu_wr_mask[int'(word_of(req_addr))*WB +: WB] = req_be;
            dirty_wr    = 1'b1;
            st_clr      = 1'b1;
            cnt_clr_cpu = 1'b1;
            touch       = 1'b1;
          end
        end else if (aux_for_cpu && !ref_rd_now) begin
          cpu_rd_now = 1'b1;
        end
      end
      C_WR_MAIN: if (main_for_cpu) begin
        cpu_wr_valid = 1'b1;
        dirty_wr     = 1'b1;
        st_clr       = 1'b1;
        cnt_clr_cpu  = 1'b1;
        touch        = 1'b1;
      end
      C_MISS: if (!line_ref_locked) begin
        if (lk_valid[req_way] && lk_dirty[req_way]) begin
          if (!ref_rd_now && ((st_a_seg == SEG_MAIN) ? main_for_cpu : aux_for_cpu))
            cpu_rd_now = 1'b1;
        end else begin
          go_fill = 1'b1;
        end
      end
      C_FILL_WR: if (main_for_cpu) begin
        cpu_wr_valid = 1'b1;
        tag_wr       = 1'b1;
        st_clr       = 1'b1;
        cnt_clr_cpu  = 1'b1;
        touch        = 1'b1;
      end
      C_WAIT_W: if (main_ready) cpu_resp_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE;
    end else begin
      unique case (cst)
        C_IDLE:      if (acc) cst <= (!cpu_req_we && lk_hit) ? C_RD_RESP
                                   : (lk_hit ? C_WR : C_MISS);
        C_RD_RESP:   cst <= C_IDLE;
        C_WR:        if (cpu_wr_valid) cst <= C_WAIT_W;
                     else if (cpu_rd_now) cst <= C_WR_MERGE;
        C_WR_MERGE:  cst <= C_WR_MAIN;
        C_WR_MAIN:   if (cpu_wr_valid) cst <= C_WAIT_W;
        C_MISS:      if (cpu_rd_now) cst <= C_WB_CAP;
                     else if (go_fill) cst <= C_FILL_REQ;
        C_WB_CAP:    cst <= C_WB;
        C_WB:        if (mem_wr_ready) cst <= C_FILL_REQ;
        C_FILL_REQ:  if (mem_rd_ready) cst <= C_FILL_WAIT;
        C_FILL_WAIT: if (mem_rd_resp_valid) cst <= C_FILL_WR;
        C_FILL_WR:   if (cpu_wr_valid) cst <= C_WAIT_W;
        C_WAIT_W:    if (main_ready) cst <= C_IDLE;
        default:     cst <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (acc) begin
      req_addr  <= cpu_req_addr;
      req_we    <= cpu_req_we;
      req_wdata <= cpu_req_wdata;
      req_be    <= cpu_req_be;
      req_way   <= lk_hit ? lk_way : victim_way;
      resp_wi   <= word_of(cpu_req_addr);
    end
    unique case (cst)
      C_WR_MERGE:  line_buf <= merge(line_rdata, word_of(req_addr), req_wdata, req_be);
      C_WB_CAP: begin
        line_buf <= line_rdata;
        wb_addr  <= {lk_tags[req_way], set_of(req_addr), OFF_W'(0)};
      end
      C_FILL_WAIT: if (mem_rd_resp_valid)
        line_buf <= req_we ? merge(mem_rd_resp_data, word_of(req_addr), req_wdata, req_be)
                           : mem_rd_resp_data;
      C_FILL_WR:   resp_word <= line_buf[int'(word_of(req_addr))*WORD_W +: WORD_W];
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- datapath outputs
  always_comb begin
    rd_valid = ref_rd_now || cpu_rd_now;
    rd_seg   = ref_rd_now ? st_b_seg : cpu_rd_seg;
    rd_idx   = ref_rd_now ? ref_pick_idx
             : ((cst == C_IDLE) ? line_of(set_of(cpu_req_addr), lk_way) : cpu_line);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rd_sel_q <= SEG_MAIN;
    else if (rd_valid) rd_sel_q <= rd_seg;
  end
  assign rd_sel = rd_sel_q;

  assign cpu_wr_idx   = cpu_line;
  assign ref_wr_valid = ref_wr_now;
  assign ref_wr_idx   = ref_idx;
  assign ref_src      = ref_seg;
  assign ref_wr_data  = ref_buf;
  assign mem_rd_addr  = {tag_of(req_addr), set_of(req_addr), OFF_W'(0)};
  assign mem_wr_addr  = wb_addr;
  assign mem_wr_data  = line_buf;

  // ---------------------------------------------------------------- checks
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n) !(ref_rd_now && cpu_rd_now))
    else $error("refresh and CPU read in the same cycle");
  a_rd_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                mem_rd_valid && !mem_rd_ready |=> mem_rd_valid)
    else $error("line read request dropped before it was accepted");

endmodule
