// Directed testbench of the cache controller, connected to the real segments, demux and
// mux, with a 1 KB cache, WRITE_LAT = 3 and a counter clock period of 20 cycles.
// It walks one block through its whole life and checks the cycle timing of each step:
//   load miss and refill from the lower level; load hit one cycle after acceptance;
//   store hit in the main segment answered WRITE_LAT cycles after the write is issued;
//   refresh main->aux, whose status bit flips WRITE_LAT + 3 cycles after the counter
//   reaches P, with the counter reaching P 2 to 3 counter periods after the last write;
//   load served from the auxiliary segment; store hit on an auxiliary block that moves
//   it back to the main segment; refresh aux->main without CPU writes; eviction of the
//   dirty block with a write-back of the right data; and a reload of it.
module tb_mc_controller;
  localparam int unsigned CACHE_BYTES = 1024, LINE_BYTES = 64, WAYS = 4;
  localparam int unsigned LINES = CACHE_BYTES / LINE_BYTES, LINE_W = 512, IW = 4;
  localparam int unsigned WLAT = 3, RET = 60, TICK = RET / 3;
  localparam int unsigned MEM_LINES = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0, cpu_resp_valid;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0, cpu_resp_rdata;
  logic [3:0] cpu_req_be = '0;
  logic mem_rd_valid, mem_rd_ready, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [LINE_W-1:0] mem_rd_resp_data, mem_wr_data;

  logic rd_valid, cpu_wr_valid, ref_wr_valid, main_ready, aux_ready;
  mc_pkg::seg_e rd_seg, rd_sel, ref_src;
  logic [IW-1:0] rd_idx, cpu_wr_idx, ref_wr_idx;
  logic [LINE_W-1:0] line_rdata, cpu_wr_data, ref_wr_data;
  logic [63:0] cpu_wr_mask;
  logic main_en, main_we, aux_en, aux_we;
  logic [IW-1:0] main_idx, aux_idx;
  logic [LINE_W-1:0] main_wdata, aux_wdata, main_rdata, aux_rdata;
  logic [63:0] main_wmask, aux_wmask;

  mc_controller #(.CACHE_BYTES(CACHE_BYTES), .RETENTION_CYCLES(RET)) dut (
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
    .ref_wr_valid, .ref_wr_idx, .ref_src, .ref_wr_data, .rd_valid, .rd_seg, .rd_idx,
    .main_en, .main_we, .main_idx, .main_wdata, .main_wmask,
    .aux_en, .aux_we, .aux_idx, .aux_wdata, .aux_wmask
  );
  mc_segment #(.LINES(LINES), .LINE_W(LINE_W), .WRITE_LAT(WLAT)) u_main (
    .clk, .rst_n, .en(main_en), .we(main_we), .idx(main_idx), .wdata(main_wdata),
    .wmask(main_wmask), .rdata(main_rdata), .ready(main_ready)
  );
  mc_segment #(.LINES(LINES), .LINE_W(LINE_W), .WRITE_LAT(WLAT)) u_aux (
    .clk, .rst_n, .en(aux_en), .we(aux_we), .idx(aux_idx), .wdata(aux_wdata),
    .wmask(aux_wmask), .rdata(aux_rdata), .ready(aux_ready)
  );
  mc_read_refresh_mux #(.LINE_W(LINE_W)) u_mux (
    .sel(rd_sel), .main_rdata, .aux_rdata, .rdata(line_rdata)
  );

  // lower level: fixed 4-cycle read latency, always ready
  logic [LINE_W-1:0] lower [MEM_LINES];
  logic [31:0] rq_addr;
  int rq_cnt = -1;
  int unsigned n_wb = 0;
  logic [31:0] last_wb_addr;
  logic [LINE_W-1:0] last_wb_data;
  assign mem_rd_ready = (rq_cnt < 0);
  assign mem_wr_ready = 1'b1;
  assign mem_rd_resp_valid = (rq_cnt == 0);
  assign mem_rd_resp_data = lower[(rq_addr >> 6) % MEM_LINES];
  always @(posedge clk) begin
    if (mem_rd_valid && mem_rd_ready) begin rq_addr <= mem_rd_addr; rq_cnt <= 4; end
    else if (rq_cnt >= 0) rq_cnt <= rq_cnt - 1;
    if (mem_wr_valid) begin
      lower[(mem_wr_addr >> 6) % MEM_LINES] <= mem_wr_data;
      last_wb_addr <= mem_wr_addr; last_wb_data <= mem_wr_data; n_wb++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  longint unsigned t_acc, t_resp;
  logic [31:0] rdata;

  // One request; returns acceptance and response cycles.
  task automatic op(bit we, logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = we; cpu_req_addr = addr; cpu_req_wdata = data; cpu_req_be = 4'hf;
    #4;
    while (!cpu_req_ready) begin @(negedge clk); #4; end
    t_acc = cycle;
    @(negedge clk);
    cpu_req_valid = 0;
    #4;
    while (!cpu_resp_valid) begin @(negedge clk); #4; end
    t_resp = cycle;
    rdata = cpu_resp_rdata;
  endtask

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return lower[(a >> 6) % MEM_LINES][((a >> 2) % 16) * 32 +: 32];
  endfunction

  function automatic bit status_of(int line);
    return dut.u_status.status[line];
  endfunction

  // Wait for a block's status bit to change; record when its counter reached P.
  task automatic wait_flip(int line, bit to, output longint unsigned t_pend, output longint unsigned t_flip);
    t_pend = 0;
    while (status_of(line) != to) begin
      @(negedge clk); #4;
      if (dut.pending[line] && t_pend == 0) t_pend = cycle;
    end
    t_flip = cycle;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [31:0] A = 32'h0000_0048;   // set 1, word 2
    int line_a;
    longint unsigned t_wr, t_pend, t_flip;
    for (int i = 0; i < MEM_LINES; i++) for (int w = 0; w < 16; w++) lower[i][w*32 +: 32] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. load miss and refill
    op(0, A, 0);
    chk(rdata == mem_word(A), "load miss data");
    chk(dut.u_tags.valid[1] != 0, "block installed in set 1");
    line_a = 1 * WAYS + 0;
    chk(status_of(line_a) == 0, "refilled block is in the main segment");

    // 2. load hit, one cycle
    op(0, A, 0);
    chk(rdata == mem_word(A), "load hit data");
    chk(t_resp - t_acc == 1, $sformatf("load hit latency %0d", t_resp - t_acc));

    // 3. store hit in main: issued the cycle after acceptance, answered WRITE_LAT later
    op(1, A, 32'hCAFE_0001);
    t_wr = t_acc + 1;
    chk(t_resp - t_wr == WLAT, $sformatf("store hit latency %0d", t_resp - t_wr));
    op(0, A, 0);
    chk(rdata == 32'hCAFE_0001, "store data read back");

    // 4. refresh main -> aux
    wait_flip(line_a, 1, t_pend, t_flip);
    chk(t_pend - t_wr >= 2 * TICK && t_pend - t_wr <= 3 * TICK,
        $sformatf("counter reached P %0d cycles after the write", t_pend - t_wr));
    chk(t_flip - t_pend == WLAT + 3, $sformatf("refresh took %0d cycles", t_flip - t_pend));

    // 5. load from aux
    op(0, A, 0);
    chk(rdata == 32'hCAFE_0001, "load from the auxiliary segment");
    chk(dut.rd_sel == mc_pkg::SEG_AUX, "load was read from the auxiliary segment");
    chk(t_resp - t_acc == 1, "aux load hit latency");

    // 6. store hit on an aux block: read aux, merge, write main
    op(1, A + 4, 32'hBEEF_0002);
    chk(t_resp - t_acc == 3 + WLAT, $sformatf("aux store latency %0d", t_resp - t_acc));
    chk(status_of(line_a) == 0, "stored block moved back to the main segment");
    op(0, A, 0);
    chk(rdata == 32'hCAFE_0001, "rest of the moved line kept");
    op(0, A + 4, 0);
    chk(rdata == 32'hBEEF_0002, "store merged into the moved line");

    // 7. refresh main -> aux -> main without CPU writes
    wait_flip(line_a, 1, t_pend, t_flip);
    wait_flip(line_a, 0, t_pend, t_flip);
    chk(t_flip - t_pend == WLAT + 3, "refresh back to main timing");
    op(0, A + 4, 0);
    chk(rdata == 32'hBEEF_0002, "data after a round trip through both segments");

    // 8. evict the dirty block: four more tags in set 1
    for (int k = 1; k <= 4; k++) op(0, A + k * 32'h100, 0);
    chk(n_wb == 1, $sformatf("one write-back expected, saw %0d", n_wb));
    chk(last_wb_addr == (A & ~32'h3f), "write-back address");
    chk(last_wb_data[2*32 +: 32] == 32'hCAFE_0001 && last_wb_data[3*32 +: 32] == 32'hBEEF_0002,
        "write-back data");
    op(0, A + 4, 0);
    chk(rdata == 32'hBEEF_0002, "reload after write-back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
