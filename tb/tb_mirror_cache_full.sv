// Full-size testbench of the mirror cache: every parameter at its default (32 KB logical,
// 64 B lines, 4 ways, 100 us retention = 200000 cycles at 2 GHz, counter period 66666
// cycles, 3-cycle writes). It fills all 512 blocks of the cache, stores into them,
// then idles until every block has been refreshed into the auxiliary segment and back
// into the main segment, reading all of them back in between. Each block must be
// refreshed 2 to 3 counter periods after its last write. Finally every block is evicted
// by a block with another tag, and each of the 512 write-backs must carry its stored data.
module tb_mirror_cache_full;
  localparam int unsigned LINE_W = 512, NBLK = 512, C = 200_000 / 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0, cpu_resp_valid;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0, cpu_resp_rdata;
  logic [3:0] cpu_req_be = 4'hf;
  logic mem_rd_valid, mem_rd_ready, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready;
  logic [31:0] mem_rd_addr, mem_wr_addr;
  logic [LINE_W-1:0] mem_rd_resp_data, mem_wr_data;

  mirror_cache dut (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_we, .cpu_req_addr, .cpu_req_wdata, .cpu_req_be,
    .cpu_resp_valid, .cpu_resp_rdata,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rd_resp_valid, .mem_rd_resp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data
  );

  // Lower level: the line at address a holds words f(a) = a ^ 32'h5A5A0000, 3-cycle latency.
  logic [31:0] rq_addr;
  int rq_cnt = -1;
  assign mem_rd_ready = (rq_cnt < 0);
  assign mem_wr_ready = 1'b1;
  assign mem_rd_resp_valid = (rq_cnt == 0);
  always_comb
    for (int w = 0; w < 16; w++) mem_rd_resp_data[w*32 +: 32] = (rq_addr + 32'(4 * w)) ^ 32'h5A5A_0000;
  always @(posedge clk) begin
    if (mem_rd_valid && mem_rd_ready) begin rq_addr <= mem_rd_addr; rq_cnt <= 3; end
    else if (rq_cnt >= 0) rq_cnt <= rq_cnt - 1;
  end

  int unsigned n_to_aux = 0, n_to_main = 0, n_bad_time = 0;
  longint unsigned last_write [512];
  always @(posedge clk) if (rst_n) begin
    if (dut.main_en && dut.main_we) last_write[dut.main_idx] <= cycle;
    if (dut.aux_en && dut.aux_we)   last_write[dut.aux_idx] <= cycle;
    if (dut.u_ctrl.ref_rd_now) begin
      checks++;
      if (cycle - last_write[dut.u_ctrl.ref_pick_idx] < 2 * C - 2 ||
          cycle - last_write[dut.u_ctrl.ref_pick_idx] > 3 * C + 512 * 8) begin
        failures++; n_bad_time++;
        if (n_bad_time < 5) $display("FAIL: refresh %0d cycles after last write",
                                     cycle - last_write[dut.u_ctrl.ref_pick_idx]);
      end
      if (dut.u_ctrl.st_b_seg == mc_pkg::SEG_MAIN) n_to_aux++; else n_to_main++;
    end
  end

  // Every write-back must carry a stored block: word 0 from the lower level, word 1 the
  // value stored into it.
  int unsigned n_wb = 0;
  always @(posedge clk) if (rst_n && mem_wr_valid && mem_wr_ready) begin
    n_wb++;
    checks++;
    if (mem_wr_addr % 32'h840 != 0 || mem_wr_addr / 32'h840 >= NBLK ||
        mem_wr_data[31:0] != (mem_wr_addr ^ 32'h5A5A_0000) ||
        mem_wr_data[63:32] != (mem_wr_addr / 32'h840) * 32'h0101_0101) begin
      failures++;
      $display("FAIL: write-back of %h carries %h %h", mem_wr_addr, mem_wr_data[31:0], mem_wr_data[63:32]);
    end
  end

  task automatic op(bit we, logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = we; cpu_req_addr = addr; cpu_req_wdata = data;
    #4;
    while (!cpu_req_ready) begin @(negedge clk); #4; end
    @(negedge clk);
    cpu_req_valid = 0;
    #4;
    while (!cpu_resp_valid) begin @(negedge clk); #4; end
  endtask

  function automatic logic [31:0] addr_of(int b);
    return 32'(b) * 32'h0000_0840;   // distinct sets and tags, 64 B aligned
  endfunction

  task automatic read_all(string when, bit stored);
    for (int b = 0; b < NBLK; b++) begin
      op(0, addr_of(b), 0);
      checks++;
      if (cpu_resp_rdata != (addr_of(b) ^ 32'h5A5A_0000)) begin
        failures++; $display("FAIL %s: block %0d word 0 = %h", when, b, cpu_resp_rdata);
      end
      if (stored) begin
        op(0, addr_of(b) + 4, 0);
        checks++;
        if (cpu_resp_rdata != 32'(b) * 32'h0101_0101) begin
          failures++; $display("FAIL %s: block %0d word 1 = %h", when, b, cpu_resp_rdata);
        end
      end
    end
  endtask

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_all("after refill", 0);
    for (int b = 0; b < NBLK; b++) op(1, addr_of(b) + 4, 32'(b) * 32'h0101_0101);
    read_all("after stores", 1);
    // wait until every block has moved to the auxiliary segment
    while (n_to_aux < NBLK) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if ($countones(dut.u_ctrl.u_status.status) != NBLK) begin
      failures++; $display("FAIL: %0d blocks in the auxiliary segment", $countones(dut.u_ctrl.u_status.status));
    end
    read_all("from the auxiliary segment", 1);
    while (n_to_main < NBLK) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (dut.u_ctrl.u_status.status != '0) begin failures++; $display("FAIL: blocks left in the auxiliary segment"); end
    read_all("back in the main segment", 1);
    // replace every block by one with another tag: 512 dirty evictions
    for (int b = 0; b < NBLK; b++) begin
      op(0, addr_of(b) + 32'h0100_0000, 0);
      checks++;
      if (cpu_resp_rdata != ((addr_of(b) + 32'h0100_0000) ^ 32'h5A5A_0000)) begin
        failures++; $display("FAIL: refill of block %0d with a new tag", b);
      end
    end
    checks++;
    if (n_wb != NBLK) begin failures++; $display("FAIL: %0d write-backs, expected %0d", n_wb, NBLK); end
    $display("refreshes to aux=%0d to main=%0d at cycle %0d", n_to_aux, n_to_main, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
