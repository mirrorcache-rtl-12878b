// Random end-to-end test environment of the mirror cache, used by the top-level
// testbenches. A random stream of NOPS loads and stores with byte enables is driven
// through the CPU channel; a behavioural lower-level memory with random latencies answers
// refills and takes write-backs. Every load is compared with a byte-level reference
// memory. The retention time is RET cycles, short enough that blocks are refreshed many
// times and move back and forth between the segments; a retention monitor on both
// segments' ports checks that no line is read after its data has been held longer than
// RET plus the worst refresh queueing delay (SLACK). Load-hit latency is checked to be one
// cycle. Each mechanism of the design is counted; with COVER set, a mechanism that never
// happened is a failure. `refreshes` is the number of refreshes made during the random
// stream. `done` rises when the stream and the final read-back are over.
module mc_cache_env #(
  parameter int unsigned RET   = 600,
  parameter int unsigned WLAT  = 3,
  parameter int unsigned NOPS  = 20000,
  parameter bit          COVER = 1'b1
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned refreshes
);
  localparam int unsigned CACHE_BYTES = 1024;   // 16 lines, 4 sets
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned LINES       = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned MEM_BYTES   = 4096;   // address range exercised
  localparam int unsigned MEM_LINES   = MEM_BYTES / LINE_BYTES;
  localparam int unsigned SLACK       = LINES * (WLAT + 6);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cpu_req_valid = 1'b0, cpu_req_ready, cpu_req_we = 1'b0;
  logic [31:0]       cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0]        cpu_req_be = '0;
  logic              cpu_resp_valid;
  logic [31:0]       cpu_resp_rdata;
  logic              mem_rd_valid, mem_rd_ready, mem_rd_resp_valid;
  logic [31:0]       mem_rd_addr, mem_wr_addr;
  logic [LINE_W-1:0] mem_rd_resp_data, mem_wr_data;
  logic              mem_wr_valid, mem_wr_ready;

  mirror_cache #(.CACHE_BYTES(CACHE_BYTES), .RETENTION_CYCLES(RET), .WRITE_LAT(WLAT)) dut (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_we, .cpu_req_addr, .cpu_req_wdata, .cpu_req_be,
    .cpu_resp_valid, .cpu_resp_rdata,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rd_resp_valid, .mem_rd_resp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data
  );

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    refreshes = 0;
  end
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ lower-level memory model
  logic [LINE_W-1:0] lower [MEM_LINES];
  logic [7:0]        ref_mem [MEM_BYTES];
  int unsigned       rd_delay = 0;
  logic              rd_busy = 1'b0;
  logic [31:0]       rd_addr_q;

  assign mem_rd_ready = !rd_busy;
  logic              wr_ready_q = 1'b0;
  assign mem_wr_ready = wr_ready_q;
  always @(posedge clk) wr_ready_q <= ($urandom_range(0, 2) != 0);
  assign mem_rd_resp_valid = rd_busy && (rd_delay == 0);
  assign mem_rd_resp_data  = lower[(rd_addr_q / LINE_BYTES) % MEM_LINES];

  always @(posedge clk) begin
    if (mem_rd_valid && mem_rd_ready) begin
      rd_busy   <= 1'b1;
      rd_addr_q <= mem_rd_addr;
      rd_delay  <= $urandom_range(1, 12);
    end else if (rd_busy) begin
      if (rd_delay == 0) rd_busy <= 1'b0;
      else rd_delay <= rd_delay - 1;
    end
    if (mem_wr_valid && mem_wr_ready)
      lower[(mem_wr_addr / LINE_BYTES) % MEM_LINES] <= mem_wr_data;
  end

  // ------------------------------------------------------------ retention monitor
  longint unsigned last_wr [2][LINES];
  longint unsigned max_age = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.main_en && dut.main_ready) begin
      if (dut.main_we) last_wr[0][dut.main_idx] <= cycle;
      else begin
        check(cycle - last_wr[0][dut.main_idx] <= RET + SLACK, "main segment line read after retention");
        if (cycle - last_wr[0][dut.main_idx] > max_age) max_age = cycle - last_wr[0][dut.main_idx];
      end
    end
    if (dut.aux_en && dut.aux_ready) begin
      if (dut.aux_we) last_wr[1][dut.aux_idx] <= cycle;
      else begin
        check(cycle - last_wr[1][dut.aux_idx] <= RET + SLACK, "aux segment line read after retention");
        if (cycle - last_wr[1][dut.aux_idx] > max_age) max_age = cycle - last_wr[1][dut.aux_idx];
      end
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int unsigned n_ld_hit_main = 0, n_ld_hit_aux = 0, n_st_hit_main = 0, n_st_hit_aux = 0;
  int unsigned n_miss = 0, n_writeback = 0, n_ref_to_aux = 0, n_ref_to_main = 0;
  int unsigned n_read_during_refresh = 0, n_busy_stall = 0, n_multi_pending = 0;
  int unsigned n_store_waits_refresh = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.cst == mc_pkg::C_IDLE && cpu_req_valid && !cpu_req_we && dut.u_ctrl.lk_hit) begin
      if (cpu_req_ready) begin
        if (dut.u_ctrl.st_a_seg == mc_pkg::SEG_MAIN) n_ld_hit_main++; else n_ld_hit_aux++;
        if (dut.u_ctrl.ref_active && dut.u_ctrl.ref_idx == dut.u_ctrl.rd_idx) n_read_during_refresh++;
      end else n_busy_stall++;
    end
    if (dut.u_ctrl.cst == mc_pkg::C_WR && !dut.u_ctrl.line_ref_locked) begin
      if (dut.u_ctrl.cpu_wr_valid) n_st_hit_main++;
      if (dut.u_ctrl.cpu_rd_now)   n_st_hit_aux++;
    end
    if ((dut.u_ctrl.cst == mc_pkg::C_WR || dut.u_ctrl.cst == mc_pkg::C_MISS)
        && dut.u_ctrl.line_ref_locked) n_store_waits_refresh++;
    if (dut.u_ctrl.cst == mc_pkg::C_FILL_REQ && mem_rd_ready) n_miss++;
    if (mem_wr_valid && mem_wr_ready) n_writeback++;
    if (dut.u_ctrl.ref_wr_now) begin
      if (dut.u_ctrl.ref_seg == mc_pkg::SEG_MAIN) n_ref_to_aux++; else n_ref_to_main++;
    end
    if ($countones(dut.u_ctrl.pending) > 1) n_multi_pending++;
  end

  // ------------------------------------------------------------ CPU driver
  task automatic cpu_op(bit we, logic [31:0] addr, logic [31:0] data, logic [3:0] be);
    bit was_hit;
    longint unsigned t_acc;
    logic [31:0] expect_w;
    @(negedge clk);
    cpu_req_valid = 1'b1;
    cpu_req_we    = we;
    cpu_req_addr  = addr;
    cpu_req_wdata = data;
    cpu_req_be    = be;
    #4;
    while (!cpu_req_ready) begin
      @(negedge clk);
      #4;
    end
    was_hit = dut.u_ctrl.lk_hit;
    t_acc = cycle;
    for (int b = 0; b < 4; b++) expect_w[b*8 +: 8] = ref_mem[(addr & ~32'h3) + b];
    if (we)
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[(addr & ~32'h3) + b] = data[b*8 +: 8];
    @(negedge clk);
    cpu_req_valid = 1'b0;
    #4;
    while (!cpu_resp_valid) begin
      @(negedge clk);
      #4;
    end
    if (!we) begin
      check(cpu_resp_rdata == expect_w,
            $sformatf("load %h returned %h, expected %h", addr, cpu_resp_rdata, expect_w));
      if (was_hit) check(cycle - t_acc == 1, "load hit latency is not one cycle");
    end
  endtask


  initial begin
    for (int i = 0; i < MEM_LINES; i++)
      for (int w = 0; w < LINE_W / 32; w++) lower[i][w*32 +: 32] = $urandom;
    for (int a = 0; a < MEM_BYTES; a++) ref_mem[a] = lower[a / LINE_BYTES][(a % LINE_BYTES)*8 +: 8];
    for (int s = 0; s < 2; s++) for (int i = 0; i < LINES; i++) last_wr[s][i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      logic [31:0] a;
      bit we;
      // mostly a hot region that fits, sometimes anywhere in the range
      if ($urandom_range(0, 9) < 8) a = $urandom_range(0, CACHE_BYTES / 2 - 1);
      else a = $urandom_range(0, MEM_BYTES - 1);
      a = a & ~32'h3;
      we = ($urandom_range(0, 9) < 3);
      cpu_op(we, a, $urandom, we ? 4'($urandom_range(1, 15)) : 4'hf);
      if ($urandom_range(0, 99) == 0) repeat ($urandom_range(100, 1200)) @(posedge clk);
      else if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(posedge clk);
    end
    refreshes = n_ref_to_aux + n_ref_to_main;   // refreshes during the random stream
    // read everything back after a long idle period
    repeat (3 * RET + 100) @(posedge clk);
    for (int a = 0; a < MEM_BYTES; a += 4) cpu_op(1'b0, a, 0, 4'hf);

    $display("R=%0d WRITE_LAT=%0d:", RET, WLAT);
    $display("load hits main=%0d aux=%0d, store hits main=%0d aux=%0d, misses=%0d, write-backs=%0d",
             n_ld_hit_main, n_ld_hit_aux, n_st_hit_main, n_st_hit_aux, n_miss, n_writeback);
    $display("refresh main->aux=%0d aux->main=%0d, loads during own refresh=%0d, busy stalls=%0d",
             n_ref_to_aux, n_ref_to_main, n_read_during_refresh, n_busy_stall);
    $display("cycles with several refreshes pending=%0d, store/miss waiting on refresh=%0d, max read age=%0d",
             n_multi_pending, n_store_waits_refresh, max_age);
    if (COVER) begin
      check(n_ld_hit_main > 0, "no load hit in the main segment");
      check(n_ld_hit_aux > 0, "no load hit in the auxiliary segment");
      check(n_st_hit_main > 0, "no store hit in the main segment");
      check(n_st_hit_aux > 0, "no store hit moving a block from the auxiliary segment");
      check(n_miss > 0, "no miss");
      check(n_writeback > 0, "no write-back");
      check(n_ref_to_aux > 0, "no refresh into the auxiliary segment");
      check(n_ref_to_main > 0, "no refresh back into the main segment");
      check(n_read_during_refresh > 0, "no load served while its block was refreshed");
      check(n_busy_stall > 0, "no load stalled on a busy segment");
      check(n_multi_pending > 0, "never several refreshes pending");
      check(n_store_waits_refresh > 0, "no store or miss waited for a refresh");
    end
    done = 1'b1;
  end

endmodule
