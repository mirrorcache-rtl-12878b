// Testbench of the tag array: 4 sets x 4 ways with 5-bit tags. Random installs and
// dirty-marks are applied and random lookups are compared with a reference model: hit,
// hit way, and every way's valid, dirty and tag fields, plus the flat valid vector.
module tb_mc_tag_array;
  localparam int unsigned SETS = 4, WAYS = 4, TAG_W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic [1:0] lk_set = '0, wr_set = '0, wr_way = '0, d_set = '0, d_way = '0, lk_way;
  logic [TAG_W-1:0] lk_tag = '0, wr_tag = '0;
  logic lk_hit, wr_valid = 0, wr_dirty = 0, d_valid = 0;
  logic [WAYS-1:0] lk_valid, lk_dirty;
  logic [WAYS-1:0][TAG_W-1:0] lk_tags;
  logic [SETS*WAYS-1:0] valid_vec;

  logic [TAG_W-1:0] m_tag [SETS][WAYS];
  logic m_val [SETS][WAYS];
  logic m_dir [SETS][WAYS];
  int unsigned n_hit = 0;

  mc_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .lk_set, .lk_tag, .lk_hit, .lk_way, .lk_valid, .lk_dirty, .lk_tags,
    .wr_valid, .wr_set, .wr_way, .wr_tag, .wr_dirty,
    .dirty_valid(d_valid), .dirty_set(d_set), .dirty_way(d_way), .valid_vec
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_val[s][w] = 0; m_dir[s][w] = 0; m_tag[s][w] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      bit exp_hit;
      int exp_way;
      @(negedge clk);
      lk_set = 2'($urandom); lk_tag = 5'($urandom_range(0, 7));
      wr_valid = ($urandom_range(0, 3) == 0); wr_set = 2'($urandom); wr_way = 2'($urandom);
      wr_tag = 5'($urandom_range(0, 7)); wr_dirty = 1'($urandom);
      d_valid = ($urandom_range(0, 3) == 0); d_set = 2'($urandom); d_way = 2'($urandom);
      #1;
      exp_hit = 0; exp_way = 0;
      for (int w = 0; w < WAYS; w++) begin
        if (!exp_hit && m_val[lk_set][w] && m_tag[lk_set][w] == lk_tag) begin exp_hit = 1; exp_way = w; end
        chk(lk_valid[w] == m_val[lk_set][w], "valid");
        chk(lk_dirty[w] == m_dir[lk_set][w], "dirty");
        if (m_val[lk_set][w]) chk(lk_tags[w] == m_tag[lk_set][w], "tag");
      end
      chk(lk_hit == exp_hit, $sformatf("hit set %0d tag %0d", lk_set, lk_tag));
      if (exp_hit) begin chk(lk_way == 2'(exp_way), "hit way"); n_hit++; end
      for (int i = 0; i < SETS * WAYS; i++) chk(valid_vec[i] == m_val[i / WAYS][i % WAYS], "valid_vec");
      @(posedge clk);
      if (d_valid) m_dir[d_set][d_way] = 1;
      if (wr_valid) begin
        m_val[wr_set][wr_way] = 1; m_dir[wr_set][wr_way] = wr_dirty; m_tag[wr_set][wr_way] = wr_tag;
      end
    end
    chk(n_hit > 100, "too few hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
