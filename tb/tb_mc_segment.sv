// Testbench of one data segment: 8 lines of 64 bits, WRITE_LAT = 3. Random masked writes
// and reads are issued whenever the port is ready and compared with a reference array.
// After every write `ready` must stay low for exactly WRITE_LAT - 1 cycles, and read data
// must appear one cycle after the read.
module tb_mc_segment;
  localparam int unsigned LINES = 8, LINE_W = 64, WLAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic en = 0, we = 0, ready;
  logic [2:0] idx = '0;
  logic [LINE_W-1:0] wdata = '0, rdata;
  logic [7:0] wmask = '0;
  logic [LINE_W-1:0] model [LINES];
  int unsigned n_wr = 0, n_rd = 0;

  mc_segment #(.LINES(LINES), .LINE_W(LINE_W), .WRITE_LAT(WLAT)) dut (
    .clk, .rst_n, .en, .we, .idx, .wdata, .wmask, .rdata, .ready
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill every line so that reads are defined
    for (int i = 0; i < LINES; i++) begin
      @(negedge clk);
      en = 1; we = 1; idx = 3'(i); wdata = {$urandom, $urandom}; wmask = '1;
      model[i] = wdata;
      @(negedge clk);
      en = 0;
      repeat (WLAT - 1) @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      chk(ready, "port not ready when idle");
      en = 1; we = 1'($urandom); idx = 3'($urandom);
      wdata = {$urandom, $urandom}; wmask = 8'($urandom);
      if (we) begin
        for (int b = 0; b < 8; b++) if (wmask[b]) model[idx][b*8 +: 8] = wdata[b*8 +: 8];
        n_wr++;
        @(negedge clk);
        en = 0;
        for (int k = 1; k < WLAT; k++) begin
          chk(!ready, $sformatf("ready during write, cycle %0d", k));
          @(negedge clk);
        end
        chk(ready, "not ready WRITE_LAT cycles after the write");
      end else begin
        logic [LINE_W-1:0] exp;
        exp = model[idx];
        n_rd++;
        @(negedge clk);
        en = 0;
        chk(rdata == exp, $sformatf("read line %0d: %h vs %h", idx, rdata, exp));
      end
    end
    chk(n_wr > 100 && n_rd > 100, "too few accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
