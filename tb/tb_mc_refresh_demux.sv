// Testbench of the refresh demux: random legal combinations of a CPU write, a refresh
// write and a read (at most one access per segment). CPU writes must reach the main
// segment with their mask, refresh writes the segment opposite their source with a full
// mask, and reads the segment they name; no other port may be enabled.
module tb_mc_refresh_demux;
  localparam int unsigned LINES = 16, LINE_W = 64;
  int unsigned checks = 0, failures = 0;

  logic cv = 0, rv = 0, dv = 0;
  logic [3:0] ci = '0, ri = '0, di = '0;
  logic [LINE_W-1:0] cd = '0, rd = '0;
  logic [7:0] cm = '0;
  mc_pkg::seg_e rs = mc_pkg::SEG_MAIN, ds = mc_pkg::SEG_MAIN;
  logic me, mw, ae, aw;
  logic [3:0] mi, ai;
  logic [LINE_W-1:0] md, ad;
  logic [7:0] mm, am;
  int unsigned n_ref_main = 0, n_ref_aux = 0;

  mc_refresh_demux #(.LINES(LINES), .LINE_W(LINE_W)) dut (
    .cpu_wr_valid(cv), .cpu_wr_idx(ci), .cpu_wr_data(cd), .cpu_wr_mask(cm),
    .ref_wr_valid(rv), .ref_wr_idx(ri), .ref_src(rs), .ref_wr_data(rd),
    .rd_valid(dv), .rd_seg(ds), .rd_idx(di),
    .main_en(me), .main_we(mw), .main_idx(mi), .main_wdata(md), .main_wmask(mm),
    .aux_en(ae), .aux_we(aw), .aux_idx(ai), .aux_wdata(ad), .aux_wmask(am)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      bit main_used, aux_used;
      main_used = 0; aux_used = 0;
      ci = 4'($urandom); ri = 4'($urandom); di = 4'($urandom);
      cd = {$urandom, $urandom}; rd = {$urandom, $urandom}; cm = 8'($urandom);
      cv = 1'($urandom); if (cv) main_used = 1;
      rs = mc_pkg::seg_e'($urandom_range(0, 1));
      rv = 1'($urandom);
      if (rv && ((rs == mc_pkg::SEG_AUX && main_used))) rv = 0;
      if (rv) begin if (rs == mc_pkg::SEG_AUX) main_used = 1; else aux_used = 1; end
      ds = mc_pkg::seg_e'($urandom_range(0, 1));
      dv = 1'($urandom);
      if (dv && ((ds == mc_pkg::SEG_MAIN) ? main_used : aux_used)) dv = 0;
      #1;
      // main port
      if (cv) begin
        chk(me && mw && mi == ci && md == cd && mm == cm, "CPU write to main");
      end else if (rv && rs == mc_pkg::SEG_AUX) begin
        chk(me && mw && mi == ri && md == rd && mm == '1, "refresh write to main");
        n_ref_main++;
      end else if (dv && ds == mc_pkg::SEG_MAIN) begin
        chk(me && !mw && mi == di, "read of main");
      end else chk(!me, "main enabled with nothing to do");
      // auxiliary port
      if (rv && rs == mc_pkg::SEG_MAIN) begin
        chk(ae && aw && ai == ri && ad == rd && am == '1, "refresh write to aux");
        n_ref_aux++;
      end else if (dv && ds == mc_pkg::SEG_AUX) begin
        chk(ae && !aw && ai == di, "read of aux");
      end else chk(!ae, "aux enabled with nothing to do");
    end
    chk(n_ref_main > 0 && n_ref_aux > 0, "refresh writes in both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
