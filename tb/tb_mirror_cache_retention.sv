// Retention-time sweep of the mirror cache. Four caches, each with its own random test
// environment, run the same kind of load/store stream with retention times that step by
// a factor of ten (600, 6000, 60000 and 600000 cycles, standing for 100 us, 1 ms, 10 ms
// and 100 ms) and the matching write latencies of 3, 4, 5 and 7 cycles. Every load is
// checked for data and for retention age in each cache. The number of refreshes made
// during the stream must not grow as the retention time grows, and the shortest retention must need several times
// more refreshes than the longest.
module tb_mirror_cache_retention;
  logic        done [4];
  int unsigned checks [4], failures [4], refreshes [4];

  mc_cache_env #(.RET(600),    .WLAT(3), .NOPS(8000), .COVER(1'b0)) env0 (
    .done(done[0]), .checks(checks[0]), .failures(failures[0]), .refreshes(refreshes[0]));
  mc_cache_env #(.RET(6000),   .WLAT(4), .NOPS(8000), .COVER(1'b0)) env1 (
    .done(done[1]), .checks(checks[1]), .failures(failures[1]), .refreshes(refreshes[1]));
  mc_cache_env #(.RET(60000),  .WLAT(5), .NOPS(8000), .COVER(1'b0)) env2 (
    .done(done[2]), .checks(checks[2]), .failures(failures[2]), .refreshes(refreshes[2]));
  mc_cache_env #(.RET(600000), .WLAT(7), .NOPS(8000), .COVER(1'b0)) env3 (
    .done(done[3]), .checks(checks[3]), .failures(failures[3]), .refreshes(refreshes[3]));

  int unsigned c, f;

  initial begin
    fork
      begin
        wait (done[0] && done[1] && done[2] && done[3]);
        c = 0;
        f = 0;
        for (int i = 0; i < 4; i++) begin
          c += checks[i];
          f += failures[i];
        end
        $display("refreshes per retention time: %0d %0d %0d %0d",
                 refreshes[0], refreshes[1], refreshes[2], refreshes[3]);
        for (int i = 0; i < 3; i++) begin
          c++;
          if (refreshes[i] < refreshes[i + 1]) begin
            f++;
            $display("FAIL: more refreshes at the longer retention time %0d", i + 1);
          end
        end
        c++;
        if (refreshes[0] < 4 * refreshes[3]) begin
          f++;
          $display("FAIL: shortest retention does not need clearly more refreshes");
        end
        $display("TB_RESULT checks=%0d failures=%0d", c, f);
      end
      begin
        #100_000_000;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks[0], 1);
      end
    join_any
    $finish;
  end
endmodule
