// End-to-end testbench of the mirror cache: one random test environment (see
// mc_cache_env) on a 1 KB cache with a 600-cycle retention time and 3-cycle writes, with
// every mechanism of the design required to occur at least once.
module tb_mirror_cache;
  logic        done;
  int unsigned checks, failures, refreshes;

  mc_cache_env #(.RET(600), .WLAT(3), .NOPS(20000), .COVER(1'b1)) env (
    .done, .checks, .failures, .refreshes
  );

  initial begin
    fork
      begin
        wait (done);
        $display("refreshes=%0d", refreshes);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      end
      begin
        #30_000_000;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      end
    join_any
    $finish;
  end
endmodule
