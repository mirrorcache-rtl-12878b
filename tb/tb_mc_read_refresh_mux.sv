// Testbench of the read/refresh mux: for random line pairs the output must be the main
// line when the select names the main segment and the auxiliary line otherwise.
module tb_mc_read_refresh_mux;
  localparam int unsigned LINE_W = 64;
  int unsigned checks = 0, failures = 0;
  mc_pkg::seg_e sel = mc_pkg::SEG_MAIN;
  logic [LINE_W-1:0] m = '0, a = '0, r;

  mc_read_refresh_mux #(.LINE_W(LINE_W)) dut (.sel, .main_rdata(m), .aux_rdata(a), .rdata(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      m = {$urandom, $urandom};
      a = {$urandom, $urandom};
      sel = mc_pkg::seg_e'(n % 2);
      #1;
      checks++;
      if (r !== ((n % 2) ? a : m)) begin
        failures++;
        $display("FAIL: sel=%0d out=%h", n % 2, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
