// Testbench of the refresh-counter clock: with PERIOD = 7 the tick must come exactly every
// 7 cycles, the first one 7 cycles after reset is released, and never in between.
module tb_mc_tick_gen;
  localparam int unsigned PERIOD = 7;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  mc_tick_gen #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .tick);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 1; c <= 20 * PERIOD; c++) begin
      @(posedge clk);
      #1;
      checks++;
      // after c rising edges, tick is high exactly when c is a multiple of PERIOD minus one
      if (tick !== ((c % PERIOD) == PERIOD - 1)) begin
        failures++;
        $display("FAIL: tick=%0b after %0d edges", tick, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
