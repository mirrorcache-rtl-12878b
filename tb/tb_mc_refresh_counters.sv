// Testbench of the per-block refresh counters: random ticks, enables and clears are
// applied to 8 counters and `pending` is compared every cycle with a reference model in
// which a counter counts enabled ticks since its last clear and saturates at P = 3.
module tb_mc_refresh_counters;
  localparam int unsigned LINES = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic             tick = 0, ca = 0, cb = 0;
  logic [LINES-1:0] enable = '0, pending;
  logic [2:0]       ia = '0, ib = '0;
  int unsigned      model [LINES];
  int unsigned      n_pend = 0;

  mc_refresh_counters #(.LINES(LINES)) dut (
    .clk, .rst_n, .tick, .enable, .clr_a_valid(ca), .clr_a_idx(ia),
    .clr_b_valid(cb), .clr_b_idx(ib), .pending
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LINES; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      tick   = ($urandom_range(0, 3) == 0);
      enable = (n < 100) ? '1 : LINES'($urandom | $urandom);
      ca = ($urandom_range(0, 5) == 0);
      cb = ($urandom_range(0, 5) == 0);
      ia = 3'($urandom);
      ib = 3'($urandom);
      #1;
      for (int i = 0; i < LINES; i++) begin
        checks++;
        if (pending[i] !== (enable[i] && model[i] == 3)) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d line %0d pending=%0b model=%0d", n, i, pending[i], model[i]);
        end
        if (pending[i]) n_pend++;
      end
      @(posedge clk);
      for (int i = 0; i < LINES; i++) begin
        if ((ca && ia == i) || (cb && ib == i)) model[i] = 0;
        else if (tick && enable[i] && model[i] < 3) model[i]++;
      end
    end
    checks++;
    if (n_pend == 0) begin failures++; $display("FAIL: no counter ever reached P"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
