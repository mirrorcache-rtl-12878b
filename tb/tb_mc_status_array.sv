// Testbench of the status array: random clears (insert into the main segment) and
// inverts (refresh) of 16 bits, with both read ports compared against a reference model
// every cycle. A clear and an invert of the same bit in one cycle must leave it 0.
module tb_mc_status_array;
  localparam int unsigned LINES = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic [3:0] ra = '0, rb = '0, ci = '0, fi = '0;
  logic       cv = 0, fv = 0;
  mc_pkg::seg_e sa, sb;
  logic [LINES-1:0] model = '0;
  int unsigned n_aux = 0;

  mc_status_array #(.LINES(LINES)) dut (
    .clk, .rst_n, .rd_a_idx(ra), .rd_a_seg(sa), .rd_b_idx(rb), .rd_b_seg(sb),
    .clr_valid(cv), .clr_idx(ci), .flip_valid(fv), .flip_idx(fi)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      cv = ($urandom_range(0, 3) == 0); ci = 4'($urandom);
      fv = ($urandom_range(0, 1) == 0); fi = (n % 50 == 0) ? ci : 4'($urandom);
      #1;
      checks += 2;
      if (sa !== mc_pkg::seg_e'(model[ra])) begin failures++; $display("FAIL: port a bit %0d", ra); end
      if (sb !== mc_pkg::seg_e'(model[rb])) begin failures++; $display("FAIL: port b bit %0d", rb); end
      if (sa == mc_pkg::SEG_AUX) n_aux++;
      @(posedge clk);
      if (fv) model[fi] = ~model[fi];
      if (cv) model[ci] = 1'b0;
    end
    checks++;
    if (n_aux == 0) begin failures++; $display("FAIL: no bit ever read as auxiliary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
