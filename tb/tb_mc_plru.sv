// Testbench of the tree pseudo-LRU: 2 sets of 4 ways. The reference keeps the three
// tree bits per set explicitly (root chooses the half, one bit per half chooses the way)
// and is updated on every touch; the victim must match it, must never be the way touched
// last, and touching ways 0,1,2,3 in order must make way 0 the victim.
module tb_mc_plru;
  localparam int unsigned SETS = 2, WAYS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic       tv = 0;
  logic [0:0] ts = '0, vs = '0;
  logic [1:0] tw = '0, vw;
  logic root [SETS], left [SETS], right [SETS];
  logic [1:0] last [SETS];

  mc_plru #(.SETS(SETS), .WAYS(WAYS)) dut (
    .clk, .rst_n, .touch_valid(tv), .touch_set(ts), .touch_way(tw), .vic_set(vs), .vic_way(vw)
  );

  function automatic logic [1:0] model_victim(int s);
    if (!root[s]) return left[s] ? 2'd1 : 2'd0;
    return right[s] ? 2'd3 : 2'd2;
  endfunction

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
    for (int s = 0; s < SETS; s++) begin root[s] = 0; left[s] = 0; right[s] = 0; last[s] = 2'd3; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ts = 1'($urandom); vs = 1'($urandom);
      tv = ($urandom_range(0, 1) == 0);
      tw = (n >= 2000 && n < 2004) ? 2'(n - 2000) : 2'($urandom);
      if (n >= 2000 && n < 2004) begin tv = 1; ts = 0; end
      #1;
      chk(vw == model_victim(vs), $sformatf("victim set %0d: %0d vs %0d", vs, vw, model_victim(vs)));
      if (n > 10) chk(vw != last[vs], "victim is the most recently touched way");
      if (n == 2004 && vs == 0) chk(vw == 2'd0, "after touching 0,1,2,3 the victim must be 0");
      @(posedge clk);
      if (tv) begin
        root[ts] = (tw < 2);
        if (tw < 2) left[ts] = (tw == 0); else right[ts] = (tw == 2);
        last[ts] = tw;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
