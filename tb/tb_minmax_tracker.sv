// tb_minmax_tracker: self-checking test of the sample extremes tracker.
//
// Feeds random signed samples, some with `en` low, and compares both
// registers with extremes computed in the testbench after every cycle.
module tb_minmax_tracker;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, en = 1'b0;
  logic signed [23:0] sample = '0, min_val, max_val;

  minmax_tracker dut (.clk, .rst, .en, .sample, .min_val, .max_val);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [23:0] emin, emax;

  initial begin
    emin = 24'sh7FFFFF;
    emax = -24'sh800000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(min_val == emin && max_val == emax, "reset values");
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      // narrow range first, so the extremes keep moving for a while
      sample = (i < 500) ? 24'($signed(24'($urandom_range(2000))) - 1000) : 24'($urandom);
      if (en && sample < emin) emin = sample;
      if (en && sample > emax) emax = sample;
      @(posedge clk); #1;
      check(min_val == emin, $sformatf("min %0d expected %0d", min_val, emin));
      check(max_val == emax, $sformatf("max %0d expected %0d", max_val, emax));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
