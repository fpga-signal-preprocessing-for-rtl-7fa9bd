// tb_impulse_gen: self-checking test of the on-board impulse source.
//
// With DELAY_LOG2 = 4 the output must be zero for 15 sample ticks, one for
// exactly one tick, and zero for ever after; it must not move between ticks.
module tb_impulse_gen;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, tick = 1'b0;
  logic signed [16:0] value;
  logic fired;

  impulse_gen #(.WIDTH(17), .DELAY_LOG2(4)) dut (.clk, .rst, .tick, .value, .fired);

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

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 1; n <= 60; n++) begin
      @(negedge clk) tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      // value after the n-th tick
      check(value == ((n == 16) ? 17'sd1 : 17'sd0), $sformatf("tick %0d: value %0d", n, value));
      check(fired == (n >= 16), $sformatf("tick %0d: fired %0b", n, fired));
      repeat (3) @(negedge clk);
      check(value == ((n == 16) ? 17'sd1 : 17'sd0), "value held between ticks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
