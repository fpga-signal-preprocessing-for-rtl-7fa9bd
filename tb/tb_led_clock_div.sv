// tb_led_clock_div: self-checking test of the LED clock divider with DIV = 9:
// the LED must toggle every 10 clock cycles, starting low after reset.
module tb_led_clock_div;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, led;

  led_clock_div #(.DIV(9)) dut (.clk, .rst, .led);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, cyc;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(led == 1'b0, "low after reset");
    last = -1;
    cyc = 0;
    for (int i = 0; i < 400; i++) begin
      logic prev;
      prev = led;
      @(posedge clk); #1;
      cyc++;
      if (led != prev) begin
        if (last < 0) check(cyc == 10, $sformatf("first toggle after %0d cycles", cyc));
        else          check(cyc - last == 10, $sformatf("toggle period %0d", cyc - last));
        last = cyc;
      end
    end
    check(last > 0, "led toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
