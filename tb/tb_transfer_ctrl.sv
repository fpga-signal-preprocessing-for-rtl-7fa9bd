// tb_transfer_ctrl: self-checking test of the host-controlled memory mode.
//
// Checks reset into state A (write), the switch to B (read) on the read
// trigger and back on the write trigger, that triggers for the current state
// change nothing, and the status word {0, row address, 0x0A or 0x0B}.
module tb_transfer_ctrl;
  import fpp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, trig_write = 1'b0, trig_read = 1'b0;
  logic [14:0] rowaddr = '0;
  logic wr_en, rd_en;
  logic [23:0] status;
  xfer_state_t mode;

  transfer_ctrl dut (.clk, .rst, .trig_write, .trig_read, .rowaddr, .wr_en, .rd_en, .status, .mode);

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

  task automatic pulse(input bit rd);
    @(negedge clk);
    if (rd) trig_read = 1'b1; else trig_write = 1'b1;
    @(negedge clk);
    trig_read = 1'b0; trig_write = 1'b0;
  endtask

  task automatic expect_mode(input bit b, input string what);
    rowaddr = 15'($urandom);
    #1;
    check(wr_en == !b && rd_en == b, {what, ": enables"});
    check(status == {1'b0, rowaddr, b ? 8'h0B : 8'h0A}, $sformatf("%s: status %h", what, status));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_mode(1'b0, "after reset");
    pulse(1'b0); expect_mode(1'b0, "write trigger in A");
    pulse(1'b1); expect_mode(1'b1, "read trigger");
    pulse(1'b1); expect_mode(1'b1, "read trigger in B");
    pulse(1'b0); expect_mode(1'b0, "write trigger");
    for (int i = 0; i < 50; i++) begin
      bit r;
      bit cur;
      cur = rd_en;
      r = 1'($urandom);
      pulse(r);
      expect_mode(r, "random trigger");
      if (r != cur) check(1'b1, "switched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
