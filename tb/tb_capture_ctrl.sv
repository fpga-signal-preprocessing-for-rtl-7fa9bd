// tb_capture_ctrl: self-checking test of the result-to-FIFO writer.
//
// With a start-up wait of 50 cycles and a limit of 2^5 results, filter
// results arrive every 24 cycles. The test checks that nothing is written
// during the wait or outside write mode, that each written entry equals the
// result of its strobe, and that writing stops after exactly 32 results.
module tb_capture_ctrl;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, write_mode = 1'b0, result_ready = 1'b0;
  logic [63:0] result = '0, fifo_din;
  logic fifo_wr_en, done, armed;
  logic [5:0] samples;

  capture_ctrl #(.DATA_WIDTH(64), .SAMPLE_LIMIT_LOG2(5), .INIT_WAIT(50)) dut (
    .clk, .rst, .write_mode, .result_ready, .result, .fifo_wr_en, .fifo_din,
    .samples, .done, .armed
  );

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

  logic [63:0] expq [$];
  int n_wr = 0, cyc = 0;
  bit allow = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && fifo_wr_en) begin
      check(allow, "write only when allowed");
      if (expq.size() > 0) check(fifo_din == expq.pop_front(), "written value");
      else check(1'b0, "unexpected write");
      n_wr++;
    end
  end

  task automatic strobe(input bit expect_write);
    @(negedge clk);
    result = {$urandom, $urandom};
    result_ready = 1'b1;
    if (expect_write) expq.push_back(result);
    @(negedge clk) result_ready = 1'b0;
    repeat (22) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    write_mode = 1'b1;
    strobe(1'b0);               // still in the start-up wait
    check(!armed, "not armed during the wait");
    repeat (40) @(negedge clk);
    check(armed, "armed after the wait");
    allow = 1'b1;
    for (int i = 0; i < 10; i++) strobe(1'b1);
    allow = 1'b0;
    write_mode = 1'b0;
    for (int i = 0; i < 5; i++) strobe(1'b0);
    write_mode = 1'b1;
    allow = 1'b1;
    for (int i = 0; i < 22; i++) strobe(1'b1);
    allow = 1'b0;
    check(done, "limit reached");
    check(samples == 6'd32, $sformatf("samples %0d", samples));
    for (int i = 0; i < 5; i++) strobe(1'b0);
    check(n_wr == 32, $sformatf("32 results written, got %0d", n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
