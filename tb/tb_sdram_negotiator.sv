// tb_sdram_negotiator: self-checking test of the SDRAM page negotiator.
//
// A small controller model acknowledges each command a few cycles after it
// is raised and reports done some cycles later. The test checks that a page
// write starts only when the input FIFO holds a page and writes are enabled,
// a page read only when the output FIFO has room for a page and reads are
// enabled, that writes win when both are possible, that each command uses
// and then advances its own row pointer, and that the command is held until
// acknowledged.
module tb_sdram_negotiator;
  import fpp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, wr_enable = 1'b0, rd_enable = 1'b0, cmd_ack = 1'b0, cmd_done = 1'b0;
  logic [11:0] fifo_in_count = '0, fifo_out_count = '0;
  logic cmd_pagewrite, cmd_pageread;
  logic [14:0] rowaddr, wr_ptr, rd_ptr;
  neg_state_t state;

  sdram_negotiator dut (
    .clk, .rst, .wr_enable, .rd_enable, .fifo_in_count, .fifo_out_count,
    .cmd_pagewrite, .cmd_pageread, .cmd_ack, .cmd_done, .rowaddr, .wr_ptr, .rd_ptr, .state
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

  // wait up to n cycles for a command; returns 0 = none, 1 = write, 2 = read
  task automatic wait_cmd(input int n, output int kind, output logic [14:0] row);
    kind = 0;
    row = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      if (cmd_pagewrite || cmd_pageread) begin
        kind = cmd_pagewrite ? 1 : 2;
        row = rowaddr;
        return;
      end
    end
  endtask

  // acknowledge after `lag` cycles, checking that the command is held
  task automatic serve(input int kind, input int lag);
    for (int i = 0; i < lag; i++) begin
      check(kind == 1 ? cmd_pagewrite : cmd_pageread, "command held until ack");
      @(negedge clk);
    end
    cmd_ack = 1'b1;
    @(negedge clk) cmd_ack = 1'b0;
    check(!cmd_pagewrite && !cmd_pageread, "command dropped after ack");
    repeat (10) @(negedge clk);
    cmd_done = 1'b1;
    @(negedge clk) cmd_done = 1'b0;
  endtask

  int kind;
  logic [14:0] row;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // write mode, FIFO holds less than a page: nothing
    wr_enable = 1'b1;
    fifo_in_count = 12'd511;
    wait_cmd(20, kind, row);
    check(kind == 0, "no write below one page");
    // a full page: three page writes to rows 0, 1, 2
    fifo_in_count = 12'd600;
    for (int p = 0; p < 3; p++) begin
      wait_cmd(20, kind, row);
      check(kind == 1 && row == 15'(p), $sformatf("page write %0d to row %0d (kind %0d)", p, row, kind));
      @(negedge clk);
      serve(kind, 3);
    end
    check(wr_ptr == 15'd3 && rd_ptr == 15'd0, "pointers after writes");
    // read enabled too, and both possible: write wins
    rd_enable = 1'b1;
    fifo_out_count = 12'd0;
    wait_cmd(20, kind, row);
    check(kind == 1 && row == 15'd3, "write has priority");
    @(negedge clk);
    serve(kind, 1);
    // read mode only
    wr_enable = 1'b0;
    fifo_out_count = 12'd1537;                 // less than a page of room
    wait_cmd(20, kind, row);
    check(kind == 0, "no read without room for a page");
    fifo_out_count = 12'd1536;
    for (int p = 0; p < 2; p++) begin
      wait_cmd(20, kind, row);
      check(kind == 2 && row == 15'(p), $sformatf("page read %0d from row %0d", p, row));
      @(negedge clk);
      serve(kind, 2);
    end
    check(wr_ptr == 15'd4 && rd_ptr == 15'd2, "pointers after reads");
    rd_enable = 1'b0;
    wait_cmd(20, kind, row);
    check(kind == 0, "idle when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
