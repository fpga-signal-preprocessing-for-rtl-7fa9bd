// tb_fifo_faults: self-checking test of the four sticky FIFO alarms.
//
// Each alarm must stay low for legal accesses (enable without full/empty,
// or full/empty without enable), rise on the first illegal access in its own
// clock domain, stay high afterwards, and leave the other alarms alone; reset
// clears all four. The alarms are checked on every step of the legal
// traffic. Finally each alarm is raised alone, in random order, after a
// fresh reset.
module tb_fifo_faults;

  logic c1 = 1'b0, c2 = 1'b0, c3 = 1'b0;
  always #5 c1 = ~c1;
  always #4 c2 = ~c2;
  always #7 c3 = ~c3;
  logic rst = 1'b1;
  logic in_wr_en = 0, in_full = 0, in_rd_en = 0, in_empty = 0;
  logic out_wr_en = 0, out_full = 0, out_rd_en = 0, out_empty = 0;
  logic f_in_full, f_in_empty, f_out_full, f_out_empty;

  fifo_faults dut (
    .wr_clk_in(c1), .sdram_clk(c2), .rd_clk_out(c3), .rst,
    .in_wr_en, .in_full, .in_rd_en, .in_empty, .out_wr_en, .out_full, .out_rd_en, .out_empty,
    .fifo_in_full(f_in_full), .fifo_in_empty(f_in_empty),
    .fifo_out_full(f_out_full), .fifo_out_empty(f_out_empty)
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
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] flags();
    return {f_in_full, f_in_empty, f_out_full, f_out_empty};
  endfunction

  // legal accesses on all four sides; the alarms must keep their value
  task automatic legal(input logic [3:0] expect_flags);
    for (int i = 0; i < 40; i++) begin
      #3;
      check(flags() == expect_flags, $sformatf("alarms %b during legal traffic", flags()));
      {in_wr_en, in_full}   = ($urandom_range(1)) ? 2'b10 : 2'b01;
      {in_rd_en, in_empty}  = ($urandom_range(1)) ? 2'b10 : 2'b01;
      {out_wr_en, out_full} = ($urandom_range(1)) ? 2'b10 : 2'b01;
      {out_rd_en, out_empty}= ($urandom_range(1)) ? 2'b10 : 2'b01;
    end
    #3;
    {in_wr_en, in_full, in_rd_en, in_empty, out_wr_en, out_full, out_rd_en, out_empty} = '0;
    #20;
  endtask

  initial begin
    #20 rst = 1'b0;
    legal(4'b0000);
    check(flags() == 4'b0000, "no alarm for legal accesses");
    // one fault at a time, in order: in_full, in_empty, out_full, out_empty
    in_wr_en = 1; in_full = 1;  @(posedge c1); #1; in_wr_en = 0; in_full = 0;
    #20 check(flags() == 4'b1000, "write to full input FIFO");
    in_rd_en = 1; in_empty = 1; @(posedge c2); #1; in_rd_en = 0; in_empty = 0;
    #20 check(flags() == 4'b1100, "read from empty input FIFO");
    out_wr_en = 1; out_full = 1; @(posedge c2); #1; out_wr_en = 0; out_full = 0;
    #20 check(flags() == 4'b1110, "write to full output FIFO");
    out_rd_en = 1; out_empty = 1; @(posedge c3); #1; out_rd_en = 0; out_empty = 0;
    #20 check(flags() == 4'b1111, "read from empty output FIFO");
    legal(4'b1111);
    check(flags() == 4'b1111, "alarms held");
    rst = 1'b1; #20 rst = 1'b0;
    check(flags() == 4'b0000, "cleared by reset");
    // each alarm alone, in random order, from a clean reset
    for (int r = 0; r < 8; r++) begin
      int which;
      which = $urandom_range(3);
      rst = 1'b1; #20 rst = 1'b0;
      legal(4'b0000);
      unique case (which)
        0: begin in_wr_en = 1; in_full = 1;   @(posedge c1); #1; in_wr_en = 0; in_full = 0; end
        1: begin in_rd_en = 1; in_empty = 1;  @(posedge c2); #1; in_rd_en = 0; in_empty = 0; end
        2: begin out_wr_en = 1; out_full = 1; @(posedge c2); #1; out_wr_en = 0; out_full = 0; end
        default: begin out_rd_en = 1; out_empty = 1; @(posedge c3); #1; out_rd_en = 0; out_empty = 0; end
      endcase
      #20;
      legal(4'b1000 >> which);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
