// tb_async_fifo: self-checking test of the dual-clock FIFO in both of its
// uses: 64-bit in / 16-bit out (RATIO 4) and 16/16 (RATIO 1), each with two
// unrelated clocks.
//
// For each FIFO the test fills it until `full` (checking the capacity of 2048
// read words and that a write while full is dropped), drains it until
// `empty` (checking word order, most significant 16 bits of a wide entry
// first), then streams random data with random read and write enables on
// both sides and compares every word with a reference queue. It also checks
// that rd_count never exceeds what was written.
module tb_async_fifo;

  logic wclk = 1'b0, rclk = 1'b0;
  always #7 wclk = ~wclk;     // unrelated periods
  always #5 rclk = ~rclk;
  logic rst = 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- FIFO IN (64 -> 16)
  logic        w4_en = 1'b0, r4_en = 1'b0;
  logic [63:0] w4_din = '0;
  logic [15:0] r4_dout;
  logic        w4_full, r4_empty;
  logic [11:0] w4_count, r4_count;

  async_fifo #(.RD_WIDTH(16), .RATIO(4), .DEPTH(2048)) fifo4 (
    .wr_clk(wclk), .rd_clk(rclk), .rst, .wr_en(w4_en), .din(w4_din), .full(w4_full),
    .wr_count(w4_count), .rd_en(r4_en), .dout(r4_dout), .empty(r4_empty), .rd_count(r4_count)
  );

  // ---------------------------------------------------- FIFO OUT (16 -> 16)
  logic        w1_en = 1'b0, r1_en = 1'b0;
  logic [15:0] w1_din = '0;
  logic [15:0] r1_dout;
  logic        w1_full, r1_empty;
  logic [11:0] w1_count, r1_count;

  async_fifo #(.RD_WIDTH(16), .RATIO(1), .DEPTH(2048)) fifo1 (
    .wr_clk(rclk), .rd_clk(wclk), .rst, .wr_en(w1_en), .din(w1_din), .full(w1_full),
    .wr_count(w1_count), .rd_en(r1_en), .dout(r1_dout), .empty(r1_empty), .rd_count(r1_count)
  );

  logic [15:0] q4 [$];
  logic [15:0] q1 [$];

  // FIFO IN writer (wclk) and reader (rclk)
  int  w4_mode = 0, r4_mode = 0;   // 0 off, 1 always, 2 random
  int  n4_read = 0, n4_written = 0, dropped4 = 0;
  always @(posedge wclk) begin
    if (w4_en) begin
      if (!w4_full) begin
        for (int k = 3; k >= 0; k--) q4.push_back(w4_din[k*16 +: 16]);
        n4_written++;
      end else dropped4++;
    end
  end
  always @(negedge wclk) begin
    w4_en  <= (w4_mode == 1) || (w4_mode == 2 && $urandom_range(1) == 1);
    w4_din <= {$urandom, $urandom};
  end
  logic r4_pending = 1'b0;
  always @(posedge rclk) begin
    if (r4_pending) begin
      logic [15:0] e;
      e = q4.pop_front();
      check(r4_dout == e, $sformatf("fifo4 word %0d: got %h expected %h", n4_read, r4_dout, e));
      n4_read++;
    end
    r4_pending = r4_en && !r4_empty;
    if (!rst) check(32'(r4_count) <= q4.size(), "fifo4 rd_count within written data");
  end
  always @(negedge rclk) r4_en <= (r4_mode == 1) || (r4_mode == 2 && $urandom_range(2) == 0);

  // FIFO OUT writer (rclk) and reader (wclk)
  int w1_mode = 0, r1_mode = 0, n1_read = 0, n1_written = 0, dropped1 = 0;
  always @(posedge rclk) begin
    if (w1_en) begin
      if (!w1_full) begin q1.push_back(w1_din); n1_written++; end
      else dropped1++;
    end
  end
  always @(negedge rclk) begin
    w1_en  <= (w1_mode == 1) || (w1_mode == 2 && $urandom_range(1) == 1);
    w1_din <= 16'($urandom);
  end
  logic r1_pending = 1'b0;
  always @(posedge wclk) begin
    if (r1_pending) begin
      logic [15:0] e;
      e = q1.pop_front();
      check(r1_dout == e, $sformatf("fifo1 word %0d: got %h expected %h", n1_read, r1_dout, e));
      n1_read++;
    end
    r1_pending = r1_en && !r1_empty;
  end
  always @(negedge wclk) r1_en <= (r1_mode == 1) || (r1_mode == 2 && $urandom_range(1) == 0);

  initial begin
    repeat (4) @(posedge wclk);
    rst = 1'b0;
    repeat (4) @(posedge wclk);
    check(r4_empty && r1_empty && !w4_full && !w1_full, "empty after reset");
    // fill both
    w4_mode = 1; w1_mode = 1;
    repeat (2600) @(posedge wclk);
    w4_mode = 0; w1_mode = 0;
    repeat (10) @(posedge wclk);
    check(w4_full && w1_full, "full after filling");
    check(n4_written == 512, $sformatf("fifo4 holds 512 entries: %0d", n4_written));
    check(n1_written == 2048, $sformatf("fifo1 holds 2048 words: %0d", n1_written));
    check(dropped4 > 0 && dropped1 > 0, "writes while full were attempted");
    check(r4_count == 12'd2048 && w1_count == 12'd2048, "counts at full");
    // drain both
    r4_mode = 1; r1_mode = 1;
    repeat (3000) @(posedge wclk);
    r4_mode = 0; r1_mode = 0;
    repeat (10) @(posedge wclk);
    check(r4_empty && r1_empty, "empty after draining");
    check(n4_read == 2048 && n1_read == 2048, $sformatf("all words read: %0d %0d", n4_read, n1_read));
    check(q4.size() == 0 && q1.size() == 0, "reference queues drained");
    // random traffic
    w4_mode = 2; r4_mode = 2; w1_mode = 2; r1_mode = 2;
    repeat (20000) @(posedge wclk);
    w4_mode = 0; w1_mode = 0;
    repeat (12000) @(posedge wclk);
    r4_mode = 0; r1_mode = 0;
    repeat (10) @(posedge wclk);
    check(r4_empty && r1_empty && q4.size() == 0 && q1.size() == 0, "empty after random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
