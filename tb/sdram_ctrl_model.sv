// sdram_ctrl_model: behavioural model of the SDRAM controller side of the
// page interface, for testbenches only.
//
// On a page-write command it acknowledges after ACK_LAG cycles, then reads
// PAGE words from the input FIFO (one read strobe per cycle, data taken one
// cycle after each strobe, sampled on falling edges), stores them under the row address that came with
// the command and reports done. On a page-read command it acknowledges, then
// writes the PAGE words of that row into the output FIFO and reports done.
// Rows never written read back as 16'hA5A5. It counts pages written and read.
module sdram_ctrl_model #(
  parameter int unsigned PAGE    = 512,
  parameter int unsigned ACK_LAG = 3
) (
  input  logic        clk,
  input  logic        cmd_pagewrite,
  input  logic        cmd_pageread,
  input  logic [14:0] rowaddr,
  output logic        cmd_ack,
  output logic        cmd_done,
  output logic        fifo_in_rd,
  input  logic [15:0] fifo_in_dout,
  output logic        fifo_out_wr,
  output logic [15:0] fifo_out_din,
  output int          pages_written,
  output int          pages_read
);

  logic [15:0] mem [int];

  initial begin
    cmd_ack = 1'b0;
    cmd_done = 1'b0;
    fifo_in_rd = 1'b0;
    fifo_out_wr = 1'b0;
    fifo_out_din = '0;
    pages_written = 0;
    pages_read = 0;
  end

  initial begin
    forever begin
      @(negedge clk);
      if (cmd_pagewrite || cmd_pageread) begin
        bit          wr;
        int          base;
        wr   = cmd_pagewrite;
        base = int'(rowaddr) * int'(PAGE);
        repeat (ACK_LAG) @(negedge clk);
        cmd_ack = 1'b1;
        @(negedge clk) cmd_ack = 1'b0;
        if (wr) begin
          // strobe on one edge, take the data after it
          for (int i = 0; i <= int'(PAGE); i++) begin
            if (i > 0) mem[base + i - 1] = fifo_in_dout;
            fifo_in_rd = (i < int'(PAGE));
            @(negedge clk);
          end
          fifo_in_rd = 1'b0;
          pages_written++;
        end else begin
          for (int i = 0; i < int'(PAGE); i++) begin
            fifo_out_wr  = 1'b1;
            fifo_out_din = mem.exists(base + i) ? mem[base + i] : 16'hA5A5;
            @(negedge clk);
          end
          fifo_out_wr = 1'b0;
          pages_read++;
        end
        repeat (2) @(negedge clk);
        cmd_done = 1'b1;
        @(negedge clk) cmd_done = 1'b0;
      end
    end
  end

endmodule
