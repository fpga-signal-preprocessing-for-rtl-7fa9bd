// capture_ctrl: writes filter results into the SDRAM input FIFO.
//
// Every filter result (in a multi-carrier build, the sum of all filter
// outputs) becomes one 64-bit FIFO entry, four 16-bit SDRAM words. Writing
// starts only after a fixed start-up wait that gives the SDRAM time to finish
// its initialisation, happens only while the memory is in write mode, and
// stops for good once 2^SAMPLE_LIMIT_LOG2 results have been written (2^22
// results of 8 bytes fill the 32 MB memory).
//
// Interface and timing (all in the filter clock domain):
//   result_ready/result  one-cycle strobe and value from the filter(s)
//   write_mode           high while the memory is being filled (synchronised
//                        to this clock by the caller)
//   fifo_wr_en/fifo_din  registered: the edge that sees result_ready writes
//                        result to fifo_din and raises fifo_wr_en for one
//                        cycle
//   samples              number of results written so far
//   done                 high once the limit is reached
//   armed                high once the start-up wait is over
//
// Following the description: the 64-bit entries, the sample counter and its
// 32 MB limit, writing only in write mode. This implementation's own choices:
// the length of the start-up wait and that the count is not restarted by a
// mode change (only reset restarts a capture).
module capture_ctrl #(
  parameter int unsigned DATA_WIDTH        = 64,
  parameter int unsigned SAMPLE_LIMIT_LOG2 = 22,
  parameter int unsigned INIT_WAIT         = 4000
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         write_mode,
  input  logic                         result_ready,
  input  logic [DATA_WIDTH-1:0]        result,
  output logic                         fifo_wr_en,
  output logic [DATA_WIDTH-1:0]        fifo_din,
  output logic [SAMPLE_LIMIT_LOG2:0]   samples,
  output logic                         done,
  output logic                         armed
);

  localparam int unsigned WW = $clog2(INIT_WAIT + 1);

  logic [WW-1:0] wait_cnt;

  assign done = samples[SAMPLE_LIMIT_LOG2];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wait_cnt   <= '0;
      armed      <= 1'b0;
      samples    <= '0;
      fifo_wr_en <= 1'b0;
      fifo_din   <= '0;
    end else begin
      fifo_wr_en <= 1'b0;
      if (!armed) begin
        if (wait_cnt == WW'(INIT_WAIT)) armed <= 1'b1;
        else                            wait_cnt <= wait_cnt + 1'b1;
      end
      if (armed && write_mode && !done && result_ready) begin
        fifo_din   <= result;
        fifo_wr_en <= 1'b1;
        samples    <= samples + 1'b1;
      end
    end
  end

endmodule
