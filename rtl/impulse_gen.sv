// impulse_gen: on-board test source that makes a filter show its impulse
// response.
//
// After reset the output is zero. On every sample strobe (`tick`) a counter
// advances; on the 2^DELAY_LOG2-th tick the output becomes one for exactly
// one sample period and then returns to zero for good (`fired` stays high).
// Fed to a FIR filter, the output sequence 0...0, 1, 0... makes the filter
// reproduce its coefficients one per sample, which is how the design is
// checked in hardware without a signal generator.
//
// Interface and timing: `value` changes only on a clock edge that sees
// `tick`, so a consumer that samples it on the next tick sees one value per
// sample period. The waiting time lets the filter's delay line settle to zero
// first.
//
// Following the description: a single one-valued sample generated on the
// board and fed to the filter instead of the ADC data. This implementation's
// own choice: the length of the initial wait (DELAY_LOG2).
module impulse_gen #(
  parameter int unsigned WIDTH      = 17,
  parameter int unsigned DELAY_LOG2 = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    tick,
  output logic signed [WIDTH-1:0] value,
  output logic                    fired
);

  logic [DELAY_LOG2:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt   <= '0;
      value <= '0;
      fired <= 1'b0;
    end else if (tick) begin
      value <= '0;
      if (!fired) begin
        if (cnt == (DELAY_LOG2+1)'((1 << DELAY_LOG2) - 1)) begin
          value <= WIDTH'(1);
          fired <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
