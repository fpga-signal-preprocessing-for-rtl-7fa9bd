// minmax_tracker: keeps the smallest and the largest signed sample seen
// since reset.
//
// It is a debugging aid for the ADC path: with no input signal the spread
// between the two extremes measures the converter's noise, and after a
// capture both extremes must be found among the stored samples, a quick check
// that the memory path holds the data.
//
// Interface and timing: on every clock edge with `en` high, `sample` is
// compared with both registers and replaces the one it exceeds. Reset sets
// min_val to the largest and max_val to the smallest representable value, so
// the first sample becomes both extremes.
//
// Following the description: the two registers, their reset to the opposite
// ends of the range and their use as a noise measure. This implementation's
// own choice: min and max are updated independently, on every ADC sample.
module minmax_tracker #(
  parameter int unsigned WIDTH = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [WIDTH-1:0] sample,
  output logic signed [WIDTH-1:0] min_val,
  output logic signed [WIDTH-1:0] max_val
);

  localparam logic signed [WIDTH-1:0] MOST_POS = {1'b0, {(WIDTH-1){1'b1}}};
  localparam logic signed [WIDTH-1:0] MOST_NEG = {1'b1, {(WIDTH-1){1'b0}}};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      min_val <= MOST_POS;
      max_val <= MOST_NEG;
    end else if (en) begin
      if (sample < min_val) min_val <= sample;
      if (sample > max_val) max_val <= sample;
    end
  end

endmodule
