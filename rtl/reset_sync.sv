// reset_sync: reset bridge for one clock domain.
//
// The reset (from the push buttons) is asynchronous to every clock. This
// bridge asserts rst_out at once when rst_in rises and releases it two
// clock edges after rst_in falls, so all flip-flops of the domain leave reset
// on the same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic stage;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage   <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage   <= 1'b0;
      rst_out <= stage;
    end
  end

endmodule
