// bit_sync: two-flip-flop synchroniser for a slowly changing signal (or a
// Gray-coded bus) that crosses into the `clk` domain.
//
// Interface and timing: `q` follows `d` two to three `clk` edges later. Reset
// clears both stages. Each bit is synchronised on its own, so a bus is only
// safe when at most one bit changes at a time (Gray code) or when it is
// stable for several destination cycles.
module bit_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
