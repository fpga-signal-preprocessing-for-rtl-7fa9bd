// led_clock_div: makes a clock visible on a board LED.
//
// A counter runs from 0 to DIV and the LED output toggles each time the
// counter wraps, so the LED blinks with a period of 2*(DIV+1) clock cycles
// (about one second for a 48-100 MHz clock and the default DIV). One divider
// per clock domain shows at a glance which clocks are running.
//
// Interface and timing: `led` is a register, cleared by reset, that toggles
// on the clock edge at which the counter equals DIV.
//
// Following the description: LEDs that show the clocks. This
// implementation's own choice: the divider value.
module led_clock_div #(
  parameter int unsigned DIV = 50_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic led
);

  localparam int unsigned CW = $clog2(DIV + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt <= '0;
      led <= 1'b0;
    end else if (cnt == CW'(DIV)) begin
      cnt <= '0;
      led <= ~led;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
