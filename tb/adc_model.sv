// adc_model: behavioural model of the serial output of a 24-bit delta-sigma
// ADC in its high-speed mode, for testbenches only.
//
// Frames of 24 shift-clock cycles follow each other without gaps. In each
// frame the model sends a new random 24-bit word MSB first on dout and holds
// drdy high for the first DRDY_CYCLES cycles. Outputs change on the falling
// edge of sclk, so a receiver clocked on the rising edge sees stable values.
// The LSB is random, like an undriven bit. While `enable` is low no frames
// start (drdy stays low). Each new word is announced by a one-cycle
// `word_strobe` together with `word`. If `fixed_en` is high the words come
// from `fixed_word` instead of the random generator. When a frame ends,
// `frame_done` pulses for one cycle with the word of that frame in
// `frame_word`; `frame_first` marks the first frame after the stream
// (re)started, which a receiver skips.
module adc_model #(
  parameter int unsigned BITS        = 24,
  parameter int unsigned DRDY_CYCLES = 3
) (
  input  logic            sclk,
  input  logic            enable,
  input  logic            fixed_en,
  input  logic [BITS-1:0] fixed_word,
  output logic            drdy,
  output logic            dout,
  output logic            word_strobe,
  output logic [BITS-1:0] word,
  output logic            frame_done,
  output logic [BITS-1:0] frame_word,
  output logic            frame_first
);

  int unsigned cnt = 0;
  bit          active = 1'b0;
  bit          first = 1'b1;

  initial begin
    drdy = 1'b0;
    dout = 1'b0;
    word_strobe = 1'b0;
    word = '0;
    frame_done = 1'b0;
    frame_word = '0;
    frame_first = 1'b0;
  end

  always @(negedge sclk) begin
    word_strobe <= 1'b0;
    frame_done  <= 1'b0;
    if (active && cnt == BITS - 1) begin
      frame_done  <= 1'b1;
      frame_word  <= word;
      frame_first <= first;
      first = 1'b0;
    end
    if (!active) first = 1'b1;
    if (!active || cnt == BITS - 1) begin
      cnt = 0;
      active = enable;
      if (active) begin
        word = fixed_en ? fixed_word : BITS'($urandom);
        word_strobe <= 1'b1;
      end
    end else begin
      cnt++;
    end
    drdy <= active && (cnt < DRDY_CYCLES);
    dout <= active ? word[BITS-1-cnt] : 1'b0;
  end

endmodule
