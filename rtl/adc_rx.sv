// adc_rx: receiver for the serial output of a 24-bit delta-sigma ADC.
//
// In its high-speed mode the ADC sends each 24-bit two's-complement sample
// MSB first on DOUT, one bit per cycle of its own shift clock SCLK, and
// raises DRDY for the first few (2 to 4) cycles of every 24-cycle sample
// frame. The last bit (LSB) is not driven by the converter in this mode and
// is ignored here. The first sample after a reset may be invalid and is
// skipped.
//
// State machine (clocked by SCLK):
//   INIT    wait for DRDY high                      -> SKIP
//   SKIP    let the first sample pass; DRDY low     -> IDLE
//   IDLE    wait for DRDY high (the MSB is on DOUT)  -> SAMPLE
//   SAMPLE  shift in bits 22..1, then skip the LSB  -> DATA
//   DATA    publish the sample with a one-cycle sample_valid strobe;
//           DRDY high again (next MSB)              -> SAMPLE
//           DRDY still low (frame lost)             -> INIT, resync strobe
//
// Timing: the edge that sees DRDY high (leaving IDLE or DATA) takes the MSB.
// The following 22 edges take bits 22 down to 1, the 23rd edge passes the
// LSB and enters DATA, and the 24th edge (the first edge of the next frame)
// updates `sample`, raises sample_valid for one cycle and, DRDY being high,
// already takes the next MSB. So samples come every 24 SCLK cycles and each
// stays stable for a whole frame. `sample` bit 0 is always 0.
//
// Following the description: the five states, their transitions, the skipped
// first sample and the ignored LSB. This implementation's own choices: a
// shift register in place of a down-counter with bit addressing, the exact
// edge on which each bit is taken, reset values of zero and the resync strobe.
module adc_rx
  import fpp_pkg::*;
#(
  parameter int unsigned SAMPLE_BITS = 24
) (
  input  logic                          sclk,
  input  logic                          rst,
  input  logic                          drdy,
  input  logic                          dout,
  output logic signed [SAMPLE_BITS-1:0] sample,
  output logic                          sample_valid,
  output logic                          resync,
  output adc_state_t                    state
);

  localparam int unsigned CW = $clog2(SAMPLE_BITS);

  logic [SAMPLE_BITS-2:0] shreg;    // bits SAMPLE_BITS-1 .. 1
  logic [CW-1:0]          bits_left; // data bits still to take in SAMPLE

  always_ff @(posedge sclk or posedge rst) begin
    if (rst) begin
      state        <= ADC_INIT;
      shreg        <= '0;
      bits_left    <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
      resync       <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      resync       <= 1'b0;
      unique case (state)
        ADC_INIT: begin
          if (drdy) state <= ADC_SKIP;
        end
        ADC_SKIP: begin
          if (!drdy) state <= ADC_IDLE;
        end
        ADC_IDLE: begin
          if (drdy) begin
            shreg     <= {shreg[SAMPLE_BITS-3:0], dout};
            bits_left <= CW'(SAMPLE_BITS - 2);
            state     <= ADC_SAMPLE;
          end
        end
        ADC_SAMPLE: begin
          if (bits_left != '0) begin
            shreg     <= {shreg[SAMPLE_BITS-3:0], dout};
            bits_left <= bits_left - 1'b1;
          end else begin
            state <= ADC_DATA;            // LSB cycle: bit not taken
          end
        end
        ADC_DATA: begin
          sample       <= {shreg, 1'b0};
          sample_valid <= 1'b1;
          if (drdy) begin
            shreg     <= {shreg[SAMPLE_BITS-3:0], dout};
            bits_left <= CW'(SAMPLE_BITS - 2);
            state     <= ADC_SAMPLE;
          end else begin
            resync <= 1'b1;
            state  <= ADC_INIT;
          end
        end
        default: state <= ADC_INIT;
      endcase
    end
  end

endmodule
