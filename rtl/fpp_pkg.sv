// fpp_pkg: types and constants shared by the receiver preprocessing design.
//
// The design receives 24-bit samples from a serial delta-sigma ADC, filters
// them with symmetric FIR filters, and streams the filter results through an
// SDRAM page buffer towards a host PC. This package holds the state encodings
// of the three state machines and the sizes that several modules agree on.
// The sizes follow the design description (24-bit ADC words, 512 x 16-bit
// SDRAM pages, 15-bit row addresses for a 32 MB memory); the enum encodings
// are this implementation's own choice.
package fpp_pkg;

  // ADC serial word length; the last (LSB) bit is not driven in high-speed mode
  localparam int unsigned ADC_BITS   = 24;
  // Filter input width: the top 17 bits of each ADC word
  localparam int unsigned FILT_IN_W  = 17;
  // One SDRAM page (block) in 16-bit words
  localparam int unsigned PAGE_WORDS = 512;
  // Row (page) address width: 32 MB / 1 kB per page = 2^15 pages
  localparam int unsigned ROW_BITS   = 15;
  // Width of a filter result as stored in the SDRAM
  localparam int unsigned RESULT_W   = 64;

  // ADC sample receiving state machine
  typedef enum logic [2:0] {
    ADC_INIT   = 3'd0,   // wait for the first DRDY after reset
    ADC_SKIP   = 3'd1,   // let the first (possibly invalid) sample pass
    ADC_IDLE   = 3'd2,   // wait for the start of the next sample
    ADC_SAMPLE = 3'd3,   // shift in bits MSB first
    ADC_DATA   = 3'd4    // publish the sample, expect the next DRDY
  } adc_state_t;

  // Memory mode selected by the host: A = fill SDRAM, B = read SDRAM out
  typedef enum logic {
    XFER_A_WRITE = 1'b0,
    XFER_B_READ  = 1'b1
  } xfer_state_t;

  // Page transfer negotiator between the FIFOs and the SDRAM controller
  typedef enum logic [1:0] {
    NEG_IDLE  = 2'd0,
    NEG_W_ACK = 2'd1,    // page write requested, waiting for acknowledge
    NEG_R_ACK = 2'd2,    // page read requested, waiting for acknowledge
    NEG_BUSY  = 2'd3     // controller is moving a page
  } neg_state_t;

  // Filter input source select (the on-board test sources of the design)
  typedef enum logic [1:0] {
    SRC_ADC     = 2'd0,  // trimmed ADC samples
    SRC_IMPULSE = 2'd1,  // single one-valued sample: impulse response test
    SRC_ONE     = 2'd2   // constant one: step response test
  } src_sel_t;

endpackage
