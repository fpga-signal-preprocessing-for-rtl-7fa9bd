// fpp_top: FPGA signal preprocessing for a digital wireless receiver.
//
// The FPGA sits between a 24-bit delta-sigma ADC and the rest of a base-station
// receiver and replaces fixed analog channel filters by reprogrammable
// band-pass FIR filters (TETRA and TEDS channels). For evaluation, the filter
// output is stored in an SDRAM and read out to a PC over USB.
//
// Data path:
//   ADC serial stream -> adc_rx (24-bit samples, one per 24 SCLK cycles)
//     -> input select: top 17 ADC bits | on-board impulse | constant one
//     -> NUM_FILTERS x sym_fir_filter (8 multipliers x 24 cycles, order 383)
//     -> outputs added (each first shifted to a common radix point)
//     -> capture_ctrl (the filter sum, or the raw ADC samples if store_raw)
//     -> FIFO IN (64-bit write, 16-bit read)
//     -> sdram_negotiator <-> external SDRAM controller (512-word pages)
//     -> FIFO OUT -> USB pipe to the PC
// Around it: min/max tracking of the ADC samples, the host-controlled write /
// read mode (transfer_ctrl), four sticky FIFO fault flags, the status word for
// the PC and clock-divider LEDs.
//
// Clock domains: sclk (the ADC's shift clock, 3 x the 30 MHz ADC clock, also
// the filter clock), sdram_clk (100 MHz, SDRAM side of both FIFOs and the
// negotiator) and ti_clk (48 MHz USB clock: mode, output FIFO read). Only
// the FIFOs carry data across domains; mode enables and the row address cross
// through two-flip-flop synchronisers, the reset through one reset bridge
// per domain. Reset is both (active-low) push buttons held together.
//
// External parts that are not part of this RTL connect through ports: the
// ADC's LVDS pins after their input buffers (drdy, dout, sclk), the ADC
// control pins, the SDRAM controller (page commands and its FIFO-side
// strobes), the USB host interface endpoints (two trigger bits, the pipe-out
// read strobe and data, and the 24-bit value sent through two 16-bit
// wire-outs), and a coefficient write port for the processor that is meant to
// supply filter coefficients.
//
// Following the description: the blocks, their clocks and connections, the
// ADC pin settings, the sum of the filter outputs, the button and LED use.
// This implementation's own choices are listed in each module's header; at
// this level they are the reset bridges and synchronisers, the coefficient
// port, the src_sel input that selects among the test sources and the
// store_raw input that stores unfiltered samples (the original chose both by
// rebuilding the FPGA). Raw samples are stored sign-extended to 64 bits.
//
// Lint notes: several sub-block outputs are left unused here on purpose: the
// ADC receiver's state and resync strobe, the impulse source's fired flag,
// filter 1's ready strobe (it always equals filter 0's), the transfer mode,
// the capture counter and armed flag, the FIFO counts not needed by the
// negotiator, and the negotiator's pointers and state. They are debug
// signals for a logic analyser and cost nothing after synthesis.
module fpp_top
  import fpp_pkg::*;
#(
  parameter int unsigned NUM_FILTERS       = 2,
  parameter int unsigned MULTS             = 8,
  parameter int unsigned CYCLES            = 24,
  parameter int unsigned SHIFT_A           = 0,
  parameter int unsigned SHIFT_B           = 0,
  parameter int unsigned FIFO_DEPTH        = 2048,
  parameter int unsigned PAGE_WORDS_P      = PAGE_WORDS,
  parameter int unsigned SAMPLE_LIMIT_LOG2 = 22,
  parameter int unsigned INIT_WAIT         = 4000,
  parameter int unsigned IMPULSE_DELAY_LOG2 = 12,
  parameter int unsigned LED_DIV           = 50_000_000,
  localparam int unsigned AW  = (CYCLES > 1) ? $clog2(CYCLES) : 1,
  localparam int unsigned LW  = (MULTS  > 1) ? $clog2(MULTS)  : 1,
  localparam int unsigned FSW = (NUM_FILTERS > 1) ? $clog2(NUM_FILTERS) : 1,
  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1
) (
  // clocks and buttons
  input  logic                 sclk,
  input  logic                 sdram_clk,
  input  logic                 ti_clk,
  input  logic                 btn_left_n,
  input  logic                 btn_right_n,
  // ADC serial interface (after the LVDS input buffers)
  input  logic                 drdy,
  input  logic                 dout,
  // ADC control pins
  output logic                 adc_start,
  output logic                 adc_pdwn_n,
  output logic                 adc_clk_sel,
  output logic                 adc_lvds,
  output logic                 adc_ll_cfg,
  output logic                 adc_fpath,
  output logic [2:0]           adc_drate,
  output logic                 adc_cs_n,
  // filter input select and coefficient load (sclk domain)
  input  src_sel_t             src_sel,
  input  logic                 store_raw,
  input  logic                 coef_we,
  input  logic [FSW-1:0]       coef_sel,
  input  logic [AW-1:0]        coef_addr,
  input  logic [LW-1:0]        coef_lane,
  input  logic signed [17:0]   coef_data,
  // SDRAM controller: page commands (sdram_clk domain)
  output logic                 cmd_pagewrite,
  output logic                 cmd_pageread,
  output logic [ROW_BITS-1:0]  rowaddr,
  input  logic                 cmd_ack,
  input  logic                 cmd_done,
  // SDRAM controller: FIFO side (sdram_clk domain)
  input  logic                 ctl_fifo_in_rd,
  output logic [15:0]          ctl_fifo_in_dout,
  input  logic                 ctl_fifo_out_wr,
  input  logic [15:0]          ctl_fifo_out_din,
  // USB host interface endpoints (ti_clk domain)
  input  logic                 trig_write,
  input  logic                 trig_read,
  input  logic                 pipe_rd,
  output logic [15:0]          pipe_data,
  output logic [23:0]          hi_data,
  // status
  output logic                 filter_overrun,
  output logic                 capture_done,
  output logic [7:0]           led
);

  // ------------------------------------------------------------ resets
  logic rst_btn, rst_s, rst_m, rst_u;

  assign rst_btn = !btn_left_n && !btn_right_n;

  reset_sync u_rst_s (.clk(sclk),      .rst_in(rst_btn), .rst_out(rst_s));
  reset_sync u_rst_m (.clk(sdram_clk), .rst_in(rst_btn), .rst_out(rst_m));
  reset_sync u_rst_u (.clk(ti_clk),    .rst_in(rst_btn), .rst_out(rst_u));

  // ------------------------------------------------------ ADC pin setup
  // high-speed mode: wide-bandwidth filter path, fastest data rate,
  // continuous conversion while not in reset
  assign adc_start   = !rst_btn;
  assign adc_pdwn_n  = 1'b1;     // never powered down
  assign adc_clk_sel = 1'b0;     // shift clock generated inside the ADC
  assign adc_lvds    = 1'b0;     // LVDS outputs
  assign adc_ll_cfg  = 1'b1;     // low-latency filter setting (unused path)
  assign adc_fpath   = 1'b0;     // wide-bandwidth filter
  assign adc_drate   = 3'b101;   // 4 MSPS high-speed rate
  assign adc_cs_n    = 1'b0;     // always selected

  // ------------------------------------------------------------ ADC receive
  logic signed [ADC_BITS-1:0] adc_sample;
  logic                       adc_valid;
  logic                       adc_resync;
  adc_state_t                 adc_state;

  adc_rx #(.SAMPLE_BITS(ADC_BITS)) u_adc (
    .sclk         (sclk),
    .rst          (rst_s),
    .drdy         (drdy),
    .dout         (dout),
    .sample       (adc_sample),
    .sample_valid (adc_valid),
    .resync       (adc_resync),
    .state        (adc_state)
  );

  logic signed [ADC_BITS-1:0] min_val, max_val;

  minmax_tracker #(.WIDTH(ADC_BITS)) u_minmax (
    .clk     (sclk),
    .rst     (rst_s),
    .en      (adc_valid),
    .sample  (adc_sample),
    .min_val (min_val),
    .max_val (max_val)
  );

  // ----------------------------------------------------- filter input
  logic signed [FILT_IN_W-1:0] impulse_val;
  logic                        impulse_fired;
  logic signed [FILT_IN_W-1:0] filt_in;

  impulse_gen #(.WIDTH(FILT_IN_W), .DELAY_LOG2(IMPULSE_DELAY_LOG2)) u_impulse (
    .clk   (sclk),
    .rst   (rst_s),
    .tick  (adc_valid),
    .value (impulse_val),
    .fired (impulse_fired)
  );

  always_comb begin
    unique case (src_sel)
      SRC_IMPULSE: filt_in = impulse_val;
      SRC_ONE:     filt_in = FILT_IN_W'(1);
      default:     filt_in = adc_sample[ADC_BITS-1 -: FILT_IN_W];
    endcase
  end

  // ----------------------------------------------------------- filters
  logic signed [RESULT_W-1:0] filt_res [NUM_FILTERS];
  logic [NUM_FILTERS-1:0]     filt_rdy, filt_ovr;
  logic signed [RESULT_W-1:0] res_sum;

  for (genvar i = 0; i < int'(NUM_FILTERS); i++) begin : g_filt
    sym_fir_filter #(
      .INPUT_WIDTH  (FILT_IN_W),
      .MULT_WIDTH   (18),
      .COEF_WIDTH   (18),
      .MULTS        (MULTS),
      .CYCLES       (CYCLES),
      .FRAC_SHIFT   ((i == 0) ? SHIFT_A : SHIFT_B),
      .RESULT_WIDTH (RESULT_W)
    ) u_fir (
      .clk          (sclk),
      .rst          (rst_s),
      .new_data     (adc_valid),
      .data         (filt_in),
      .coef_we      (coef_we && (32'(coef_sel) == i)),
      .coef_addr    (coef_addr),
      .coef_lane    (coef_lane),
      .coef_data    (coef_data),
      .result       (filt_res[i]),
      .result_ready (filt_rdy[i]),
      .overrun      (filt_ovr[i])
    );
  end

  always_comb begin
    res_sum = '0;
    for (int i = 0; i < int'(NUM_FILTERS); i++) res_sum += filt_res[i];
  end

  assign filter_overrun = |filt_ovr;

  // ---------------------------------------------------------- mode (USB)
  logic                 xfer_wr_en, xfer_rd_en;
  logic [ROW_BITS+8:0]  xfer_status;
  xfer_state_t          xfer_mode;
  logic [ROW_BITS-1:0]  rowaddr_u;

  bit_sync #(.WIDTH(ROW_BITS)) u_sync_row (
    .clk(ti_clk), .rst(rst_u), .d(rowaddr), .q(rowaddr_u)
  );

  transfer_ctrl #(.RBITS(ROW_BITS)) u_xfer (
    .clk        (ti_clk),
    .rst        (rst_u),
    .trig_write (trig_write),
    .trig_read  (trig_read),
    .rowaddr    (rowaddr_u),
    .wr_en      (xfer_wr_en),
    .rd_en      (xfer_rd_en),
    .status     (xfer_status),
    .mode       (xfer_mode)
  );

  // ----------------------------------------------------- capture to FIFO IN
  logic                          write_mode_s;
  logic                          fin_wr_en;
  logic [RESULT_W-1:0]           fin_din;
  logic [SAMPLE_LIMIT_LOG2:0]    cap_samples;
  logic                          cap_armed;

  // what is stored: the filter output sum, or the raw ADC samples
  logic                          cap_rdy;
  logic [RESULT_W-1:0]           cap_data;

  always_comb begin
    if (store_raw) begin
      cap_rdy  = adc_valid;
      cap_data = RESULT_W'(adc_sample);        // sign-extended
    end else begin
      cap_rdy  = filt_rdy[0];
      cap_data = res_sum;
    end
  end

  bit_sync #(.WIDTH(1)) u_sync_wm (
    .clk(sclk), .rst(rst_s), .d(xfer_wr_en), .q(write_mode_s)
  );

  capture_ctrl #(
    .DATA_WIDTH        (RESULT_W),
    .SAMPLE_LIMIT_LOG2 (SAMPLE_LIMIT_LOG2),
    .INIT_WAIT         (INIT_WAIT)
  ) u_capture (
    .clk          (sclk),
    .rst          (rst_s),
    .write_mode   (write_mode_s),
    .result_ready (cap_rdy),
    .result       (cap_data),
    .fifo_wr_en   (fin_wr_en),
    .fifo_din     (fin_din),
    .samples      (cap_samples),
    .done         (capture_done),
    .armed        (cap_armed)
  );

  // ------------------------------------------------------------- FIFOs
  logic           fin_full, fin_empty;
  logic [FCW-1:0] fin_wr_count, fin_rd_count;
  logic           fout_full, fout_empty;
  logic [FCW-1:0] fout_wr_count, fout_rd_count;

  async_fifo #(.RD_WIDTH(16), .RATIO(RESULT_W / 16), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .wr_clk   (sclk),
    .rd_clk   (sdram_clk),
    .rst      (rst_s),
    .wr_en    (fin_wr_en),
    .din      (fin_din),
    .full     (fin_full),
    .wr_count (fin_wr_count),
    .rd_en    (ctl_fifo_in_rd),
    .dout     (ctl_fifo_in_dout),
    .empty    (fin_empty),
    .rd_count (fin_rd_count)
  );

  async_fifo #(.RD_WIDTH(16), .RATIO(1), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .wr_clk   (sdram_clk),
    .rd_clk   (ti_clk),
    .rst      (rst_m),
    .wr_en    (ctl_fifo_out_wr),
    .din      (ctl_fifo_out_din),
    .full     (fout_full),
    .wr_count (fout_wr_count),
    .rd_en    (pipe_rd),
    .dout     (pipe_data),
    .empty    (fout_empty),
    .rd_count (fout_rd_count)
  );

  // -------------------------------------------------- page negotiation
  logic           wr_enable_m, rd_enable_m;
  logic [ROW_BITS-1:0] neg_wr_ptr, neg_rd_ptr;
  neg_state_t     neg_state;

  bit_sync #(.WIDTH(2)) u_sync_mode (
    .clk(sdram_clk), .rst(rst_m), .d({xfer_wr_en, xfer_rd_en}), .q({wr_enable_m, rd_enable_m})
  );

  sdram_negotiator #(.PAGE(PAGE_WORDS_P), .RBITS(ROW_BITS), .DEPTH(FIFO_DEPTH)) u_neg (
    .clk            (sdram_clk),
    .rst            (rst_m),
    .wr_enable      (wr_enable_m),
    .rd_enable      (rd_enable_m),
    .fifo_in_count  (fin_rd_count),
    .fifo_out_count (fout_wr_count),
    .cmd_pagewrite  (cmd_pagewrite),
    .cmd_pageread   (cmd_pageread),
    .cmd_ack        (cmd_ack),
    .cmd_done       (cmd_done),
    .rowaddr        (rowaddr),
    .wr_ptr         (neg_wr_ptr),
    .rd_ptr         (neg_rd_ptr),
    .state          (neg_state)
  );

  // ------------------------------------------------------- FIFO faults
  logic flt_in_full, flt_in_empty, flt_out_full, flt_out_empty;

  fifo_faults u_faults (
    .wr_clk_in      (sclk),
    .sdram_clk      (sdram_clk),
    .rd_clk_out     (ti_clk),
    .rst            (rst_btn),
    .in_wr_en       (fin_wr_en),
    .in_full        (fin_full),
    .in_rd_en       (ctl_fifo_in_rd),
    .in_empty       (fin_empty),
    .out_wr_en      (ctl_fifo_out_wr),
    .out_full       (fout_full),
    .out_rd_en      (pipe_rd),
    .out_empty      (fout_empty),
    .fifo_in_full   (flt_in_full),
    .fifo_in_empty  (flt_in_empty),
    .fifo_out_full  (flt_out_full),
    .fifo_out_empty (flt_out_empty)
  );

  // ------------------------------------------- host value and LEDs
  // one button alone selects an extreme, otherwise the status word
  always_comb begin
    if (!btn_left_n && btn_right_n)      hi_data = min_val;
    else if (btn_left_n && !btn_right_n) hi_data = max_val;
    else                                 hi_data = 24'(xfer_status);
  end

  logic led_u, led_m, led_s;

  led_clock_div #(.DIV(LED_DIV)) u_led_u (.clk(ti_clk),    .rst(rst_u), .led(led_u));
  led_clock_div #(.DIV(LED_DIV)) u_led_m (.clk(sdram_clk), .rst(rst_m), .led(led_m));
  led_clock_div #(.DIV(LED_DIV)) u_led_s (.clk(sclk),      .rst(rst_s), .led(led_s));

  // the board LEDs light on a low level
  assign led[0] = led_u;
  assign led[1] = led_m;
  assign led[2] = led_s;
  assign led[3] = !(flt_in_full || flt_in_empty || flt_out_full || flt_out_empty);
  assign led[4] = !fin_empty;
  assign led[5] = !fin_full;
  assign led[6] = !fout_empty;
  assign led[7] = !fout_full;

endmodule
