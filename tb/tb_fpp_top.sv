// tb_fpp_top: end-to-end test of fpp_top at a reduced size, so that every
// mechanism is reached in a short run: two filters of 2 multipliers x 24
// cycles (order 95), the second shifted left by one, 64-word pages, 256-word
// FIFOs, a capture limit of 2^9 results (32 pages), a 240-cycle start-up
// wait, the impulse at sample 64 and fast LED dividers. The stimulus and all
// checks are in fpp_top_env; see there.
module tb_fpp_top;
  import fpp_pkg::*;

  localparam int unsigned MULTS = 2, CYCLES = 24, PAGE = 64;

  logic sclk, sdram_clk, ti_clk, btn_left_n, btn_right_n, drdy, dout;
  logic adc_start, adc_pdwn_n, adc_clk_sel, adc_lvds, adc_ll_cfg, adc_fpath, adc_cs_n;
  logic [2:0] adc_drate;
  src_sel_t src_sel;
  logic store_raw;
  logic coef_we, coef_sel;
  logic [4:0] coef_addr;
  logic [0:0] coef_lane;
  logic signed [17:0] coef_data;
  logic cmd_pagewrite, cmd_pageread, cmd_ack, cmd_done;
  logic [14:0] rowaddr;
  logic ctl_fifo_in_rd, ctl_fifo_out_wr;
  logic [15:0] ctl_fifo_in_dout, ctl_fifo_out_din, pipe_data;
  logic trig_write, trig_read, pipe_rd;
  logic [23:0] hi_data;
  logic filter_overrun, capture_done;
  logic [7:0] led;

  fpp_top #(
    .NUM_FILTERS(2), .MULTS(MULTS), .CYCLES(CYCLES), .SHIFT_A(0), .SHIFT_B(1),
    .FIFO_DEPTH(256), .PAGE_WORDS_P(PAGE), .SAMPLE_LIMIT_LOG2(9), .INIT_WAIT(240),
    .IMPULSE_DELAY_LOG2(6), .LED_DIV(20)
  ) dut (.*);

  fpp_top_env #(
    .MULTS(MULTS), .CYCLES(CYCLES), .SHIFT_A(0), .SHIFT_B(1), .PAGE(PAGE), .IMP_LOG2(6),
    .READ_PAGES(32), .WAIT_DONE(1'b1), .CHECK_LEDS(1'b1), .WATCHDOG(64'd5_000_000)
  ) env (.*);

endmodule
