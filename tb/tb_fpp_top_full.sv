// tb_fpp_top_full: end-to-end test of fpp_top with all parameters at their
// defaults: two filters of 8 multipliers x 24 cycles (order 383), 512-word
// pages, 2048-word FIFOs, a 4000-cycle start-up wait and the impulse at
// sample 4096. It runs until 40 pages (5120 results, covering the impulse
// and step responses) have been stored, reads them back through the USB pipe
// and compares them with the reference model. The 2^22-result capture limit
// and the LED dividers (0.5 s) are too slow to reach in simulation; the
// reduced-size tb_fpp_top covers them. Stimulus and checks are in fpp_top_env.
module tb_fpp_top_full;
  import fpp_pkg::*;

  logic sclk, sdram_clk, ti_clk, btn_left_n, btn_right_n, drdy, dout;
  logic adc_start, adc_pdwn_n, adc_clk_sel, adc_lvds, adc_ll_cfg, adc_fpath, adc_cs_n;
  logic [2:0] adc_drate;
  src_sel_t src_sel;
  logic store_raw;
  logic coef_we, coef_sel;
  logic [4:0] coef_addr;
  logic [2:0] coef_lane;
  logic signed [17:0] coef_data;
  logic cmd_pagewrite, cmd_pageread, cmd_ack, cmd_done;
  logic [14:0] rowaddr;
  logic ctl_fifo_in_rd, ctl_fifo_out_wr;
  logic [15:0] ctl_fifo_in_dout, ctl_fifo_out_din, pipe_data;
  logic trig_write, trig_read, pipe_rd;
  logic [23:0] hi_data;
  logic filter_overrun, capture_done;
  logic [7:0] led;

  fpp_top dut (.*);

  fpp_top_env #(
    .MULTS(8), .CYCLES(24), .SHIFT_A(0), .SHIFT_B(0), .PAGE(512), .IMP_LOG2(12),
    .READ_PAGES(40), .WAIT_DONE(1'b0), .CHECK_LEDS(1'b0), .WATCHDOG(64'd8_000_000)
  ) env (.*);

endmodule
