// fpp_top_env: stimulus, models and checks for an end-to-end test of fpp_top,
// shared by the reduced-size and the full-size top testbench. Its parameters
// must repeat the configuration of the fpp_top instance it is wired to.
//
// It generates the three clocks (about 90, 100 and 48 MHz, half periods of
// 5.5, 5 and 10.5 time units), resets the design with both buttons, loads
// random coefficients into both filters and runs an ADC model and an SDRAM
// controller model. The filter input is scheduled by sample count:
//   ADC samples -> impulse source (the impulse comes at sample 2^IMP_LOG2)
//   -> ADC samples with a pause of the ADC stream in the middle
//   -> constant one (step response) -> ADC samples again.
// For every sample the ADC receiver will publish, a reference model computes
// what both filters produce and their sum. During part of the first ADC
// phase the raw samples are stored instead of the filter output; the model
// then expects the raw sample at the time it is published and a filter
// result only if raw storage is off when that result leaves the filters. When READ_PAGES pages have been
// written to the SDRAM (and, if WAIT_DONE, the capture limit has been
// reached) the host read trigger switches to read mode; the pages come back
// through the output FIFO and the USB pipe, are joined into 64-bit results
// (most significant word first) and must equal a contiguous run of reference
// results. Then it switches back to write mode, drains the output FIFO and
// reads once more from the empty FIFO, which must raise the fault LED. The
// status word, the min/max values behind the two buttons, the LEDs and the
// overrun flag are checked as well.
//
// Each mechanism is counted; the test fails if any of them never happened.
module fpp_top_env
  import fpp_pkg::*;
#(
  parameter int unsigned MULTS       = 8,
  parameter int unsigned CYCLES      = 24,
  parameter int unsigned SHIFT_A     = 0,
  parameter int unsigned SHIFT_B     = 0,
  parameter int unsigned PAGE        = 512,
  parameter int unsigned IMP_LOG2    = 12,
  parameter int unsigned READ_PAGES  = 40,
  parameter bit          WAIT_DONE   = 1'b0,
  parameter bit          CHECK_LEDS  = 1'b0,
  parameter longint      WATCHDOG    = 64'd20_000_000
) (
  output logic                sclk,
  output logic                sdram_clk,
  output logic                ti_clk,
  output logic                btn_left_n,
  output logic                btn_right_n,
  output logic                drdy,
  output logic                dout,
  input  logic                adc_start,
  input  logic                adc_pdwn_n,
  input  logic                adc_clk_sel,
  input  logic                adc_lvds,
  input  logic                adc_ll_cfg,
  input  logic                adc_fpath,
  input  logic [2:0]          adc_drate,
  input  logic                adc_cs_n,
  output src_sel_t            src_sel,
  output logic                store_raw,
  output logic                coef_we,
  output logic                coef_sel,
  output logic [$clog2(CYCLES)-1:0] coef_addr,
  output logic [$clog2(MULTS)-1:0]  coef_lane,
  output logic signed [17:0]  coef_data,
  input  logic                cmd_pagewrite,
  input  logic                cmd_pageread,
  input  logic [14:0]         rowaddr,
  output logic                cmd_ack,
  output logic                cmd_done,
  output logic                ctl_fifo_in_rd,
  input  logic [15:0]         ctl_fifo_in_dout,
  output logic                ctl_fifo_out_wr,
  output logic [15:0]         ctl_fifo_out_din,
  output logic                trig_write,
  output logic                trig_read,
  output logic                pipe_rd,
  input  logic [15:0]         pipe_data,
  input  logic [23:0]         hi_data,
  input  logic                filter_overrun,
  input  logic                capture_done,
  input  logic [7:0]          led
);

  localparam int unsigned T    = MULTS * CYCLES;
  localparam int unsigned TAPS = 2 * T;
  localparam int unsigned IMP_AT = 1 << IMP_LOG2;
  // schedule, in published samples
  localparam int unsigned S_IMP   = IMP_AT - 20;
  localparam int unsigned S_ADC2  = IMP_AT + TAPS + 10;
  localparam int unsigned S_PAUSE = S_ADC2 + 20;
  localparam int unsigned S_ONE   = S_ADC2 + 40;
  localparam int unsigned S_ADC3  = S_ONE + TAPS + 10;

  // ------------------------------------------------------------ clocks
  initial begin sclk = 1'b0;      forever #5.5 sclk = ~sclk; end
  initial begin sdram_clk = 1'b0; forever #5 sdram_clk = ~sdram_clk; end
  initial begin ti_clk = 1'b0;    forever #10.5 ti_clk = ~ti_clk; end

  // ------------------------------------------------------------ checks
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // mechanisms
  int n_skip = 0, n_restart = 0, n_impulse = 0, n_step = 0, n_adc_res = 0, n_raw = 0;
  int n_pw = 0, n_pr = 0, n_mode_b = 0, n_mode_a = 0, n_fault = 0;
  int n_min = 0, n_max = 0, n_done = 0, n_led = 0, n_status = 0;

  task automatic finish();
    $display("mechanisms: skip=%0d restart=%0d impulse=%0d step=%0d adc_results=%0d raw=%0d",
             n_skip, n_restart, n_impulse, n_step, n_adc_res, n_raw);
    $display("            page_writes=%0d page_reads=%0d to_B=%0d to_A=%0d fifo_fault=%0d",
             n_pw, n_pr, n_mode_b, n_mode_a, n_fault);
    $display("            min=%0d max=%0d capture_done=%0d led_toggles=%0d status=%0d",
             n_min, n_max, n_done, n_led, n_status);
    check(n_skip > 0 && n_restart > 0, "ADC first-sample skip and restart");
    check(n_impulse > 0, "impulse response captured");
    check(n_step > 0, "step response captured");
    check(n_adc_res > 0, "ADC results captured");
    check(n_raw > 0, "raw samples captured");
    check(n_pw > 0 && n_pr > 0, "page writes and reads");
    check(n_mode_b > 0 && n_mode_a > 0, "mode switches");
    check(n_fault > 0, "FIFO fault flagged");
    check(n_min > 0 && n_max > 0, "min and max shown");
    check(n_status > 0, "status word");
    if (WAIT_DONE) check(n_done > 0, "capture limit reached");
    if (CHECK_LEDS) check(n_led > 0, "LED dividers toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #(WATCHDOG);
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  // ------------------------------------------------------------ ADC model
  logic        adc_en = 1'b0;
  logic        frame_done, frame_first, word_strobe;
  logic [23:0] frame_word, word;

  adc_model u_adc (
    .sclk, .enable(adc_en), .fixed_en(1'b0), .fixed_word('0), .drdy, .dout,
    .word_strobe, .word, .frame_done, .frame_word, .frame_first
  );

  // ------------------------------------------------------ SDRAM controller
  int pages_written, pages_read;

  sdram_ctrl_model #(.PAGE(PAGE)) u_sdram (
    .clk(sdram_clk), .cmd_pagewrite, .cmd_pageread, .rowaddr, .cmd_ack, .cmd_done,
    .fifo_in_rd(ctl_fifo_in_rd), .fifo_in_dout(ctl_fifo_in_dout),
    .fifo_out_wr(ctl_fifo_out_wr), .fifo_out_din(ctl_fifo_out_din),
    .pages_written, .pages_read
  );

  // ------------------------------------------------------ reference model
  logic signed [17:0] fa [T], fb [T];
  logic signed [16:0] hist [TAPS];
  longint             ref_res [$];
  byte                ref_kind [$];      // 0 ADC, 1 impulse, 2 step, 3 raw
  int                 n_pub = 0;
  logic signed [23:0] ref_min = 24'sh7fffff, ref_max = -24'sh800000;
  longint             cyc = 0;
  // filter results on their way: value, kind, cycle they leave the filters
  longint             pend_val [$];
  byte                pend_kind [$];
  longint             pend_due [$];

  function automatic longint conv(input logic signed [17:0] f [T]);
    longint acc = 0;
    for (int k = 0; k < int'(T); k++)
      acc += longint'(f[k]) * (longint'(hist[k]) + longint'(hist[TAPS-1-k]));
    return acc;
  endfunction

  // the receiver publishes every frame except the first of each burst
  always @(posedge sclk) begin
    cyc++;
    // a filter result is stored if raw storage is off when it comes out
    // (about CYCLES + 6 cycles after publication; the schedule never
    // switches storage near that moment)
    while (pend_due.size() > 0 && pend_due[0] <= cyc) begin
      void'(pend_due.pop_front());
      if (!store_raw) begin
        ref_res.push_back(pend_val.pop_front());
        ref_kind.push_back(pend_kind.pop_front());
      end else begin
        void'(pend_val.pop_front());
        void'(pend_kind.pop_front());
      end
    end
    if (frame_done) begin
      if (frame_first) n_skip++;
      else begin
        logic signed [23:0] s;
        logic signed [16:0] x;
        byte                kind;
        s = {frame_word[23:1], 1'b0};
        if (s < ref_min) ref_min = s;
        if (s > ref_max) ref_max = s;
        unique case (src_sel)
          SRC_IMPULSE: begin x = (n_pub == int'(IMP_AT)) ? 17'sd1 : 17'sd0; kind = 1; end
          SRC_ONE:     begin x = 17'sd1; kind = 2; end
          default:     begin x = s[23:7]; kind = 0; end
        endcase
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = x;
        if (store_raw) begin
          ref_res.push_back(longint'(s));
          ref_kind.push_back(3);
        end
        pend_val.push_back((conv(fa) <<< SHIFT_A) + (conv(fb) <<< SHIFT_B));
        pend_kind.push_back(kind);
        pend_due.push_back(cyc + CYCLES + 6);
        n_pub++;
      end
    end
  end

  // raw samples are stored for 16 samples early in the run
  initial begin
    store_raw = 1'b0;
    wait (n_pub == int'(S_IMP) / 2);      repeat (12) @(negedge sclk); store_raw = 1'b1;
    wait (n_pub == int'(S_IMP) / 2 + 16); repeat (12) @(negedge sclk); store_raw = 1'b0;
  end

  // source schedule: change in the middle of a frame
  initial begin
    src_sel = SRC_ADC;
    wait (n_pub == int'(S_IMP));  repeat (12) @(negedge sclk); src_sel = SRC_IMPULSE;
    wait (n_pub == int'(S_ADC2)); repeat (12) @(negedge sclk); src_sel = SRC_ADC;
    wait (n_pub == int'(S_PAUSE));
    adc_en = 1'b0;                       // the stream stops ...
    repeat (200) @(negedge sclk);
    adc_en = 1'b1;                       // ... and restarts
    n_restart++;
    wait (n_pub == int'(S_ONE));  repeat (12) @(negedge sclk); src_sel = SRC_ONE;
    wait (n_pub == int'(S_ADC3)); repeat (12) @(negedge sclk); src_sel = SRC_ADC;
  end

  // ------------------------------------------------------------ LEDs
  logic [2:0] led_q = '0;
  always @(posedge sclk) begin
    if (btn_left_n || btn_right_n) begin
      if (led[2:0] != led_q) n_led++;
    end
    led_q <= led[2:0];
  end

  always @(posedge capture_done) n_done++;

  // ------------------------------------------------------------ host side
  longint got [$];

  task automatic pipe_read_word(output logic [15:0] w);
    @(negedge ti_clk) pipe_rd = 1'b1;
    @(negedge ti_clk) pipe_rd = 1'b0;
    w = pipe_data;
  endtask

  task automatic pulse_trig(input bit rd);
    @(negedge ti_clk);
    if (rd) trig_read = 1'b1; else trig_write = 1'b1;
    @(negedge ti_clk);
    trig_read = 1'b0;
    trig_write = 1'b0;
    repeat (10) @(negedge ti_clk);
  endtask

  initial begin
    btn_left_n = 1'b0;
    btn_right_n = 1'b0;
    coef_we = 1'b0; coef_sel = 1'b0; coef_addr = '0; coef_lane = '0; coef_data = '0;
    trig_write = 1'b0; trig_read = 1'b0; pipe_rd = 1'b0;
    for (int i = 0; i < int'(TAPS); i++) hist[i] = '0;
    for (int k = 0; k < int'(T); k++) begin
      fa[k] = 18'($urandom);
      fb[k] = 18'($urandom);
    end
    repeat (10) @(negedge sclk);
    // ADC pins during reset
    check(!adc_start && adc_pdwn_n && !adc_clk_sel && !adc_lvds && adc_ll_cfg &&
          !adc_fpath && adc_drate == 3'b101 && !adc_cs_n, "ADC pin settings in reset");
    btn_left_n = 1'b1;
    btn_right_n = 1'b1;
    repeat (4) @(negedge sclk);
    check(adc_start, "ADC started after reset");
    // coefficients: f[c*MULTS + m] -> word c, lane m
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < int'(T); k++) begin
        @(negedge sclk);
        coef_we   = 1'b1;
        coef_sel  = f[0];
        coef_addr = $bits(coef_addr)'(k / int'(MULTS));
        coef_lane = $bits(coef_lane)'(k % int'(MULTS));
        coef_data = (f == 0) ? fa[k] : fb[k];
      end
    @(negedge sclk) coef_we = 1'b0;
    adc_en = 1'b1;

    // status word in write mode
    repeat (20) @(negedge ti_clk);
    check(hi_data[7:0] == 8'h0A && hi_data[23] == 1'b0, $sformatf("status in A: %h", hi_data));

    // capture
    wait (pages_written >= int'(READ_PAGES) && (!WAIT_DONE || capture_done));
    n_pw = pages_written;
    if (WAIT_DONE) begin
      repeat (2000) @(negedge sclk);
      check(pages_written == int'(READ_PAGES), "no pages beyond the capture limit");
    end

    // read mode: fetch READ_PAGES pages through the pipe
    pulse_trig(1'b1);
    check(hi_data[7:0] == 8'h0B, $sformatf("status in B: %h", hi_data));
    n_mode_b++;
    for (int r = 0; r < int'(READ_PAGES * PAGE / 4); r++) begin
      logic [63:0] v;
      for (int j = 0; j < 4; j++) begin
        logic [15:0] w;
        while (!led[6]) @(negedge ti_clk);   // LED 6 lights while data is waiting
        pipe_read_word(w);
        v = {v[47:0], w};
      end
      got.push_back(longint'(v));
    end
    n_pr = pages_read;
    check(hi_data[22:8] == rowaddr, "status row address");
    n_status++;

    // back to write mode, drain and read once too often
    pulse_trig(1'b0);
    n_mode_a++;
    check(hi_data[7:0] == 8'h0A, $sformatf("status back in A: %h", hi_data));
    repeat (400) @(negedge sdram_clk);
    while (led[6]) begin
      logic [15:0] w;
      pipe_read_word(w);
    end
    check(led[3], "no FIFO fault before the extra read");
    @(negedge ti_clk) pipe_rd = 1'b1;
    @(negedge ti_clk) pipe_rd = 1'b0;
    repeat (3) @(negedge ti_clk);
    check(!led[3], "FIFO fault after reading the empty FIFO");
    if (!led[3]) n_fault++;

    // the two buttons alone show the extremes of the ADC samples
    btn_left_n = 1'b0;
    #1 check(hi_data == ref_min, $sformatf("min %h expected %h", hi_data, ref_min));
    n_min++;
    btn_left_n = 1'b1;
    btn_right_n = 1'b0;
    #1 check(hi_data == ref_max, $sformatf("max %h expected %h", hi_data, ref_max));
    n_max++;
    btn_right_n = 1'b1;

    check(!filter_overrun, "no filter overrun");

    // compare the stored results with the reference stream
    begin
      int base = -1;
      for (int i = 0; i < ref_res.size(); i++)
        if (ref_res[i] == got[0]) begin base = i; break; end
      check(base >= 0, "first stored result found in the reference");
      if (base >= 0) begin
        for (int i = 0; i < got.size(); i++) begin
          if (base + i >= ref_res.size()) begin
            check(1'b0, "more results than reference samples");
            break;
          end
          check(got[i] == ref_res[base + i],
                $sformatf("stored result %0d: got %0d expected %0d", i, got[i], ref_res[base + i]));
          if (got[i] == ref_res[base + i]) begin
            if (ref_kind[base + i] == 1 && ref_res[base + i] != 0) n_impulse++;
            if (ref_kind[base + i] == 2) n_step++;
            if (ref_kind[base + i] == 0) n_adc_res++;
            if (ref_kind[base + i] == 3) n_raw++;
          end
        end
      end
    end
    finish();
  end

endmodule
