// tb_adc_rx: self-checking test of the ADC sample receiving state machine.
//
// A behavioural ADC sends random 24-bit words in back-to-back 24-cycle
// frames. The test checks that the first frame after reset is skipped, that
// every following word appears on `sample` with its LSB cleared, that
// sample_valid comes exactly every 24 cycles, and that a missing frame sends
// the receiver back to INIT (resync), after which it again skips one frame and
// resumes.
module tb_adc_rx;
  import fpp_pkg::*;

  logic sclk = 1'b0;
  always #5 sclk = ~sclk;

  logic rst = 1'b1;
  logic enable = 1'b0;
  logic drdy, dout, word_strobe;
  logic [23:0] word;
  logic signed [23:0] sample;
  logic sample_valid, resync;
  adc_state_t state;

  adc_model u_adc (
    .sclk, .enable, .fixed_en(1'b0), .fixed_word('0), .drdy, .dout, .word_strobe, .word,
    .frame_done(), .frame_word(), .frame_first()
  );

  adc_rx dut (.sclk, .rst, .drdy, .dout, .sample, .sample_valid, .resync, .state);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge sclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words sent since the receiver last (re)started, first one to be skipped
  logic [23:0] sent [$];
  int          skip_next = 1;
  always @(posedge sclk) begin
    if (word_strobe) begin
      if (skip_next > 0) skip_next--;
      else sent.push_back(word);
    end
  end

  int n_valid = 0, last_valid = -1, cyc = 0, n_resync = 0;
  always @(posedge sclk) begin
    cyc++;
    if (sample_valid && !rst) begin
      logic [23:0] e;
      if (sent.size() == 0) begin
        check(1'b0, "sample without a sent word");
      end else begin
        e = sent.pop_front();
        check(sample == {e[23:1], 1'b0},
              $sformatf("sample %0d: got %h expected %h", n_valid, sample, {e[23:1], 1'b0}));
      end
      if (last_valid >= 0 && n_resync == 0)
        check(cyc - last_valid == 24, $sformatf("sample spacing %0d", cyc - last_valid));
      last_valid = cyc;
      n_valid++;
    end
    if (resync && !rst) begin
      n_resync++;
      sent.delete();
      skip_next = 1;       // the next frame after INIT is skipped again
    end
  end

  initial begin
    repeat (4) @(posedge sclk);
    @(negedge sclk) rst = 1'b0;
    check(state == ADC_INIT, "INIT after reset");
    repeat (3) @(posedge sclk);
    enable = 1'b1;
    repeat (24 * 40) @(posedge sclk);
    check(n_valid == 38 || n_valid == 39, $sformatf("samples after 40 frames: %0d", n_valid));
    // drop frames: the receiver must resynchronise
    enable = 1'b0;
    repeat (24 * 3) @(posedge sclk);
    check(n_resync == 1, $sformatf("resync after a missing frame (%0d)", n_resync));
    check(state == ADC_INIT, "back in INIT");
    enable = 1'b1;
    n_valid = 0;
    repeat (24 * 20) @(posedge sclk);
    check(n_valid >= 17, $sformatf("samples after restart: %0d", n_valid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
