// tb_sym_fir_filter: self-checking test of the symmetric semi-parallel FIR
// filter at its default size (8 multipliers x 24 cycles, order 383).
//
// Two filters get the same random 18-bit coefficients and samples; the second
// one shifts its output left by 2. The test
//   1. feeds an impulse and checks that the outputs are the coefficients,
//      then the same coefficients in reverse order (the centre one twice);
//   2. feeds random full-scale 17-bit samples, one every 24 cycles, and
//      compares each output with a direct evaluation of the symmetric
//      convolution sum;
//   3. checks the latency from new_data to result_ready (CYCLES + 5 edges);
//      at 90 MHz that is 29 cycles, about 320 ns;
//   4. sends a sample too early and checks the overrun flag.
module tb_sym_fir_filter;

  localparam int unsigned MULTS  = 8;
  localparam int unsigned CYCLES = 24;
  localparam int unsigned T      = MULTS * CYCLES;
  localparam int unsigned TAPS   = 2 * T;
  // result_ready rises CYCLES+5 edges after the edge that takes new_data;
  // the checker samples it one edge later
  localparam int unsigned LAT    = CYCLES + 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic               new_data = 1'b0;
  logic signed [16:0] data = '0;
  logic               coef_we = 1'b0;
  logic [4:0]         coef_addr = '0;
  logic [2:0]         coef_lane = '0;
  logic signed [17:0] coef_data = '0;
  logic signed [63:0] result, result_s;
  logic               result_ready, result_ready_s, overrun, overrun_s;

  sym_fir_filter dut (
    .clk, .rst, .new_data, .data, .coef_we, .coef_addr, .coef_lane, .coef_data,
    .result, .result_ready, .overrun
  );

  sym_fir_filter #(.FRAC_SHIFT(2)) dut_shift (
    .clk, .rst, .new_data, .data, .coef_we, .coef_addr, .coef_lane, .coef_data,
    .result(result_s), .result_ready(result_ready_s), .overrun(overrun_s)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [17:0] f [T];
  logic signed [16:0] hist [TAPS];       // hist[0] = newest sample
  longint             expq [$];
  int                 sent_cycle [$];
  int                 cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // reference: y = sum_k f[k] * (x(n-k) + x(n-L+k))
  function automatic longint ref_out();
    longint acc = 0;
    for (int k = 0; k < int'(T); k++)
      acc += longint'(f[k]) * (longint'(hist[k]) + longint'(hist[TAPS-1-k]));
    return acc;
  endfunction

  task automatic send(input logic signed [16:0] x);
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    expq.push_back(ref_out());
    @(negedge clk);
    data     = x;
    new_data = 1'b1;
    @(posedge clk);
    sent_cycle.push_back(cycle);
    @(negedge clk);
    new_data = 1'b0;
    repeat (CYCLES - 1) @(posedge clk);
  endtask

  // output checker
  int n_results = 0;
  bit checking = 1'b1;
  always @(posedge clk) begin
    if (!rst && result_ready && checking) begin
      longint e;
      int     sc;
      e  = expq.pop_front();
      sc = sent_cycle.pop_front();
      check(result == e, $sformatf("result %0d: got %0d expected %0d", n_results, result, e));
      check(cycle - sc == int'(LAT), $sformatf("latency %0d expected %0d", cycle - sc, LAT));
      check(result_ready_s && result_s == (e <<< 2), "shifted output");
      n_results++;
    end
  end

  initial begin
    for (int i = 0; i < int'(TAPS); i++) hist[i] = '0;
    for (int k = 0; k < int'(T); k++) f[k] = 18'($urandom);
    f[0] = 18'sd15;  f[1] = 18'sd8;  f[2] = -18'sd15;  f[3] = -18'sd14;
    f[T-1] = 18'sd74130;  f[T-2] = -18'sd38719;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // load coefficients: f[c*MULTS + m] goes to word c, lane m
    for (int k = 0; k < int'(T); k++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 5'(k / MULTS);
      coef_lane = 3'(k % MULTS);
      coef_data = f[k];
    end
    @(negedge clk) coef_we = 1'b0;

    // 1. impulse: the output reproduces the coefficients
    send(17'sd1);
    for (int i = 0; i < int'(TAPS) - 1; i++) send('0);
    // 2. random full-scale samples
    for (int i = 0; i < 300; i++) send(17'($urandom));
    repeat (LAT + 5) @(posedge clk);
    check(n_results == int'(TAPS) + 300, "number of results");
    checking = 1'b0;
    check(!overrun && !overrun_s, "no overrun at the nominal rate");
    // 4. a sample arriving too early
    @(negedge clk) new_data = 1'b1;
    @(negedge clk) new_data = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk) new_data = 1'b1;
    @(negedge clk) new_data = 1'b0;
    repeat (2) @(posedge clk);
    check(overrun, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the impulse response as it leaves the filter
  int imp_idx = 0;
  always @(posedge clk) begin
    if (!rst && result_ready && imp_idx < int'(TAPS)) begin
      longint e;
      e = (imp_idx < int'(T)) ? longint'(f[imp_idx]) : longint'(f[TAPS - 1 - imp_idx]);
      check(result == e, $sformatf("impulse response %0d: got %0d expected %0d", imp_idx, result, e));
      imp_idx++;
    end
  end

endmodule
