// sym_fir_filter: symmetric FIR filter of odd order, computed semi-parallel.
//
// The filter evaluates
//     y(n) = sum_{k=0}^{T-1} f[k] * ( x(n-k) + x(n-L+k) ),   L = 2T-1,
// i.e. an order-L filter whose impulse response is mirrored around its
// centre, so that each coefficient is used once on the sum of two samples
// (a "tapsum"). With T = MULTS*CYCLES coefficients the sum is split into
// CYCLES steps of MULTS products each: in step c, lane m multiplies
//     f[c*MULTS+m] * ( x(n-c*MULTS-m) + x(n-L+c*MULTS+m) ).
// The ADC delivers one sample every 24 clock cycles of its shift clock, and
// this clock also drives the filter, so MULTS multipliers are reused CYCLES =
// 24 times per sample. The defaults (MULTS = 8, CYCLES = 24) give T = 192
// coefficients, a 384-tap delay line and order L = 383; MULTS may be any even
// number (2 to 12 in the original sizing, up to order 575).
//
// Datapath, six registered steps:
//   1  tapsums: pick the two samples of each lane from the delay line and add
//      them; in the same cycle the coefficient memory reads word c
//   2  multiply: MULTS products tapsum * coefficient
//   3  first adder-tree level: product[m] + product[m+MULTS/2]
//   4  second adder-tree level: sum of the MULTS/2 pair sums
//   5  accumulate the CYCLES partial sums of one sample
//   6  output: full-precision result, shifted left by FRAC_SHIFT
// All internal widths keep full precision; there is no rounding. FRAC_SHIFT
// lines up the radix points of several filters whose outputs are added.
//
// Interface and timing: a one-cycle new_data pulse shifts `data` into the
// delay line and starts a pass of CYCLES cycles. The next new_data may come
// at the earliest CYCLES cycles later (exactly one ADC sample period); an
// earlier one restarts the pass and sets the sticky `overrun` flag.
// result_ready pulses CYCLES+5 clock edges after the edge that took new_data,
// with `result` valid from then until the next result (29 cycles, about 320 ns
// at 90 MHz, for the defaults). Passes overlap: the adder tree finishes one
// sample while the tapsums of the next are already being formed.
//
// Following the description: the symmetric folding, the M x C split, the
// parameter names and defaults, the 64-bit full-precision output with its
// left shift, and a six-step pipeline. This implementation's own choices: the
// exact contents of the six steps, the pass counter and its overrun flag, and
// the coefficient write port (see fir_coef_mem).
module sym_fir_filter #(
  parameter int unsigned INPUT_WIDTH  = 17,
  parameter int unsigned MULT_WIDTH   = 18,
  parameter int unsigned COEF_WIDTH   = 18,
  parameter int unsigned MULTS        = 8,
  parameter int unsigned CYCLES       = 24,
  parameter int unsigned FRAC_SHIFT   = 0,
  parameter int unsigned RESULT_WIDTH = 64,
  localparam int unsigned AW = (CYCLES > 1) ? $clog2(CYCLES) : 1,
  localparam int unsigned LW = (MULTS  > 1) ? $clog2(MULTS)  : 1
) (
  input  logic                            clk,
  input  logic                            rst,
  // samples
  input  logic                            new_data,
  input  logic signed [INPUT_WIDTH-1:0]   data,
  // coefficient load
  input  logic                            coef_we,
  input  logic [AW-1:0]                   coef_addr,
  input  logic [LW-1:0]                   coef_lane,
  input  logic signed [COEF_WIDTH-1:0]    coef_data,
  // results
  output logic signed [RESULT_WIDTH-1:0]  result,
  output logic                            result_ready,
  output logic                            overrun
);

  localparam int unsigned T        = MULTS * CYCLES;         // coefficients
  localparam int unsigned TAPS     = 2 * T;                  // delay line length
  localparam int unsigned TSUM_W   = INPUT_WIDTH + 1;        // tapsum width
  localparam int unsigned PROD_W   = 2 * MULT_WIDTH;         // multiplier output
  localparam int unsigned HALF     = MULTS / 2;
  localparam int unsigned PAIR_W   = PROD_W + 1;
  localparam int unsigned CSUM_W   = PROD_W + $clog2(MULTS) + 1;
  localparam int unsigned ACC_W    = PROD_W + $clog2(T) + 1;

  // ---------------------------------------------------------------- checks
  initial begin
    if (MULTS < 2 || (MULTS % 2) != 0)
      $error("sym_fir_filter: MULTS must be even and at least 2");
    if (CYCLES < 4)
      $error("sym_fir_filter: CYCLES must be at least 4");
    if (TSUM_W > MULT_WIDTH || COEF_WIDTH > MULT_WIDTH)
      $error("sym_fir_filter: tapsum and coefficient must fit the multiplier");
    if (ACC_W + FRAC_SHIFT > RESULT_WIDTH)
      $error("sym_fir_filter: RESULT_WIDTH too small for a full-precision result");
  end

  // ---------------------------------------------------------- delay pipeline
  logic signed [INPUT_WIDTH-1:0] dly [TAPS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(TAPS); i++) dly[i] <= '0;
    end else if (new_data) begin
      dly[0] <= data;
      for (int i = 1; i < int'(TAPS); i++) dly[i] <= dly[i-1];
    end
  end

  // ----------------------------------------------------------- pass control
  logic          busy;
  logic [AW-1:0] cyc;
  logic          last_cyc;

  assign last_cyc = (32'(cyc) == CYCLES - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy    <= 1'b0;
      cyc     <= '0;
      overrun <= 1'b0;
    end else if (new_data) begin
      if (busy && !last_cyc) overrun <= 1'b1;
      busy <= 1'b1;
      cyc  <= '0;
    end else if (busy) begin
      if (last_cyc) begin
        busy <= 1'b0;
        cyc  <= '0;
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end

  // ------------------------------------------------ step 1: tapsums, coefs
  logic [MULTS*COEF_WIDTH-1:0]  coef_row;
  logic signed [TSUM_W-1:0]     tapsum [MULTS];
  logic                         v1, first1, last1;

  fir_coef_mem #(
    .COEF_WIDTH (COEF_WIDTH),
    .MULTS      (MULTS),
    .CYCLES     (CYCLES)
  ) u_coef (
    .clk     (clk),
    .rd_addr (cyc),
    .rd_data (coef_row),
    .we      (coef_we),
    .wr_addr (coef_addr),
    .wr_lane (coef_lane),
    .wr_data (coef_data)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int m = 0; m < int'(MULTS); m++) tapsum[m] <= '0;
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
    end else begin
      for (int m = 0; m < int'(MULTS); m++) begin
        // newer sample x(n-k) and its mirror x(n-L+k), k = cyc*MULTS + m
        tapsum[m] <= TSUM_W'(dly[32'(cyc) * MULTS + 32'(m)])
                   + TSUM_W'(dly[TAPS - 1 - 32'(cyc) * MULTS - 32'(m)]);
      end
      v1     <= busy;
      first1 <= busy && (cyc == '0);
      last1  <= busy && last_cyc;
    end
  end

  // ------------------------------------------------------ step 2: multiply
  logic signed [PROD_W-1:0] prod [MULTS];
  logic                     v2, first2, last2;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int m = 0; m < int'(MULTS); m++) prod[m] <= '0;
      v2     <= 1'b0;
      first2 <= 1'b0;
      last2  <= 1'b0;
    end else begin
      for (int m = 0; m < int'(MULTS); m++) begin
        prod[m] <= PROD_W'(MULT_WIDTH'(tapsum[m]) *
                           MULT_WIDTH'($signed(coef_row[m*COEF_WIDTH +: COEF_WIDTH])));
      end
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
    end
  end

  // ----------------------------------------------- step 3: pairwise sums
  logic signed [PAIR_W-1:0] pair [HALF];
  logic                     v3, first3, last3;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(HALF); i++) pair[i] <= '0;
      v3     <= 1'b0;
      first3 <= 1'b0;
      last3  <= 1'b0;
    end else begin
      for (int i = 0; i < int'(HALF); i++)
        pair[i] <= PAIR_W'(prod[i]) + PAIR_W'(prod[i + HALF]);
      v3     <= v2;
      first3 <= first2;
      last3  <= last2;
    end
  end

  // ------------------------------------------- step 4: sum of one cycle
  logic signed [CSUM_W-1:0] csum_next;
  logic signed [CSUM_W-1:0] csum;
  logic                     v4, first4, last4;

  always_comb begin
    csum_next = '0;
    for (int i = 0; i < int'(HALF); i++) csum_next += CSUM_W'(pair[i]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      csum   <= '0;
      v4     <= 1'b0;
      first4 <= 1'b0;
      last4  <= 1'b0;
    end else begin
      csum   <= csum_next;
      v4     <= v3;
      first4 <= first3;
      last4  <= last3;
    end
  end

  // ---------------------------------------------------- step 5: accumulate
  logic signed [ACC_W-1:0] acc;
  logic                    done5;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc   <= '0;
      done5 <= 1'b0;
    end else begin
      if (v4) acc <= first4 ? ACC_W'(csum) : acc + ACC_W'(csum);
      done5 <= v4 && last4;
    end
  end

  // -------------------------------------------------------- step 6: output
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      result       <= '0;
      result_ready <= 1'b0;
    end else begin
      result_ready <= done5;
      if (done5) result <= RESULT_WIDTH'(acc) <<< FRAC_SHIFT;
    end
  end

endmodule
