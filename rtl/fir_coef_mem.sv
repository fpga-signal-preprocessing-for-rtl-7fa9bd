// fir_coef_mem: coefficient store of the semi-parallel symmetric FIR filter.
//
// The filter reuses MULTS multipliers for CYCLES clock cycles per input
// sample, so in every cycle it needs MULTS coefficients at once. The memory
// therefore holds CYCLES words of MULTS coefficients each (8 x 18 = 144 bits
// by default), and word c carries coefficients f[c*MULTS + m] in lane m,
// bits [m*COEF_WIDTH +: COEF_WIDTH].
//
// Read: rd_data is registered, so the word addressed in one cycle appears
// after the next rising edge (one cycle of latency, like a block RAM).
// Write: one coefficient per cycle through (wr_addr, wr_lane, wr_data); the
// other lanes of the word are kept.
//
// The word organisation and the wide read follow the design description. The
// description keeps its coefficients in read-only memory filled at build
// time and names a rewritable memory as the way to let an external processor
// supply them; this memory is that rewritable version, with a simple
// single-coefficient write port of this implementation's own choosing. It
// powers up cleared, i.e. as an all-zero filter.
module fir_coef_mem #(
  parameter int unsigned COEF_WIDTH = 18,
  parameter int unsigned MULTS      = 8,
  parameter int unsigned CYCLES     = 24,
  localparam int unsigned AW = (CYCLES > 1) ? $clog2(CYCLES) : 1,
  localparam int unsigned LW = (MULTS  > 1) ? $clog2(MULTS)  : 1
) (
  input  logic                          clk,
  // read port
  input  logic [AW-1:0]                 rd_addr,
  output logic [MULTS*COEF_WIDTH-1:0]   rd_data,
  // write port
  input  logic                          we,
  input  logic [AW-1:0]                 wr_addr,
  input  logic [LW-1:0]                 wr_lane,
  input  logic signed [COEF_WIDTH-1:0]  wr_data
);

  logic [MULTS*COEF_WIDTH-1:0] mem [CYCLES];

  initial begin
    for (int i = 0; i < int'(CYCLES); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && (32'(wr_addr) < CYCLES) && (32'(wr_lane) < MULTS))
      mem[wr_addr][wr_lane*COEF_WIDTH +: COEF_WIDTH] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
