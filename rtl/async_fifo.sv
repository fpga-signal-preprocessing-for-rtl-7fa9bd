// async_fifo: dual-clock FIFO whose write port may be RATIO times wider than
// its read port.
//
// Two of these sit around the SDRAM: FIFO IN takes one 64-bit filter result
// per write in the sample clock domain and hands it to the SDRAM side as four
// 16-bit words (RATIO = 4); FIFO OUT passes 16-bit words from the SDRAM clock
// domain to the USB clock domain (RATIO = 1). Both hold DEPTH = 2048 read
// words, four SDRAM pages of 512 x 16 bits.
//
// How it works: storage is DEPTH/RATIO entries of the write width. The write
// pointer counts write entries, the read pointer counts read words; each
// pointer carries one extra wrap bit and crosses to the other clock domain in
// Gray code through a two-flip-flop synchroniser. The read side scales the
// write pointer up by RATIO; the write side scales the read pointer down, so a
// partly read entry still counts as occupied. A wide entry is read out most
// significant word first.
//
// Interface and timing:
//   write: din is stored at the rising wr_clk edge where wr_en is high and
//          the FIFO is not full (a write while full is dropped)
//   read:  rd_en at a rising rd_clk edge with the FIFO not empty pops one
//          word; dout shows it after that edge and holds it until the next
//          pop (standard, not first-word-fall-through, read)
//   wr_count / rd_count: occupancy in read words as seen from each side; the
//          view of the other side's pointer lags by two to three cycles, so
//          both counts err on the safe side
//
// Following the description: the two FIFOs, their clocks, widths and depth,
// and the word order on the narrow side. The FIFOs were generated vendor
// cores in the original; this Gray-pointer construction is this
// implementation's own.
module async_fifo #(
  parameter int unsigned RD_WIDTH = 16,
  parameter int unsigned RATIO    = 1,
  parameter int unsigned DEPTH    = 2048,
  localparam int unsigned WR_WIDTH = RD_WIDTH * RATIO,
  localparam int unsigned RAW      = $clog2(DEPTH),     // read-word address bits
  localparam int unsigned SW       = $clog2(RATIO > 1 ? RATIO : 2), // sub-word bits
  localparam int unsigned SUBW     = (RATIO > 1) ? SW : 0,
  localparam int unsigned WAW      = RAW - SUBW         // write-entry address bits
) (
  input  logic                wr_clk,
  input  logic                rd_clk,
  input  logic                rst,
  // write side
  input  logic                wr_en,
  input  logic [WR_WIDTH-1:0] din,
  output logic                full,
  output logic [RAW:0]        wr_count,
  // read side
  input  logic                rd_en,
  output logic [RD_WIDTH-1:0] dout,
  output logic                empty,
  output logic [RAW:0]        rd_count
);

  localparam int unsigned WENTRIES = DEPTH / RATIO;

  initial begin
    if ((1 << RAW) != DEPTH) $error("async_fifo: DEPTH must be a power of two");
    if ((1 << SUBW) != RATIO) $error("async_fifo: RATIO must be a power of two");
  end

  function automatic logic [RAW:0] bin2gray(input logic [RAW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [RAW:0] gray2bin(input logic [RAW:0] g);
    logic [RAW:0] b;
    b[RAW] = g[RAW];
    for (int i = int'(RAW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [WAW:0] bin2gray_e(input logic [WAW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [WAW:0] gray2bin_e(input logic [WAW:0] g);
    logic [WAW:0] b;
    b[WAW] = g[WAW];
    for (int i = int'(WAW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WR_WIDTH-1:0] mem [WENTRIES];

  // The write pointer counts entries, the read pointer read words; each is
  // Gray coded in its own units so that one step changes one bit.
  logic [WAW:0] wptr_e, wptr_gray, wptr_gray_rs; // write domain, synced copy
  logic [RAW:0] rptr, rptr_gray, rptr_gray_ws;   // read domain, synced copy
  logic [RAW:0] wptr, wptr_rs, rptr_ws;          // read-word units
  logic [RAW:0] rptr_ws_entry;                   // read pointer rounded down

  // ------------------------------------------------------------ write side
  assign wptr          = (RAW+1)'(wptr_e) << SUBW;
  assign rptr_ws       = gray2bin(rptr_gray_ws);
  assign rptr_ws_entry = (rptr_ws >> SUBW) << SUBW;
  assign wr_count      = wptr - rptr_ws_entry;
  assign full          = (wr_count > (RAW+1)'(DEPTH - RATIO));

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      wptr_e    <= '0;
      wptr_gray <= '0;
    end else if (wr_en && !full) begin
      wptr_e    <= wptr_e + 1'b1;
      wptr_gray <= bin2gray_e(wptr_e + 1'b1);
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wptr_e[WAW-1:0]] <= din;
  end

  bit_sync #(.WIDTH(RAW+1)) u_sync_r2w (
    .clk (wr_clk), .rst (rst), .d (rptr_gray), .q (rptr_gray_ws)
  );

  // ------------------------------------------------------------- read side
  assign wptr_rs  = (RAW+1)'(gray2bin_e(wptr_gray_rs)) << SUBW;
  assign rd_count = wptr_rs - rptr;
  assign empty    = (rd_count == '0);

  logic [WR_WIDTH-1:0] rd_entry;
  logic [SW-1:0]       rd_sub;

  assign rd_entry = mem[rptr[RAW-1:SUBW]];
  assign rd_sub   = (RATIO > 1) ? SW'(rptr) : '0;

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      rptr      <= '0;
      rptr_gray <= '0;
      dout      <= '0;
    end else if (rd_en && !empty) begin
      rptr      <= rptr + 1'b1;
      rptr_gray <= bin2gray(rptr + 1'b1);
      // most significant word of an entry first
      dout      <= rd_entry[(RATIO - 1 - 32'(rd_sub)) * RD_WIDTH +: RD_WIDTH];
    end
  end

  bit_sync #(.WIDTH(WAW+1)) u_sync_w2r (
    .clk (rd_clk), .rst (rst), .d (wptr_gray), .q (wptr_gray_rs)
  );

endmodule
