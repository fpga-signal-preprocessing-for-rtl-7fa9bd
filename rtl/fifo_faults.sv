// fifo_faults: sticky alarm flags for misuse of the two SDRAM FIFOs.
//
// The page negotiator must only read a page from the input FIFO when the FIFO
// holds one, and only write a page to the output FIFO when it has room for
// one; the sample writer and the host must likewise respect full and empty.
// Any access that breaks the rule sets one of four alarms, which stays set
// until reset:
//   fifo_in_full   write to the input FIFO while it is full   (sample clock)
//   fifo_in_empty  read from the input FIFO while it is empty (SDRAM clock)
//   fifo_out_full  write to the output FIFO while it is full  (SDRAM clock)
//   fifo_out_empty read from the output FIFO while it is empty (USB clock)
//
// Interface and timing: each alarm is registered in the clock domain of the
// access it watches and rises on the edge after the offending access. The
// alarms are meant for LEDs and status words, so they are not synchronised.
//
// Following the description: the four alarms, their meaning and their
// hold-until-reset behaviour. The per-domain registers are this
// implementation's reading of where each access happens.
module fifo_faults (
  input  logic wr_clk_in,    // clock of the input FIFO write side
  input  logic sdram_clk,    // clock of the SDRAM-facing FIFO sides
  input  logic rd_clk_out,   // clock of the output FIFO read side
  input  logic rst,
  input  logic in_wr_en,
  input  logic in_full,
  input  logic in_rd_en,
  input  logic in_empty,
  input  logic out_wr_en,
  input  logic out_full,
  input  logic out_rd_en,
  input  logic out_empty,
  output logic fifo_in_full,
  output logic fifo_in_empty,
  output logic fifo_out_full,
  output logic fifo_out_empty
);

  always_ff @(posedge wr_clk_in or posedge rst) begin
    if (rst)                       fifo_in_full <= 1'b0;
    else if (in_wr_en && in_full)  fifo_in_full <= 1'b1;
  end

  always_ff @(posedge sdram_clk or posedge rst) begin
    if (rst) begin
      fifo_in_empty <= 1'b0;
      fifo_out_full <= 1'b0;
    end else begin
      if (in_rd_en && in_empty)    fifo_in_empty <= 1'b1;
      if (out_wr_en && out_full)   fifo_out_full <= 1'b1;
    end
  end

  always_ff @(posedge rd_clk_out or posedge rst) begin
    if (rst)                         fifo_out_empty <= 1'b0;
    else if (out_rd_en && out_empty) fifo_out_empty <= 1'b1;
  end

endmodule
