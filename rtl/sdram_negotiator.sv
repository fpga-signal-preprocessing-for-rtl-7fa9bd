// sdram_negotiator: moves whole pages between the two FIFOs and the SDRAM
// controller.
//
// The SDRAM is accessed in pages of PAGE_WORDS 16-bit words. In write mode a
// page write is started as soon as the input FIFO holds a full page; in read
// mode a page read is started as soon as the output FIFO has room for a full
// page. Write and read use separate row pointers, each advanced when the
// controller accepts a command, so a capture can be read back from its first
// page while the write pointer still marks its end. Reads and writes never
// overlap: one page at a time.
//
// States: IDLE -> W_ACK (cmd_pagewrite held until cmd_ack) -> BUSY (until
// cmd_done) -> IDLE, and likewise IDLE -> R_ACK (cmd_pageread) -> BUSY. A
// write has priority when both are possible.
//
// Interface and timing (SDRAM clock domain): cmd_pagewrite, cmd_pageread and
// rowaddr are registered state outputs; rowaddr is stable from the cycle the
// command is raised until the next command. cmd_ack and cmd_done are
// one-cycle pulses from the controller. fifo_in_count / fifo_out_count are
// the FIFO occupancies in 16-bit words.
//
// Following the description: the page-sized rule for both FIFOs, the four
// states, the separate read and write pointers. This implementation's own
// choices: the exact thresholds are a whole page (not a coarse count), and
// the write priority.
module sdram_negotiator
  import fpp_pkg::*;
#(
  parameter int unsigned PAGE  = 512,
  parameter int unsigned RBITS = 15,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned CW = $clog2(DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_enable,
  input  logic             rd_enable,
  input  logic [CW-1:0]    fifo_in_count,
  input  logic [CW-1:0]    fifo_out_count,
  output logic             cmd_pagewrite,
  output logic             cmd_pageread,
  input  logic             cmd_ack,
  input  logic             cmd_done,
  output logic [RBITS-1:0] rowaddr,
  output logic [RBITS-1:0] wr_ptr,
  output logic [RBITS-1:0] rd_ptr,
  output neg_state_t       state
);

  logic page_in_ready, page_out_room;

  assign page_in_ready = (fifo_in_count >= CW'(PAGE));
  assign page_out_room = (fifo_out_count <= CW'(DEPTH - PAGE));
  assign cmd_pagewrite = (state == NEG_W_ACK);
  assign cmd_pageread  = (state == NEG_R_ACK);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= NEG_IDLE;
      rowaddr <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else begin
      // handshake rules: acknowledge only a pending command, done only
      // while a page is moving
      if (cmd_ack)  assert (state == NEG_W_ACK || state == NEG_R_ACK);
      if (cmd_done) assert (state == NEG_BUSY);
      unique case (state)
        NEG_IDLE: begin
          if (wr_enable && page_in_ready) begin
            rowaddr <= wr_ptr;
            state   <= NEG_W_ACK;
          end else if (rd_enable && page_out_room) begin
            rowaddr <= rd_ptr;
            state   <= NEG_R_ACK;
          end
        end
        NEG_W_ACK: if (cmd_ack) begin
          wr_ptr <= wr_ptr + 1'b1;
          state  <= NEG_BUSY;
        end
        NEG_R_ACK: if (cmd_ack) begin
          rd_ptr <= rd_ptr + 1'b1;
          state  <= NEG_BUSY;
        end
        NEG_BUSY: if (cmd_done) state <= NEG_IDLE;
        default: state <= NEG_IDLE;
      endcase
    end
  end


endmodule
