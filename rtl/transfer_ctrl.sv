// transfer_ctrl: host-controlled memory mode and status word.
//
// Two states, switched by trigger bits from the host over USB:
//   A (write)  the SDRAM is filled with captured samples; a read trigger
//              moves to B
//   B (read)   pages are read from the SDRAM into the output FIFO for the
//              host; a write trigger moves back to A
// The state drives the write and read enables of the page negotiator. The
// status word shown to the host carries the SDRAM row address of the latest
// page command in its middle bits and the state as 0x0A or 0x0B in its low
// byte: {1'b0, rowaddr[14:0], 8'h0A/8'h0B}, six hex digits.
//
// Interface and timing (USB clock domain): triggers are one-cycle pulses;
// the state and both enables change on the edge that sees a trigger. Reset
// enters A. rowaddr comes from the SDRAM clock domain through a synchroniser
// in the caller; it is a display value and may be off by a page while it
// changes.
//
// Following the description: states A and B, their meaning and the status
// word layout. This implementation's own choices: which trigger bit does
// what, and that a trigger for the current state is ignored.
module transfer_ctrl
  import fpp_pkg::*;
#(
  parameter int unsigned RBITS = 15
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             trig_write,
  input  logic             trig_read,
  input  logic [RBITS-1:0] rowaddr,
  output logic             wr_en,
  output logic             rd_en,
  output logic [RBITS+8:0] status,
  output xfer_state_t      mode
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mode <= XFER_A_WRITE;
    end else begin
      unique case (mode)
        XFER_A_WRITE: if (trig_read)  mode <= XFER_B_READ;
        XFER_B_READ:  if (trig_write) mode <= XFER_A_WRITE;
        default:      mode <= XFER_A_WRITE;
      endcase
    end
  end

  assign wr_en  = (mode == XFER_A_WRITE);
  assign rd_en  = (mode == XFER_B_READ);
  assign status = {1'b0, rowaddr, (mode == XFER_A_WRITE) ? 8'h0A : 8'h0B};

endmodule
