// msg_fifo: first-in first-out byte buffer, used as FIFO1 (bytes from the
// computer waiting to go onto the ring) and FIFO2 (bytes taken off the
// ring waiting for the computer).
//
// Each entry is a 9-bit byte: eight data bits and the tag bit that marks
// the last byte of a message. The buffer decouples the computer side from
// the ring side in time, as the controller requires. The original buffers
// are self-synchronous; this one is a clocked single-clock FIFO, which is
// this design's own choice, as are the depth and the error checks below.
//
// Errors: a parity bit is stored with every entry and checked at the read
// side (rd_err is 1 while the head entry fails its check), and a write
// while full is lost and reported by wr_err in the same cycle. clr empties
// the buffer (the ISF1/ISF2 "reset the FIFO" signals).
//
// Timing: write and read each take one clock edge; the head entry is
// visible on dout one cycle after it was written into an empty buffer.
module msg_fifo
  import ring_pkg::*;
#(
  parameter int unsigned DEPTH = 64   // entries (power of two)
) (
  input  logic   clk,
  input  logic   clr,
  // write side
  input  logic   wr,
  input  fbyte_t din,
  output logic   full,
  output logic   wr_err,
  // read side
  input  logic   rd,
  output fbyte_t dout,
  output logic   empty,
  output logic   rd_err
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [9:0]  mem [DEPTH];      // {parity, tag, data}
  logic [AW:0] wptr, rptr;
  logic [9:0]  head;

  assign empty  = (wptr == rptr);
  assign full   = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign wr_err = wr && full;
  assign head   = mem[rptr[AW-1:0]];
  assign dout   = fbyte_t'(head[8:0]);
  assign rd_err = !empty && (^head);   // stored parity makes the word even

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wptr[AW-1:0]] <= {^din, din};
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr && !full) wptr <= wptr + 1'b1;
      if (rd && !empty) rptr <= rptr + 1'b1;
    end
  end

endmodule
