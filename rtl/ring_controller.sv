// ring_controller: one controller of the ring without its computer-side
// bus interface: the channel adapter with its transmission buffer FIFO1
// and its reception buffer FIFO2.
//
// The computer side (normally the Q-bus controller) writes messages into
// FIFO1 and reads received messages from FIFO2, one 9-bit byte (data plus
// end tag) per strobe. A message in FIFO1 is: a header byte (low half:
// priority, high half: number of address bytes, which this design fixes
// at one), one unitary address byte, information bytes, and a last byte
// tagged 1. A message in FIFO2 is: a state byte, the information bytes,
// and the end word tagged 1.
//
// isf1/isf2 empty FIFO1/FIFO2 and clear the matching fault flags ff1/ff2;
// is (initial set) resets the whole controller. The two segment ports
// carry the nine bidirectional lines of each neighbouring ring segment.
module ring_controller
  import ring_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned TMO        = 64
) (
  input  logic                 clk,
  input  logic                 is,
  input  logic                 ts,
  input  logic                 isf1,
  input  logic                 isf2,
  input  logic                 disc,       // disconnect from the ring (repeat only)
  // computer side: FIFO1 write
  input  logic                 f1_wr,
  input  fbyte_t               f1_din,
  output logic                 f1_full,
  output logic                 f1_ovf,     // a write into a full FIFO1 was lost
  // computer side: FIFO2 read
  input  logic                 f2_rd,
  output fbyte_t               f2_dout,
  output logic                 f2_empty,
  output logic                 f2_err,     // head byte of FIFO2 fails its parity check
  output logic                 f2_ovf,     // a byte for a full FIFO2 was lost (ER2)
  // status
  output logic                 ff1,
  output logic                 ff2,
  output logic                 fa,
  output bid_state_e           bid_state,
  output logic                 chosen,
  output logic [3:0]           prio,
  // ring segments
  input  logic [SEG_LINES-1:0] up_fail_mask,
  input  logic [SEG_LINES-1:0] up_line_i,
  output logic [SEG_LINES-1:0] up_line_o,
  input  logic [SEG_LINES-1:0] dn_fail_mask,
  input  logic [SEG_LINES-1:0] dn_line_i,
  output logic [SEG_LINES-1:0] dn_line_o
);

  fbyte_t f1_dout, f2_din;
  logic   f1_empty, f1_err, f1_rd, f2_wr, f2_full;
  logic   f2_err_int;

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .clr(is | isf1), .wr(f1_wr), .din(f1_din), .full(f1_full), .wr_err(f1_ovf),
    .rd(f1_rd), .dout(f1_dout), .empty(f1_empty), .rd_err(f1_err));

  msg_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .clr(is | isf2), .wr(f2_wr), .din(f2_din), .full(f2_full), .wr_err(f2_ovf),
    .rd(f2_rd), .dout(f2_dout), .empty(f2_empty), .rd_err(f2_err_int));

  assign f2_err = f2_err_int;

  channel_adapter #(.TMO(TMO)) u_ca (
    .clk, .is, .ts, .isf1, .isf2, .disc,
    .f1_dout, .f1_empty, .f1_err, .f1_rd,
    .f2_din, .f2_wr, .f2_full,
    .ff1, .ff2, .fa, .bid_state, .chosen, .prio,
    .up_fail_mask, .up_line_i, .up_line_o,
    .dn_fail_mask, .dn_line_i, .dn_line_o);

endmodule
