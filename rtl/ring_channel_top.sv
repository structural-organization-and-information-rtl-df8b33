// ring_channel_top: a ring baseband channel of N_NODES controllers.
//
// Controller i sends on segment i to controller (i+1) mod N_NODES, so the
// data travels one way round the ring while each segment's acknowledgment
// line runs the other way. Every segment has nine physical lines (six
// information, one acknowledgment, two spare); a line is modelled as the
// wired OR of what its two ends drive, which is how both ends can use a
// line in either direction after the sliding reserve has moved lines.
// seg_fail_mask[i] tells both ends of segment i which lines are out of
// service; setting it is the job of the computers in line-repair mode.
//
// disc[i] takes controller i out of the ring logically: it only repeats
// symbols, and the controllers after it move up one address position.
//
// All computer-side signals of every controller are brought out as arrays
// indexed by controller: FIFO1 write, FIFO2 read, initial set, token set,
// FIFO resets and the fault and state flags. One controller (the main
// master) must be given a ts pulse after the initial set to start the
// first bidding cycle.
//
// N_NODES defaults to 8 because the one-byte unitary address field has a
// bit for each controller; the document gives no number of controllers.
module ring_channel_top
  import ring_pkg::*;
#(
  parameter int unsigned N_NODES    = 8,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned TMO        = 64
) (
  input  logic                 clk,
  input  logic [N_NODES-1:0]   is,
  input  logic [N_NODES-1:0]   ts,
  input  logic [N_NODES-1:0]   isf1,
  input  logic [N_NODES-1:0]   isf2,
  input  logic [N_NODES-1:0]   disc,
  input  logic [N_NODES-1:0]   f1_wr,
  input  fbyte_t               f1_din   [N_NODES],
  output logic [N_NODES-1:0]   f1_full,
  output logic [N_NODES-1:0]   f1_ovf,
  input  logic [N_NODES-1:0]   f2_rd,
  output fbyte_t               f2_dout  [N_NODES],
  output logic [N_NODES-1:0]   f2_empty,
  output logic [N_NODES-1:0]   f2_err,
  output logic [N_NODES-1:0]   f2_ovf,
  output logic [N_NODES-1:0]   ff1,
  output logic [N_NODES-1:0]   ff2,
  output logic [N_NODES-1:0]   fa,
  output bid_state_e           bid_state [N_NODES],
  output logic [N_NODES-1:0]   chosen,
  output logic [3:0]           prio     [N_NODES],
  input  logic [SEG_LINES-1:0] seg_fail_mask [N_NODES]
);

  // segment i runs from controller i to controller (i+1) mod N_NODES
  logic [SEG_LINES-1:0] seg_fwd  [N_NODES];  // driven by the upstream end
  logic [SEG_LINES-1:0] seg_bwd  [N_NODES];  // driven by the downstream end
  logic [SEG_LINES-1:0] seg_line [N_NODES];  // value on the wires

  for (genvar i = 0; i < N_NODES; i++) begin : g_seg
    assign seg_line[i] = seg_fwd[i] | seg_bwd[i];
  end

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam int unsigned UP = (i + N_NODES - 1) % N_NODES;
    ring_controller #(.FIFO_DEPTH(FIFO_DEPTH), .TMO(TMO)) u_ctrl (
      .clk,
      .is(is[i]), .ts(ts[i]), .isf1(isf1[i]), .isf2(isf2[i]), .disc(disc[i]),
      .f1_wr(f1_wr[i]), .f1_din(f1_din[i]), .f1_full(f1_full[i]), .f1_ovf(f1_ovf[i]),
      .f2_rd(f2_rd[i]), .f2_dout(f2_dout[i]), .f2_empty(f2_empty[i]), .f2_err(f2_err[i]), .f2_ovf(f2_ovf[i]),
      .ff1(ff1[i]), .ff2(ff2[i]), .fa(fa[i]),
      .bid_state(bid_state[i]), .chosen(chosen[i]), .prio(prio[i]),
      .up_fail_mask(seg_fail_mask[UP]), .up_line_i(seg_line[UP]), .up_line_o(seg_bwd[UP]),
      .dn_fail_mask(seg_fail_mask[i]),  .dn_line_i(seg_line[i]),  .dn_line_o(seg_fwd[i]));
  end

endmodule
