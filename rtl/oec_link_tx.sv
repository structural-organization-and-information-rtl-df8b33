// oec_link_tx: transmitting end of one ring segment (the DA/SA/RA side of
// a channel adapter).
//
// A symbol accepted on the s_* handshake is encoded into its 3-of-6 C63
// code word and sent with a four-phase protocol using an all-zero spacer:
// the word is put on the six information lines, the far end raises the
// acknowledgment line once it has recognised a complete word, the
// transmitter returns the lines to the spacer, and the far end drops the
// acknowledgment. Only then is the next symbol accepted.
//
// The seven logical lines (six information, one acknowledgment) are
// placed on the nine physical lines by the sliding reserve (see
// ring_pkg::phys_line): when line i fails, every line from i up moves one
// place along and a spare line takes the last place. fail_mask marks the
// failed lines; both ends of a segment must hold the same mask.
//
// The physical lines are bidirectional. Here each end drives line_o and
// reads line_i, the value on the wire (the wired OR of both ends'
// drivers); this end drives only the information lines.
//
// Fault detection is this design's own choice: if the acknowledgment
// does not arrive (or does not drop) within TMO clock cycles, fa is
// raised and stays raised until the initial set. fa is also raised when
// fail_mask marks more lines than there are spares: two failed lines are
// tolerated, a third is only detected. The symbol rate in
// clock cycles is: one cycle to drive the word, the far end's recognition
// cycle, and the same again for the spacer, about four cycles per symbol.
module oec_link_tx
  import ring_pkg::*;
#(
  parameter int unsigned TMO = 64   // acknowledgment timeout, clock cycles
) (
  input  logic                 clk,
  input  logic                 is,        // initial set (synchronous reset)
  input  logic [SEG_LINES-1:0] fail_mask, // failed physical lines of this segment
  // symbol stream from the adapter
  input  logic                 s_valid,
  input  sym_t                 s_sym,
  output logic                 s_ready,
  // physical lines
  input  logic [SEG_LINES-1:0] line_i,
  output logic [SEG_LINES-1:0] line_o,
  output logic                 fa          // handshake fault on this segment
);

  typedef enum logic [1:0] {TX_SPACER, TX_WORD, TX_RELEASE} tx_state_e;

  tx_state_e   st;
  logic [5:0]  word;          // logical information lines
  logic        ack;
  logic [3:0]  ack_line;
  logic [$clog2(TMO+1)-1:0] tmo_cnt;

  always_comb begin
    ack_line = phys_line(fail_mask, ACK_LOGICAL);
    ack = (ack_line < 4'(SEG_LINES)) ? line_i[ack_line] : 1'b0;
  end

  always_comb begin
    logic [3:0] p;
    line_o = '0;
    for (int unsigned j = 0; j < INFO_LINES; j++) begin
      p = phys_line(fail_mask, j);
      if (p < 4'(SEG_LINES)) line_o[p] = word[j];
    end
  end

  assign s_ready = (st == TX_SPACER) && !ack && !fa;

  always_ff @(posedge clk) begin
    if (is) begin
      st      <= TX_SPACER;
      word    <= '0;
      tmo_cnt <= '0;
      fa      <= 1'b0;
    end else begin
      if (reserve_exhausted(fail_mask)) fa <= 1'b1;
      case (st)
        TX_SPACER: begin
          tmo_cnt <= '0;
          if (s_valid && s_ready) begin
            word <= oec_encode(s_sym);
            st   <= TX_WORD;
          end
        end
        TX_WORD: begin
          if (ack) begin
            word    <= '0;
            st      <= TX_RELEASE;
            tmo_cnt <= '0;
          end else if (tmo_cnt == TMO[$bits(tmo_cnt)-1:0]) begin
            fa <= 1'b1;
          end else begin
            tmo_cnt <= tmo_cnt + 1'b1;
          end
        end
        default: begin // TX_RELEASE
          if (!ack) begin
            st <= TX_SPACER;
          end else if (tmo_cnt == TMO[$bits(tmo_cnt)-1:0]) begin
            fa <= 1'b1;
          end else begin
            tmo_cnt <= tmo_cnt + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
