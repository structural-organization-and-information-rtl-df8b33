// oec_link_rx: receiving end of one ring segment (the DM/SM/RM side of a
// channel adapter).
//
// The receiver watches the six logical information lines. A word is
// complete when exactly three lines are 1 (completion detection of the
// 3-of-6 C63 code, independent of the skew between lines). It is then
// decoded into a symbol, held for the adapter, and acknowledged on the
// acknowledgment line. The acknowledgment is dropped when the lines have
// returned to the all-zero spacer. A new word is only taken once the
// adapter has consumed the held symbol (m_valid/m_ready), so the segment
// stalls while the adapter is busy: the ring works as an asynchronous
// pipeline with one place per adapter.
//
// Logical lines are found on the physical lines through the sliding
// reserve (ring_pkg::phys_line) with the segment's failed-line mask.
//
// Fault detection is this design's own choice: a word of weight 4 or more
// is never a code word, and a partial word (weight 1 or 2), or a spacer
// that does not come after an acknowledgment, that lasts TMO clock cycles
// means a line is stuck. Either raises fa, which stays raised until the
// initial set. So does a fail_mask with more failed lines than spares.
module oec_link_rx
  import ring_pkg::*;
#(
  parameter int unsigned TMO = 64   // partial-word / spacer timeout, clock cycles
) (
  input  logic                 clk,
  input  logic                 is,        // initial set (synchronous reset)
  input  logic [SEG_LINES-1:0] fail_mask,
  // physical lines
  input  logic [SEG_LINES-1:0] line_i,
  output logic [SEG_LINES-1:0] line_o,
  // symbol stream to the adapter
  output logic                 m_valid,
  output sym_t                 m_sym,
  input  logic                 m_ready,
  output logic                 fa
);

  logic [5:0] word;
  logic [2:0] w;
  logic       ack;
  logic       stuck;
  logic [3:0] ack_line;
  logic [$clog2(TMO+1)-1:0] tmo_cnt;

  always_comb begin
    logic [3:0] p;
    for (int unsigned j = 0; j < INFO_LINES; j++) begin
      p = phys_line(fail_mask, j);
      word[j] = (p < 4'(SEG_LINES)) ? line_i[p] : 1'b0;
    end
    w = weight6(word);
  end

  always_comb begin
    ack_line = phys_line(fail_mask, ACK_LOGICAL);
    line_o = '0;
    if (ack_line < 4'(SEG_LINES)) line_o[ack_line] = ack;
  end

  // waiting on something the far end should have finished by now
  assign stuck = ack ? (w != 3'd0) : (w == 3'd1 || w == 3'd2);

  always_ff @(posedge clk) begin
    if (is) begin
      ack     <= 1'b0;
      m_valid <= 1'b0;
      m_sym   <= '0;
      tmo_cnt <= '0;
      fa      <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;

      if (w > 3'd3 || reserve_exhausted(fail_mask)) fa <= 1'b1;

      if (!ack) begin
        if (w == 3'd3 && !m_valid) begin
          m_sym   <= oec_decode(word);
          m_valid <= 1'b1;
          ack     <= 1'b1;
        end
      end else if (w == 3'd0) begin
        ack <= 1'b0;
      end

      if (!stuck) begin
        tmo_cnt <= '0;
      end else if (tmo_cnt == TMO[$bits(tmo_cnt)-1:0]) begin
        fa <= 1'b1;
      end else begin
        tmo_cnt <= tmo_cnt + 1'b1;
      end
    end
  end

endmodule
