// channel_adapter: the self-synchronous channel adapter (CA) of one ring
// controller, here as clocked logic.
//
// The adapter is one stage of the ring. Symbols (half-bytes and tokens
// T1..T4) arrive from the upstream segment through oec_link_rx and leave
// on the downstream segment through oec_link_tx. Between them the adapter
// runs three protocols:
//
// * Bidding (token access with priorities). T1 offers the channel: an
//   adapter with a request (FIFO1 not empty) takes the first FIFO1 byte,
//   whose low half-byte is its priority Nc, and sends T2 and Nc instead.
//   T2,N travels round the ring; a requesting adapter replaces N by the
//   larger of N and its own Nc, others pass it on and become observers.
//   When T2,N comes back to a bidder with N equal to its own Nc, that
//   bidder becomes master and sends T3 instead; T3 turns observers into
//   recipient-observers and bidders into recipient-bidders. A
//   recipient-bidder raises its priority by one after the message and
//   bids again at the next T1 (state 0') without re-reading FIFO1.
// * Transmission (master only, ca_tx_ctrl): right after T3 the message
//   follows, ending with T4 and two zero half-bytes.
// * Reception (every adapter, master included). The address byte is a
//   unitary field: each adapter takes its high-order bit as its own
//   "chosen" marker CH, shifts the byte one place towards the high end
//   (a 0 enters at the low end) and passes it on, so the k-th adapter
//   after the master reads the k-th bit from the top without any address
//   decoder. A chosen adapter writes a state byte, then every
//   information byte (tag 0), into FIFO2. After T4 the two zero
//   half-bytes are shifted the same way, with CH entering at the low end,
//   so the master gets back an end word holding one receipt bit per
//   adapter; a chosen adapter writes its shifted end word (tag 1) to
//   FIFO2. A FIFO2 write that fails (FIFO2 full) sets FF2 and clears CH,
//   so the adapter stops storing and reports non-receipt in the end word.
//   The master consumes what comes back instead of passing it on; once
//   its own message is both sent and received back it issues a new T1.
//
// This design's own choices: the symbol and state-byte encodings (see
// ring_pkg and STB below), the one-byte address field, priority in the
// low half of the header byte, and the clocked handshakes. The state
// byte is {Nc, 2'b00, master, recipient-bidder}.
//
// Disconnection: while disc is 1 the adapter takes no part in bidding or
// reception and repeats every symbol unchanged. It no longer shifts the
// address or end word, so every controller after it moves up one place in
// the unitary address, as when a faulty module is taken out of the ring.
// disc is meant to change only while the ring is idle or being restarted.
//
// Interface: ts is a one-cycle "token set" request (the adapter issues the
// first T1); is is the initial set (synchronous reset). FIFO1 is read and
// FIFO2 written with one-cycle strobes. ff1/ff2 are the FIFO fault flags,
// cleared by isf1/isf2; fa is the channel-fault flag of either segment.
module channel_adapter
  import ring_pkg::*;
#(
  parameter int unsigned TMO = 64
) (
  input  logic                 clk,
  input  logic                 is,
  input  logic                 ts,
  input  logic                 isf1,
  input  logic                 isf2,
  input  logic                 disc,      // disconnected: pass every symbol on unchanged
  // FIFO1 (transmission buffer) read side, bus BM
  input  fbyte_t               f1_dout,
  input  logic                 f1_empty,
  input  logic                 f1_err,
  output logic                 f1_rd,
  // FIFO2 (reception buffer) write side, bus BA
  output fbyte_t               f2_din,
  output logic                 f2_wr,
  input  logic                 f2_full,
  // status to the computer
  output logic                 ff1,
  output logic                 ff2,
  output logic                 fa,
  output bid_state_e           bid_state,
  output logic                 chosen,
  output logic [3:0]           prio,
  // upstream segment: DM (information), SM (acknowledgment), RM (spare)
  input  logic [SEG_LINES-1:0] up_fail_mask,
  input  logic [SEG_LINES-1:0] up_line_i,
  output logic [SEG_LINES-1:0] up_line_o,
  // downstream segment: DA, SA, RA
  input  logic [SEG_LINES-1:0] dn_fail_mask,
  input  logic [SEG_LINES-1:0] dn_line_i,
  output logic [SEG_LINES-1:0] dn_line_o
);

  typedef enum logic [2:0] {
    R_IDLE, R_WAIT_T3, R_AL, R_AH, R_IL, R_IH, R_EL, R_EH
  } rx_state_e;

  // ---- link ends ----
  logic in_v, in_rdy, lt_ready, lt_valid, fa_rx, fa_tx;
  sym_t in_sym, lt_sym;

  oec_link_rx #(.TMO(TMO)) u_rx (
    .clk, .is, .fail_mask(up_fail_mask), .line_i(up_line_i), .line_o(up_line_o),
    .m_valid(in_v), .m_sym(in_sym), .m_ready(in_rdy), .fa(fa_rx));

  oec_link_tx #(.TMO(TMO)) u_tx (
    .clk, .is, .fail_mask(dn_fail_mask), .s_valid(lt_valid), .s_sym(lt_sym),
    .s_ready(lt_ready), .line_i(dn_line_i), .line_o(dn_line_o), .fa(fa_tx));

  assign fa = fa_rx | fa_tx;

  // ---- master transmission ----
  logic tx_start, tx_valid, tx_ready, tx_busy, tx_done, ff1_set, tx_f1_rd;
  sym_t tx_sym;

  ca_tx_ctrl u_txc (
    .clk, .is, .start(tx_start), .f1_dout, .f1_empty, .f1_err, .f1_rd(tx_f1_rd),
    .s_valid(tx_valid), .s_sym(tx_sym), .s_ready(tx_ready),
    .busy(tx_busy), .done(tx_done), .ff1_set);

  // ---- state ----
  bid_state_e bst, bst_n;
  rx_state_e  rxs, rxs_n;
  logic       have_t2, have_t2_n;
  logic [3:0] nc, nc_n;
  logic       ch, ch_n;
  logic       hob, hob_n;
  logic [3:0] lhb, lhb_n;
  sym_t       q0, q1, q0_n, q1_n;       // output queue (at most two symbols)
  logic [1:0] qn, qn_n;
  logic       rx_done, rx_done_n, tx_done_seen, tx_done_seen_n;
  logic       ff2_n, ts_pend, ts_pend_n;
  logic       hdr_rd;

  assign bid_state = bst;
  assign chosen    = ch;
  assign prio      = nc;
  assign f1_rd     = hdr_rd | tx_f1_rd;

  // queue first, then the master's transmitter
  assign lt_valid = (qn != 2'd0) ? 1'b1 : tx_valid;
  assign lt_sym   = (qn != 2'd0) ? q0   : tx_sym;
  assign tx_ready = (qn == 2'd0) && lt_ready;

  assign in_rdy = in_v && ((bst == B_MASTER && !disc) || (qn == 2'd0));

  function automatic logic [3:0] max4(logic [3:0] a, logic [3:0] b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    sym_t       s;
    logic       fwd;
    logic [3:0] sh;
    logic [3:0] np;
    logic       nch;

    bst_n = bst; rxs_n = rxs; have_t2_n = have_t2; nc_n = nc; ch_n = ch;
    hob_n = hob; lhb_n = lhb; q0_n = q0; q1_n = q1; qn_n = qn;
    rx_done_n = rx_done; tx_done_seen_n = tx_done_seen;
    ff2_n = ff2; ts_pend_n = ts_pend | ts;
    f2_wr = 1'b0; f2_din = '0; hdr_rd = 1'b0; tx_start = 1'b0;
    s = in_sym; fwd = (bst != B_MASTER); sh = '0; np = '0; nch = 1'b0;

    if (tx_done) tx_done_seen_n = 1'b1;
    if (isf2) ff2_n = 1'b0;

    // output queue drains into the downstream link
    if (qn != 2'd0 && lt_ready) begin
      q0_n = q1;
      qn_n = qn - 2'd1;
    end

    if (in_rdy && disc) begin
      // disconnected: a plain repeater, invisible to addressing and bidding
      q0_n = s; qn_n = 2'd1;
    end else if (in_rdy) begin
      if (bst inside {B_S0, B_S0P, B_OBS, B_BID}) begin
        // ------------- bidding -------------
        if (have_t2) begin
          have_t2_n = 1'b0;
          if (s.tok) begin
            q0_n = mk_tok(TK_T2); q1_n = s; qn_n = 2'd2;
          end else begin
            case (bst)
              B_S0: begin
                if (!f1_empty) begin
                  hdr_rd = 1'b1;
                  nc_n   = f1_dout.data[3:0];
                  q0_n = mk_tok(TK_T2); q1_n = mk_hb(max4(f1_dout.data[3:0], s.val)); qn_n = 2'd2;
                  bst_n  = B_BID;
                end else begin
                  q0_n = mk_tok(TK_T2); q1_n = s; qn_n = 2'd2;
                  bst_n = B_OBS;
                end
              end
              B_S0P: begin
                q0_n = mk_tok(TK_T2); q1_n = mk_hb(max4(nc, s.val)); qn_n = 2'd2;
                bst_n = B_BID;
              end
              B_BID: begin
                if (s.val > nc) begin
                  q0_n = mk_tok(TK_T2); q1_n = s; qn_n = 2'd2;
                end else begin
                  q0_n = mk_tok(TK_T3); qn_n = 2'd1;
                  bst_n = B_MASTER;
                  rxs_n = R_WAIT_T3;
                  tx_start = 1'b1;
                  rx_done_n = 1'b0;
                  tx_done_seen_n = 1'b0;
                end
              end
              default: begin // observer
                q0_n = mk_tok(TK_T2); q1_n = s; qn_n = 2'd2;
              end
            endcase
          end
        end else if (is_tok(s, TK_T1)) begin
          if (bst == B_S0 && !f1_empty) begin
            hdr_rd = 1'b1;
            nc_n   = f1_dout.data[3:0];
            q0_n = mk_tok(TK_T2); q1_n = mk_hb(f1_dout.data[3:0]); qn_n = 2'd2;
            bst_n  = B_BID;
          end else if (bst == B_S0P) begin
            q0_n = mk_tok(TK_T2); q1_n = mk_hb(nc); qn_n = 2'd2;
            bst_n  = B_BID;
          end else begin
            q0_n = s; qn_n = 2'd1;
          end
        end else if (is_tok(s, TK_T2)) begin
          have_t2_n = 1'b1;
        end else if (is_tok(s, TK_T3)) begin
          q0_n = s; qn_n = 2'd1;
          bst_n = (bst == B_BID || bst == B_S0P) ? B_REC_BID : B_REC_OBS;
          rxs_n = R_AL;
        end else begin
          q0_n = s; qn_n = 2'd1;
        end
      end else begin
        // ------------- reception -------------
        case (rxs)
          R_WAIT_T3: if (is_tok(s, TK_T3)) rxs_n = R_AL;
          R_AL: begin
            sh    = {s.val[2:0], 1'b0};
            hob_n = s.val[3];
            if (fwd) begin q0_n = mk_hb(sh); qn_n = 2'd1; end
            rxs_n = R_AH;
          end
          R_AH: begin
            sh  = {s.val[2:0], hob};
            nch = s.val[3];
            if (fwd) begin q0_n = mk_hb(sh); qn_n = 2'd1; end
            if (nch) begin
              f2_wr  = 1'b1;
              f2_din = '{last: 1'b0, data: {nc, 2'b00, bst == B_MASTER, bst == B_REC_BID}};
              if (f2_full) begin ff2_n = 1'b1; nch = 1'b0; end
            end
            ch_n  = nch;
            rxs_n = R_IL;
          end
          R_IL, R_IH: begin
            if (is_tok(s, TK_T4)) begin
              if (fwd) begin q0_n = s; qn_n = 2'd1; end
              rxs_n = R_EL;
            end else begin
              if (fwd) begin q0_n = s; qn_n = 2'd1; end
              if (rxs == R_IL) begin
                lhb_n = s.val;
                rxs_n = R_IH;
              end else begin
                if (ch) begin
                  f2_wr  = 1'b1;
                  f2_din = '{last: 1'b0, data: {s.val, lhb}};
                  if (f2_full) begin ff2_n = 1'b1; ch_n = 1'b0; end
                end
                rxs_n = R_IL;
              end
            end
          end
          R_EL: begin
            sh    = {s.val[2:0], ch};
            hob_n = s.val[3];
            lhb_n = sh;
            if (fwd) begin q0_n = mk_hb(sh); qn_n = 2'd1; end
            rxs_n = R_EH;
          end
          R_EH: begin
            sh = {s.val[2:0], hob};
            if (fwd) begin q0_n = mk_hb(sh); qn_n = 2'd1; end
            if (ch) begin
              f2_wr  = 1'b1;
              f2_din = '{last: 1'b1, data: {sh, lhb}};
              if (f2_full) ff2_n = 1'b1;
            end
            ch_n  = 1'b0;
            rxs_n = R_IDLE;
            case (bst)
              B_MASTER:  rx_done_n = 1'b1;
              B_REC_BID: begin
                np    = (nc == 4'hF) ? nc : nc + 4'd1;
                nc_n  = np;
                bst_n = B_S0P;
              end
              default:   bst_n = B_S0;
            endcase
          end
          default: ;
        endcase
      end
    end

    if (disc) begin
      bst_n = B_S0; rxs_n = R_IDLE; have_t2_n = 1'b0; ch_n = 1'b0;
    end

    // master: message sent and received back -> offer the channel again
    if (!disc && bst == B_MASTER && rx_done && tx_done_seen && !tx_busy && qn == 2'd0 && !in_rdy) begin
      q0_n = mk_tok(TK_T1); qn_n = 2'd1;
      bst_n = B_S0;
      rx_done_n = 1'b0;
      tx_done_seen_n = 1'b0;
    end

    // token set: this adapter issues the first T1
    if (ts_pend && !disc && bst == B_S0 && qn == 2'd0 && !in_rdy) begin
      q0_n = mk_tok(TK_T1); qn_n = 2'd1;
      ts_pend_n = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (is) begin
      bst <= B_S0; rxs <= R_IDLE; have_t2 <= 1'b0; nc <= '0; ch <= 1'b0;
      hob <= 1'b0; lhb <= '0; q0 <= '0; q1 <= '0; qn <= '0;
      rx_done <= 1'b0; tx_done_seen <= 1'b0; ff1 <= 1'b0; ff2 <= 1'b0; ts_pend <= 1'b0;
    end else begin
      bst <= bst_n; rxs <= rxs_n; have_t2 <= have_t2_n; nc <= nc_n; ch <= ch_n;
      hob <= hob_n; lhb <= lhb_n; q0 <= q0_n; q1 <= q1_n; qn <= qn_n;
      rx_done <= rx_done_n; tx_done_seen <= tx_done_seen_n; ff2 <= ff2_n; ts_pend <= ts_pend_n;
      if (ff1_set)   ff1 <= 1'b1;
      else if (isf1) ff1 <= 1'b0;
    end
  end

  // the output queue never overflows: symbols are only queued into an empty queue
  a_queue_empty_on_push: assert property (@(posedge clk) disable iff (is)
    (in_rdy && (disc || bst != B_MASTER)) |-> (qn == 2'd0));

endmodule
