// ca_tx_ctrl: transmitting part of the master (message transmission
// protocol).
//
// Started once the adapter has won the channel and issued token T3, it
// reads the message from FIFO1 byte by byte. Each byte goes onto the
// channel as two half-bytes, low half first, then high half. After the
// byte whose tag bit is 1 (the end of the message) it sends the end
// marker T4 and two all-zero half-bytes; the ring modules shift their
// receipt markers into those two half-bytes, assembling the end word.
// If FIFO1 reports an error for the byte it is about to read (ER1), the
// byte is not sent: ff1_set pulses and the message is closed at once
// with T4 and the two zero half-bytes.
//
// The header byte holding the priority was already taken from FIFO1
// during bidding, so transmission begins with the address byte.
//
// Interface: start (one-cycle pulse), FIFO1 head/empty/err with a read
// strobe, a valid/ready symbol stream, and a done pulse after the last
// zero half-byte was accepted. A byte costs one read cycle plus the two
// half-bytes; while FIFO1 is empty the transmitter waits (the computer
// may still be filling it).
module ca_tx_ctrl
  import ring_pkg::*;
(
  input  logic   clk,
  input  logic   is,
  input  logic   start,
  // FIFO1 read side
  input  fbyte_t f1_dout,
  input  logic   f1_empty,
  input  logic   f1_err,
  output logic   f1_rd,
  // symbols to the channel
  output logic   s_valid,
  output sym_t   s_sym,
  input  logic   s_ready,
  // status
  output logic   busy,
  output logic   done,
  output logic   ff1_set
);

  typedef enum logic [2:0] {
    T_IDLE, T_FETCH, T_LHB, T_HHB, T_MARK, T_ZERO1, T_ZERO2
  } tx_state_e;

  tx_state_e st;
  fbyte_t    bt;

  assign busy  = (st != T_IDLE);
  assign f1_rd = (st == T_FETCH) && !f1_empty && !f1_err;

  always_comb begin
    s_valid = 1'b0;
    s_sym   = mk_hb(4'h0);
    case (st)
      T_LHB:   begin s_valid = 1'b1; s_sym = mk_hb(bt.data[3:0]); end
      T_HHB:   begin s_valid = 1'b1; s_sym = mk_hb(bt.data[7:4]); end
      T_MARK:  begin s_valid = 1'b1; s_sym = mk_tok(TK_T4);       end
      T_ZERO1,
      T_ZERO2: begin s_valid = 1'b1; s_sym = mk_hb(4'h0);         end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    done    <= 1'b0;
    ff1_set <= 1'b0;
    if (is) begin
      st <= T_IDLE;
      bt <= '0;
    end else begin
      case (st)
        T_IDLE:  if (start) st <= T_FETCH;
        T_FETCH: if (!f1_empty) begin
                   if (f1_err) begin
                     ff1_set <= 1'b1;
                     st      <= T_MARK;
                   end else begin
                     bt <= f1_dout;
                     st <= T_LHB;
                   end
                 end
        T_LHB:   if (s_ready) st <= T_HHB;
        T_HHB:   if (s_ready) st <= bt.last ? T_MARK : T_FETCH;
        T_MARK:  if (s_ready) st <= T_ZERO1;
        T_ZERO1: if (s_ready) st <= T_ZERO2;
        default: if (s_ready) begin   // T_ZERO2
                   st   <= T_IDLE;
                   done <= 1'b1;
                 end
      endcase
    end
  end

endmodule
