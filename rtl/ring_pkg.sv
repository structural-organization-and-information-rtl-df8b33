// ring_pkg: types and functions shared by the ring channel blocks.
//
// A channel symbol is either a half-byte of data or one of four tokens
// T1..T4. Each symbol travels over a segment as one word of the 3-of-6
// optimal equilibrium code (C63): six information lines of which exactly
// three are 1. C63 has 20 words; 16 carry the half-bytes 0..15 and the
// remaining four carry the tokens (the four "free" words). The spacer
// between two words is all zeros.
//
// The word assignment is this design's own: the 20 weight-3 six-bit
// values are numbered in increasing numeric order, index 0..15 is the
// half-byte of that value and index 16..19 is T1..T4.
//
// A segment has nine physical lines: six information lines, one
// acknowledgment line and two spare lines. The sliding reserve maps the
// seven logical lines (0..5 information, 6 acknowledgment) onto the
// healthy physical lines in order: logical line j uses the j-th line
// whose bit in the failed-line mask is 0.
package ring_pkg;

  localparam int unsigned SEG_LINES  = 9;  // 6 information + 1 ack + 2 spare
  localparam int unsigned INFO_LINES = 6;
  localparam int unsigned ACK_LOGICAL = 6;
  localparam int unsigned SPARE_LINES = SEG_LINES - ACK_LOGICAL - 1;  // 2

  typedef enum logic [1:0] {TK_T1 = 2'd0, TK_T2 = 2'd1, TK_T3 = 2'd2, TK_T4 = 2'd3} token_e;

  // Bidding states of an adapter (positions of the bidding Petri net):
  // 0 initial, 0' initial recipient-bidder, 1(2) bidder, 3 observer,
  // 4 master with recipient, 5 recipient-bidder, 6 recipient-observer
  typedef enum logic [2:0] {
    B_S0      = 3'd0,
    B_S0P     = 3'd1,
    B_BID     = 3'd2,
    B_OBS     = 3'd3,
    B_MASTER  = 3'd4,
    B_REC_BID = 3'd5,
    B_REC_OBS = 3'd6
  } bid_state_e;

  // tok = 1: a token, val[1:0] holds its token_e code; tok = 0: half-byte val
  typedef struct packed {
    logic       tok;
    logic [3:0] val;
  } sym_t;

  // Byte as held in FIFO1/FIFO2: bit 8 is the tag ("bit 9"), 1 on the last byte
  typedef struct packed {
    logic       last;
    logic [7:0] data;
  } fbyte_t;

  function automatic sym_t mk_tok(token_e t);
    sym_t s;
    s.tok = 1'b1;
    s.val = {2'b00, t};
    return s;
  endfunction

  function automatic sym_t mk_hb(logic [3:0] v);
    sym_t s;
    s.tok = 1'b0;
    s.val = v;
    return s;
  endfunction

  function automatic logic is_tok(sym_t s, token_e t);
    return s.tok && (s.val[1:0] == t);
  endfunction

  function automatic logic [2:0] weight6(logic [5:0] w);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 6; i++) n = n + {2'b00, w[i]};
    return n;
  endfunction

  // Symbol -> C63 code word
  function automatic logic [5:0] oec_encode(sym_t s);
    logic [4:0] idx;
    logic [4:0] k;
    logic [5:0] code;
    idx  = s.tok ? (5'd16 + {3'b000, s.val[1:0]}) : {1'b0, s.val};
    k    = '0;
    code = '0;
    for (int c = 0; c < 64; c++) begin
      if (weight6(6'(c)) == 3'd3) begin
        if (k == idx) code = 6'(c);
        k = k + 5'd1;
      end
    end
    return code;
  endfunction

  // C63 code word -> symbol (the word must have weight 3)
  function automatic sym_t oec_decode(logic [5:0] code);
    logic [4:0] k;
    logic [4:0] idx;
    sym_t s;
    k   = '0;
    idx = '0;
    for (int c = 0; c < 64; c++) begin
      if (weight6(6'(c)) == 3'd3) begin
        if (6'(c) == code) idx = k;
        k = k + 5'd1;
      end
    end
    s.tok = idx[4];
    s.val = idx[4] ? {2'b00, idx[1:0]} : idx[3:0];
    return s;
  endfunction

  // Physical line carrying logical line j under the sliding reserve;
  // 15 (no line) when the mask leaves fewer than j+1 healthy lines
  function automatic logic [3:0] phys_line(logic [SEG_LINES-1:0] fail_mask, int unsigned j);
    logic [3:0] p;
    int unsigned n;
    p = 4'd15;
    n = 0;
    for (int unsigned i = 0; i < SEG_LINES; i++) begin
      if (!fail_mask[i]) begin
        if (n == j) p = 4'(i);
        n++;
      end
    end
    return p;
  endfunction

  // Number of failed lines marked in a mask
  function automatic logic [3:0] fail_count(logic [SEG_LINES-1:0] fail_mask);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < SEG_LINES; i++) n = n + {3'b000, fail_mask[i]};
    return n;
  endfunction

  // More failed lines than spares: the segment cannot carry all seven
  // logical lines any more (the third line fault is detected, not paired)
  function automatic logic reserve_exhausted(logic [SEG_LINES-1:0] fail_mask);
    return fail_count(fail_mask) > 4'(SPARE_LINES);
  endfunction

endpackage
