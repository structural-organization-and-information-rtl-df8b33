// tb_channel_adapter: self-checking test of one channel adapter.
//
// The adapter sits between a segment transmitter (the upstream neighbour,
// fed from a symbol script) and a segment receiver (the downstream
// neighbour, whose symbols are compared in order with an expected list).
// FIFO1 and FIFO2 are queue models; FIFO2 can be held full.
//
// Scenarios: token set; T1 passed with no request; an observer passing
// T2,N and T3 and then receiving a message addressed to it (address and
// end word shifted one bit, CH shifted into the end word, state byte,
// information and end word stored); a bidder that wins (T3 instead of
// T2,N, its message sent, its own message received back and absorbed,
// new T1); a bidder that loses (recipient-bidder, not addressed, priority
// raised by one, bids again from state 0' without reading FIFO1); and
// reception into a full FIFO2 (FF2, CH cleared, receipt bit 0); and a
// disconnected adapter that repeats everything unchanged.
module tb_channel_adapter;
  import ring_pkg::*;

  logic clk = 1'b0;
  logic is, ts, isf1, isf2, disc;
  fbyte_t f1_dout, f2_din;
  logic f1_empty, f1_err, f1_rd, f2_wr, f2_full;
  logic ff1, ff2, fa, chosen;
  bid_state_e bid_state;
  logic [3:0] prio;
  logic [SEG_LINES-1:0] up_line, dn_line, up_from_src, up_from_ca, dn_from_ca, dn_from_snk;
  logic [SEG_LINES-1:0] mask_up = '0, mask_dn = '0;

  logic src_v, src_rdy, snk_v, snk_rdy, fa_src, fa_snk;
  sym_t src_sym, snk_sym;

  sym_t   src_q [$], exp_q [$];
  fbyte_t f1_q [$], f2_exp [$];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  oec_link_tx #(.TMO(64)) u_src (.clk, .is, .fail_mask(mask_up), .s_valid(src_v), .s_sym(src_sym),
    .s_ready(src_rdy), .line_i(up_line), .line_o(up_from_src), .fa(fa_src));
  oec_link_rx #(.TMO(64)) u_snk (.clk, .is, .fail_mask(mask_dn), .line_i(dn_line), .line_o(dn_from_snk),
    .m_valid(snk_v), .m_sym(snk_sym), .m_ready(snk_rdy), .fa(fa_snk));

  channel_adapter #(.TMO(64)) dut (
    .clk, .is, .ts, .isf1, .isf2, .disc, .f1_dout, .f1_empty, .f1_err, .f1_rd,
    .f2_din, .f2_wr, .f2_full, .ff1, .ff2, .fa, .bid_state, .chosen, .prio,
    .up_fail_mask(mask_up), .up_line_i(up_line), .up_line_o(up_from_ca),
    .dn_fail_mask(mask_dn), .dn_line_i(dn_line), .dn_line_o(dn_from_ca));

  assign up_line = up_from_src | up_from_ca;
  assign dn_line = dn_from_ca | dn_from_snk;

  assign snk_rdy = 1'b1;
  assign f1_err  = 1'b0;

  // queue-backed models are refreshed shortly after every clock edge
  logic src_acc;
  always @(posedge clk) src_acc <= src_v && src_rdy;
  always @(negedge clk) begin
    if (src_acc) src_v = 1'b0;
    if (!src_v && src_q.size() != 0) begin
      src_sym = src_q.pop_front();
      src_v   = 1'b1;
    end
  end
  always @(clk) begin
    #2;
    f1_empty = f1_q.size() == 0;
    f1_dout  = f1_empty ? fbyte_t'(0) : f1_q[0];
  end
  always @(posedge clk) begin
    if (f1_rd) begin #1 if (!f1_empty) void'(f1_q.pop_front()); end
  end
  always @(posedge clk) begin
    if (snk_v && snk_rdy) begin
      checks++;
      if (exp_q.size() == 0 || snk_sym != exp_q[0]) begin
        failures++;
        $display("FAIL output symbol %h, expected %h at %0t", snk_sym,
                 exp_q.size() ? exp_q[0] : sym_t'(5'h1f), $time);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (f2_wr && !f2_full) begin
      checks++;
      if (f2_exp.size() == 0 || f2_din != f2_exp[0]) begin
        failures++;
        $display("FAIL FIFO2 byte %h, expected %h at %0t", f2_din,
                 f2_exp.size() ? f2_exp[0] : fbyte_t'(0), $time);
      end
      if (f2_exp.size() != 0) void'(f2_exp.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sym_t T(int n);
    return mk_tok(token_e'(n - 1));
  endfunction
  function automatic sym_t H(int v);
    return mk_hb(4'(v));
  endfunction

  task automatic settle();
    int quiet = 0;
    while (quiet < 30) begin
      @(posedge clk);
      if (src_q.size() != 0 || src_v || snk_v) quiet = 0; else quiet++;
    end
    check(exp_q.size() == 0, "all expected symbols seen");
    check(f2_exp.size() == 0, "all expected FIFO2 bytes seen");
  endtask

  // a byte on the channel: low half then high half
  task automatic src_byte(input logic [7:0] b);
    src_q.push_back(H(b[3:0])); src_q.push_back(H(b[7:4]));
  endtask
  task automatic exp_byte(input logic [7:0] b);
    exp_q.push_back(H(b[3:0])); exp_q.push_back(H(b[7:4]));
  endtask

  // a message seen by a forwarding recipient: address a, info bytes, end word e
  task automatic pass_message(input logic [7:0] a, input logic [7:0] info [], input logic [7:0] e,
                              input logic store, input logic [7:0] stb, input logic [7:0] e_out);
    logic [7:0] a_out;
    a_out = {a[6:0], 1'b0};
    src_byte(a); exp_byte(a_out);
    if (store) f2_exp.push_back('{last: 1'b0, data: stb});
    foreach (info[i]) begin
      src_byte(info[i]); exp_byte(info[i]);
      if (store) f2_exp.push_back('{last: 1'b0, data: info[i]});
    end
    src_q.push_back(T(4)); exp_q.push_back(T(4));
    src_byte(e); exp_byte(e_out);
    if (store) f2_exp.push_back('{last: 1'b1, data: e_out});
  endtask

  initial begin
    logic [7:0] info [];
    src_v = 1'b0; src_sym = '0;
    disc = 1'b0;
    is = 1'b1; ts = 1'b0; isf1 = 1'b0; isf2 = 1'b0; f2_full = 1'b0;
    repeat (3) @(posedge clk); #1 is = 1'b0;

    // token set
    exp_q.push_back(T(1));
    @(negedge clk) ts = 1'b1; @(negedge clk) ts = 1'b0;
    settle();

    // T1 with no request passes
    src_q.push_back(T(1)); exp_q.push_back(T(1));
    settle();
    check(bid_state == B_S0, "stays in state 0");

    // observer, then chosen recipient-observer
    src_q.push_back(T(2)); src_q.push_back(H(7));
    exp_q.push_back(T(2)); exp_q.push_back(H(7));
    settle();
    check(bid_state == B_OBS, "observer after T2,N");
    src_q.push_back(T(3)); exp_q.push_back(T(3));
    settle();
    check(bid_state == B_REC_OBS, "recipient-observer after T3");
    info = new[3]; info[0] = 8'h12; info[1] = 8'hC4; info[2] = 8'h9E;
    // address 1010_0101: CH = 1; end word 0000_0110 -> 0000_1101
    pass_message(8'hA5, info, 8'h06, 1'b1, 8'h00, 8'h0D);
    settle();
    check(bid_state == B_S0, "back to state 0 after the message");
    check(!chosen, "marker cleared after the end word");

    // bidder that wins: header priority 5, address 1000_0000 (master not chosen)
    f1_q.push_back('{last: 1'b0, data: 8'h15});
    f1_q.push_back('{last: 1'b0, data: 8'h80});
    f1_q.push_back('{last: 1'b0, data: 8'h3C});
    f1_q.push_back('{last: 1'b1, data: 8'hE7});
    src_q.push_back(T(1)); exp_q.push_back(T(2)); exp_q.push_back(H(5));
    settle();
    check(bid_state == B_BID && prio == 4'd5, "bidder with Nc from FIFO1");
    check(f1_q.size() == 3, "header byte taken from FIFO1");
    src_q.push_back(T(2)); src_q.push_back(H(5));
    exp_q.push_back(T(3));
    exp_byte(8'h80); exp_byte(8'h3C); exp_byte(8'hE7);
    exp_q.push_back(T(4)); exp_q.push_back(H(0)); exp_q.push_back(H(0));
    settle();
    check(bid_state == B_MASTER, "master after own priority returns");
    check(f1_q.size() == 0, "message read from FIFO1");
    // own message comes back after 7 shifts: address bit 0 is the master's
    src_q.push_back(T(3)); src_byte(8'h00); src_byte(8'h3C); src_byte(8'hE7);
    src_q.push_back(T(4)); src_byte(8'h7F);
    exp_q.push_back(T(1));
    settle();
    check(bid_state == B_S0, "master returns to state 0 and issues T1");

    // self-addressed master: receives its own message into FIFO2
    f1_q.push_back('{last: 1'b0, data: 8'h19});
    f1_q.push_back('{last: 1'b0, data: 8'h01});
    f1_q.push_back('{last: 1'b1, data: 8'h55});
    src_q.push_back(T(2)); src_q.push_back(H(4));
    exp_q.push_back(T(2)); exp_q.push_back(H(9));
    settle();
    src_q.push_back(T(2)); src_q.push_back(H(9));
    exp_q.push_back(T(3)); exp_byte(8'h01); exp_byte(8'h55);
    exp_q.push_back(T(4)); exp_q.push_back(H(0)); exp_q.push_back(H(0));
    settle();
    src_q.push_back(T(3)); src_byte(8'h80); src_byte(8'h55);
    src_q.push_back(T(4)); src_byte(8'h42);
    f2_exp.push_back('{last: 1'b0, data: {4'd9, 2'b00, 1'b1, 1'b0}});
    f2_exp.push_back('{last: 1'b0, data: 8'h55});
    f2_exp.push_back('{last: 1'b1, data: 8'h85});
    exp_q.push_back(T(1));
    settle();

    // bidder that loses: priority 3 against 9
    f1_q.push_back('{last: 1'b0, data: 8'h13});
    f1_q.push_back('{last: 1'b0, data: 8'h40});
    f1_q.push_back('{last: 1'b1, data: 8'hAA});
    src_q.push_back(T(2)); src_q.push_back(H(9));
    exp_q.push_back(T(2)); exp_q.push_back(H(9));
    settle();
    check(bid_state == B_BID && prio == 4'd3, "bidder with Nc 3");
    src_q.push_back(T(2)); src_q.push_back(H(9));
    exp_q.push_back(T(2)); exp_q.push_back(H(9));
    src_q.push_back(T(3)); exp_q.push_back(T(3));
    settle();
    check(bid_state == B_REC_BID, "recipient-bidder");
    info = new[1]; info[0] = 8'h77;
    pass_message(8'h40, info, 8'h00, 1'b0, 8'h00, 8'h00);
    settle();
    check(bid_state == B_S0P && prio == 4'd4, "state 0' with priority raised by one");
    src_q.push_back(T(1)); exp_q.push_back(T(2)); exp_q.push_back(H(4));
    settle();
    check(bid_state == B_BID && f1_q.size() == 2, "bids again without reading FIFO1");
    // it now wins, sends, and gets its message back
    src_q.push_back(T(2)); src_q.push_back(H(4));
    exp_q.push_back(T(3)); exp_byte(8'h40); exp_byte(8'hAA);
    exp_q.push_back(T(4)); exp_q.push_back(H(0)); exp_q.push_back(H(0));
    settle();
    src_q.push_back(T(3)); src_byte(8'h00); src_byte(8'hAA); src_q.push_back(T(4)); src_byte(8'h00);
    exp_q.push_back(T(1));
    settle();

    // chosen recipient with FIFO2 full: FF2, CH cleared, receipt bit 0
    src_q.push_back(T(2)); src_q.push_back(H(2)); exp_q.push_back(T(2)); exp_q.push_back(H(2));
    src_q.push_back(T(3)); exp_q.push_back(T(3));
    settle();
    f2_full = 1'b1;
    info = new[2]; info[0] = 8'h01; info[1] = 8'h02;
    pass_message(8'h81, info, 8'h00, 1'b0, 8'h00, 8'h00);
    settle();
    check(ff2, "FF2 after a FIFO2 write failed");
    f2_full = 1'b0;
    @(negedge clk) isf2 = 1'b1; @(negedge clk) isf2 = 1'b0;
    check(!ff2, "FF2 cleared by ISF2");
    check(!fa && !ff1, "no channel fault");

    // disconnected: everything repeated unchanged, no bid despite a request
    f1_q.push_back('{last: 1'b0, data: 8'h1F});
    @(negedge clk) disc = 1'b1;
    src_q.push_back(T(1)); exp_q.push_back(T(1));
    src_q.push_back(T(2)); src_q.push_back(H(3)); exp_q.push_back(T(2)); exp_q.push_back(H(3));
    src_q.push_back(T(3)); exp_q.push_back(T(3));
    src_byte(8'hC3); exp_byte(8'hC3);
    src_q.push_back(T(4)); exp_q.push_back(T(4));
    src_byte(8'h00); exp_byte(8'h00);
    settle();
    check(bid_state == B_S0 && f1_q.size() == 1, "disconnected adapter neither bids nor receives");
    @(negedge clk) disc = 1'b0;
    src_q.push_back(T(1)); exp_q.push_back(T(2)); exp_q.push_back(H(15));
    settle();
    check(bid_state == B_BID, "bids again once reconnected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
