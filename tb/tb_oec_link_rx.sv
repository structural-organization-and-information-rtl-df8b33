// tb_oec_link_rx: self-checking test of the segment receiver.
//
// The testbench plays the near end of the segment: for a random
// failed-line mask it sends random symbols as 3-of-6 words from its own
// C63 table, raising the three lines one at a time to imitate skew, and
// runs the four-phase handshake with the all-zero spacer. It checks the
// decoded symbols in order, that the acknowledgment sits on the right
// physical line, that the receiver stalls (no acknowledgment) while its
// held symbol is not consumed, and that a weight-4 word, a line stuck in
// a partial word and a mask with a third failed line each raise fa.
module tb_oec_link_rx;
  import ring_pkg::*;

  localparam int unsigned TMO = 16;

  logic                 clk = 1'b0;
  logic                 is;
  logic [SEG_LINES-1:0] fail_mask, line_i, line_o;
  logic                 m_valid, m_ready, fa;
  sym_t                 m_sym;
  logic [5:0]           word;
  int                   map [7];
  logic [5:0]           table_c63 [20];
  sym_t                 sent [$];
  int                   checks = 0, failures = 0;
  logic                 ack;

  oec_link_rx #(.TMO(TMO)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    line_i = line_o;
    for (int j = 0; j < 6; j++) line_i[map[j]] = word[j];
    ack = line_o[map[6]];
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int popc(logic [5:0] w);
    int n = 0;
    for (int i = 0; i < 6; i++) n += w[i];
    return n;
  endfunction

  task automatic set_mask(input logic [SEG_LINES-1:0] m);
    automatic int k = 0;
    fail_mask = m;
    for (int p = 0; p < SEG_LINES; p++) if (!m[p] && k < 7) begin map[k] = p; k++; end
  endtask

  // consumer: takes held symbols at random times and checks their order
  logic consume_en;
  always_ff @(posedge clk) begin
    m_ready <= consume_en && (($urandom % 4) == 0);
  end
  always @(posedge clk) begin
    if (m_valid && m_ready) begin
      checks++;
      if (sent.size() == 0 || m_sym != sent[0]) begin
        failures++;
        $display("FAIL decoded symbol %h at %0t", m_sym, $time);
      end
      if (sent.size() != 0) void'(sent.pop_front());
    end
  end

  initial begin
    automatic int k = 0;
    for (int c = 0; c < 64; c++) if (popc(6'(c)) == 3) begin table_c63[k] = 6'(c); k++; end
    word = '0; consume_en = 1'b1; set_mask('0);
    is = 1'b1; repeat (2) @(posedge clk); is = 1'b0;

    for (int n = 0; n < 400; n++) begin
      int idx;
      logic [5:0] w;
      logic [SEG_LINES-1:0] m;
      if (n % 25 == 0) begin
        m = '0;
        m[$urandom % SEG_LINES] = 1'b1;
        if (($urandom % 2) != 0) m[$urandom % SEG_LINES] = 1'b1;
        set_mask(m);
        #1;
      end
      idx = $urandom % 20;
      sent.push_back((idx < 16) ? mk_hb(4'(idx)) : mk_tok(token_e'(idx - 16)));
      w = table_c63[idx];
      // raise the lines one by one (skew)
      for (int j = 0; j < 6; j++) if (w[j]) begin
        word[j] = 1'b1;
        @(posedge clk); #1;
        if (popc(word) < 3) check(!ack, "no acknowledgment on a partial word");
      end
      while (!ack) begin @(posedge clk); #1; end
      check((line_o & ~(SEG_LINES'(1) << map[6])) == '0, "only the acknowledgment line driven");
      word = '0;
      while (ack) begin @(posedge clk); #1; end
    end
    repeat (40) @(posedge clk);
    check(sent.size() == 0, "all symbols delivered");
    // stall: held symbol not consumed -> next word not acknowledged
    consume_en = 1'b0;
    repeat (3) @(posedge clk);
    word = table_c63[3]; sent.push_back(mk_hb(4'd3));
    while (!ack) @(posedge clk);
    #1 word = '0;
    while (ack) @(posedge clk);
    #1 word = table_c63[4]; sent.push_back(mk_hb(4'd4));
    repeat (TMO/2) @(posedge clk);
    #1 check(!ack, "stalled while the held symbol waits");
    check(!fa, "no fault so far");
    consume_en = 1'b1;
    while (!ack) @(posedge clk);
    #1 word = '0;
    repeat (20) @(posedge clk);
    check(sent.size() == 0, "stalled symbols delivered");
    // weight-4 word
    word = 6'b001111;
    repeat (3) @(posedge clk);
    #1 check(fa, "fault on an invalid word");
    word = '0;
    is = 1'b1; @(posedge clk); #1 is = 1'b0;
    check(!fa, "fault cleared by initial set");
    // a line stuck at 0: the word never completes
    word = 6'b000011;
    repeat (TMO + 4) @(posedge clk);
    #1 check(fa, "fault on a partial word");
    // a third failed line: more than the two spares can cover
    word = '0;
    is = 1'b1; @(posedge clk); #1 is = 1'b0;
    check(!fa, "fault cleared by initial set");
    set_mask(9'b1_0000_0011);
    repeat (2) @(posedge clk);
    #1 check(fa, "third failed line detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
