// tb_oec_link_tx: self-checking test of the segment transmitter.
//
// The testbench plays the far end of the segment: it looks up where the
// information and acknowledgment lines sit for a random failed-line mask
// (zero, one or two failed lines, its own list walk), waits for a complete
// 3-of-6 word, compares it with its own C63 table (weight-3 words in
// increasing order, half-bytes first, then T1..T4), acknowledges, and
// checks the return to the all-zero spacer. It also checks that failed
// lines are never driven, the symbol period (at most 6 clock cycles with
// an immediate acknowledgment), that a missing acknowledgment raises
// fa after the timeout, and that a mask with a third failed line raises fa
// and stops the transmitter.
module tb_oec_link_tx;
  import ring_pkg::*;

  localparam int unsigned TMO = 16;

  logic                 clk = 1'b0;
  logic                 is;
  logic [SEG_LINES-1:0] fail_mask, line_i, line_o;
  logic                 s_valid, s_ready, fa;
  sym_t                 s_sym;
  logic                 ack;
  int                   map [7];
  logic [5:0]           table_c63 [20];
  int                   checks = 0, failures = 0;

  oec_link_tx #(.TMO(TMO)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    line_i = line_o;
    line_i[map[6]] = ack;
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

  function automatic logic [5:0] gather();
    logic [5:0] w;
    for (int j = 0; j < 6; j++) w[j] = line_o[map[j]];
    return w;
  endfunction

  initial begin
    automatic int k = 0;
    for (int c = 0; c < 64; c++) if (popc(6'(c)) == 3) begin table_c63[k] = 6'(c); k++; end
    ack = 1'b0; s_valid = 1'b0; s_sym = '0; set_mask('0);
    is = 1'b1; repeat (2) @(posedge clk); is = 1'b0;

    for (int n = 0; n < 400; n++) begin
      int idx, t0, t1, lp, l2;
      logic [SEG_LINES-1:0] m;
      m = '0;
      if (n % 20 == 0) begin
        lp = $urandom % SEG_LINES; m[lp] = 1'b1;
        if (($urandom % 2) != 0) begin l2 = $urandom % SEG_LINES; m[l2] = 1'b1; end
        set_mask(m);
      end
      idx = $urandom % 20;
      s_sym = (idx < 16) ? mk_hb(4'(idx)) : mk_tok(token_e'(idx - 16));
      t0 = 0;
      @(negedge clk);
      s_valid = 1'b1;
      while (!s_ready) begin @(negedge clk); t0++; end
      @(posedge clk);
      #1 s_valid = 1'b0;
      t1 = 0;
      while (popc(gather()) != 3) begin @(posedge clk); #1; t1++; end
      check(gather() == table_c63[idx], "code word");
      check((line_o & fail_mask) == '0, "failed lines idle");
      ack = 1'b1;
      while (gather() != '0) begin @(posedge clk); #1; t1++; end
      ack = 1'b0;
      if (n < 3) $display("handshake: %0d wait, %0d word+spacer cycles", t0, t1);
      check(t0 + t1 <= 6, "symbol period");
    end
    check(!fa, "no fault during normal traffic");
    // missing acknowledgment
    s_sym = mk_hb(4'h5);
    @(negedge clk);
    s_valid = 1'b1;
    while (!s_ready) @(negedge clk);
    @(posedge clk);
    #1 s_valid = 1'b0;
    repeat (TMO + 4) @(posedge clk);
    #1 check(fa, "fault after missing acknowledgment");
    // a third failed line: more than the two spares can cover
    is = 1'b1; @(posedge clk); #1 is = 1'b0;
    check(!fa, "fault cleared by initial set");
    set_mask(9'b0_0101_0100);
    repeat (2) @(posedge clk);
    #1 check(fa, "third failed line detected");
    check(!s_ready, "no symbol accepted after a third failed line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
