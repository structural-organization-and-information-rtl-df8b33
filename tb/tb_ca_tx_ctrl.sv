// tb_ca_tx_ctrl: self-checking test of the master's transmission protocol.
//
// A FIFO1 model holds random messages (random length, last byte tagged).
// After start, the testbench accepts symbols with random back-pressure
// and checks the sequence: low then high half-byte of every byte, then
// T4 and two zero half-bytes, then done. A second run marks one byte as
// faulty (ER1): the byte must not be sent, ff1_set must pulse, and the
// message must close with T4 and the two zero half-bytes at once.
module tb_ca_tx_ctrl;
  import ring_pkg::*;

  logic   clk = 1'b0;
  logic   is, start, f1_empty, f1_err, f1_rd;
  fbyte_t f1_dout;
  logic   s_valid, s_ready, busy, done, ff1_set;
  sym_t   s_sym;
  fbyte_t fifo [$];
  int     err_at;          // index of the faulty byte, -1 for none
  int     popped;
  sym_t   expect_q [$];
  int     checks = 0, failures = 0;
  int     n_done = 0, n_ff1 = 0;

  ca_tx_ctrl dut (.*);

  always #5 clk = ~clk;

  assign f1_empty = (fifo.size() == 0);
  assign f1_dout  = f1_empty ? fbyte_t'(0) : fifo[0];
  assign f1_err   = !f1_empty && (popped == err_at);

  // FIFO1 model: the read takes effect just after the clock edge
  always @(posedge clk) begin
    if (f1_rd) begin
      #1;
      if (f1_empty) begin failures++; $display("FAIL read from empty FIFO1"); end
      else begin void'(fifo.pop_front()); popped++; end
    end
  end

  always @(posedge clk) begin
    s_ready <= ($urandom % 3) != 0;
    if (s_valid && s_ready) begin
      checks++;
      if (expect_q.size() == 0 || s_sym != expect_q[0]) begin
        failures++;
        $display("FAIL symbol %h exp %h at %0t", s_sym, expect_q.size() ? expect_q[0] : 5'h1f, $time);
      end
      if (expect_q.size() != 0) void'(expect_q.pop_front());
    end
    if (done) n_done++;
    if (ff1_set) n_ff1++;
  end

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic run_message(input int len, input int bad);
    fbyte_t b;
    int d0, f0;
    popped = 0; err_at = bad;
    for (int i = 0; i < len; i++) begin
      b.data = 8'($urandom);
      b.last = (i == len - 1);
      fifo.push_back(b);
      if (bad < 0 || i < bad) begin
        expect_q.push_back(mk_hb(b.data[3:0]));
        expect_q.push_back(mk_hb(b.data[7:4]));
      end
    end
    expect_q.push_back(mk_tok(TK_T4));
    expect_q.push_back(mk_hb(4'h0));
    expect_q.push_back(mk_hb(4'h0));
    d0 = n_done; f0 = n_ff1;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    while (n_done == d0) @(posedge clk);
    @(negedge clk);
    check(expect_q.size() == 0, "whole message sent");
    check(!busy, "idle after done");
    check((n_ff1 - f0) == ((bad >= 0) ? 1 : 0), "ff1 pulse count");
    if (bad >= 0) check(fifo.size() == len - bad, "faulty byte left in FIFO1");
    fifo.delete();
    expect_q.delete();
  endtask

  initial begin
    start = 1'b0; s_ready = 1'b0; popped = 0; err_at = -1;
    is = 1'b1; repeat (2) @(posedge clk); #1 is = 1'b0;
    for (int m = 0; m < 30; m++) run_message(1 + $urandom % 12, -1);
    for (int m = 0; m < 10; m++) run_message(4 + $urandom % 8, $urandom % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
