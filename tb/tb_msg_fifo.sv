// tb_msg_fifo: self-checking test of the 9-bit message FIFO.
//
// Writes and reads random bytes with random strobes against a queue
// model, checks full/empty and the overflow report, checks that a byte
// corrupted in storage is flagged by the read-side parity check (the
// stored word is disturbed with a force on the head word), and that clr
// empties the buffer.
module tb_msg_fifo;
  import ring_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic   clk = 1'b0;
  logic   clr, wr, rd, full, wr_err, empty, rd_err;
  fbyte_t din, dout;
  int     checks = 0, failures = 0;
  fbyte_t model[$];

  msg_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    clr = 1'b1; wr = 1'b0; rd = 1'b0; din = '0;
    @(posedge clk); @(posedge clk);
    clr = 1'b0;
    @(negedge clk);
    check(empty && !full && !rd_err, "empty after clr");
    for (int n = 0; n < 2000; n++) begin
      wr  = ($urandom % 3) != 0;
      rd  = ($urandom % 3) == 0;
      din = fbyte_t'($urandom);
      @(negedge clk);  // inputs settled in the middle of the cycle
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(wr_err == (wr && model.size() == DEPTH), "overflow report");
      check(!rd_err, "no parity error");
      if (!empty) check(dout == model[0], "head data");
      begin
        bit do_rd, do_wr;
        do_rd = rd && model.size() != 0;
        do_wr = wr && model.size() != DEPTH;
        @(posedge clk);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(din);
      end
      #1;
    end
    wr = 1'b0; rd = 1'b0;
    // fill, then corrupt the stored head word: parity must catch it
    while (!full) begin
      din = fbyte_t'($urandom); wr = 1'b1; @(posedge clk); #1;
    end
    wr = 1'b0;
    @(negedge clk);
    check(!rd_err, "parity clean before corruption");
    force dut.head = dut.head ^ 10'h004;
    #1;
    check(rd_err, "parity error detected");
    release dut.head;
    #1;
    check(!rd_err, "parity clean after release");
    clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
    check(empty, "clr empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
