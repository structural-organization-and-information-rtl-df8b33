// tb_ring_controller: self-checking test of one controller (channel
// adapter with FIFO1 and FIFO2) closed into a one-controller ring: its
// downstream segment is wired back to its upstream segment.
//
// After the initial set and a token set the controller's own T1 returns,
// it bids with the priority from its first message, its T2,Nc returns and
// it becomes master, sends the message, and receives it back. With one
// controller the master is position 1 = N, so it is chosen by address bit
// 7. The testbench writes messages byte by byte into FIFO1 and reads
// FIFO2, expecting: a state byte with the master bit set, the information
// bytes, and the end word {7'b0, 1}. A message with address bit 7 clear
// must leave FIFO2 empty. The loop runs over the sliding reserve with one
// failed line.
module tb_ring_controller;
  import ring_pkg::*;

  logic clk = 1'b0;
  logic is, ts, isf1, isf2, disc, f1_wr, f1_full, f1_ovf, f2_rd, f2_empty, f2_err, f2_ovf;
  logic ff1, ff2, fa, chosen;
  fbyte_t f1_din, f2_dout;
  bid_state_e bid_state;
  logic [3:0] prio;
  logic [SEG_LINES-1:0] mask, loop_line, from_dn, from_up;
  int checks = 0, failures = 0;

  ring_controller #(.FIFO_DEPTH(16), .TMO(64)) dut (
    .clk, .is, .ts, .isf1, .isf2, .disc, .f1_wr, .f1_din, .f1_full, .f1_ovf,
    .f2_rd, .f2_dout, .f2_empty, .f2_err, .f2_ovf, .ff1, .ff2, .fa, .bid_state, .chosen, .prio,
    .up_fail_mask(mask), .up_line_i(loop_line), .up_line_o(from_up),
    .dn_fail_mask(mask), .dn_line_i(loop_line), .dn_line_o(from_dn));

  assign loop_line = from_dn | from_up;

  always #5 clk = ~clk;

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

  task automatic put(input logic last, input logic [7:0] d);
    @(negedge clk);
    while (f1_full) @(negedge clk);
    f1_din = '{last: last, data: d}; f1_wr = 1'b1;
    @(negedge clk) f1_wr = 1'b0;
  endtask

  task automatic get(output fbyte_t b);
    int t = 0;
    @(negedge clk);
    while (f2_empty && t < 5000) begin @(negedge clk); t++; end
    check(!f2_empty, "FIFO2 byte arrives");
    b = f2_dout;
    check(!f2_err, "FIFO2 byte passes parity");
    f2_rd = 1'b1;
    @(negedge clk) f2_rd = 1'b0;
  endtask

  initial begin
    fbyte_t b;
    logic [7:0] info [4];
    mask = 9'b0_0010_0000;
    disc = 1'b0;
    is = 1'b1; ts = 1'b0; isf1 = 1'b0; isf2 = 1'b0; f1_wr = 1'b0; f2_rd = 1'b0; f1_din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) is = 1'b0;
    @(negedge clk) ts = 1'b1;
    @(negedge clk) ts = 1'b0;

    for (int m = 0; m < 3; m++) begin
      for (int k = 0; k < 4; k++) info[k] = 8'($urandom);
      put(1'b0, {4'h1, 4'(m + 6)});
      put(1'b0, 8'h80);
      for (int k = 0; k < 4; k++) put(k == 3, info[k]);
      get(b);
      check(!b.last && b.data[1] && b.data[7:4] == 4'(m + 6), "state byte");
      for (int k = 0; k < 4; k++) begin
        get(b);
        check(!b.last && b.data == info[k], "information byte");
      end
      get(b);
      check(b.last && b.data == 8'h01, "end word with own receipt bit");
    end

    // not addressed: nothing stored, the controller still completes and idles
    put(1'b0, 8'h12);
    put(1'b0, 8'h7F);
    put(1'b1, 8'h99);
    repeat (2000) @(posedge clk);
    check(f2_empty, "unaddressed message not stored");
    check(bid_state == B_S0 || bid_state == B_OBS, "back to circulating the token");
    check(!fa && !ff1 && !ff2, "no fault flags");
    check(!f1_ovf && !f2_ovf, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
