// tb_ring_channel_top: end-to-end test of the ring channel at its default
// size (8 controllers, 64-byte FIFOs).
//
// Each controller has a computer model that writes queued messages into
// FIFO1 and drains FIFO2 into a log. Messages are: header {1, priority},
// unitary address byte, information bytes (the first is a unique message
// number), last byte tagged. At the end every log is split into messages
// and each is checked against what was sent: only chosen controllers
// (the k-th controller after the master owns address bit 7-k+1, the
// master itself bit 8-N) receive it, the information bytes arrive intact,
// the state byte marks the master, and the end word carries the receipt
// bits of all controllers up to the receiver.
//
// Phases: (A) contention among several bidders, including equal
// priorities, one-to-one, one-to-many, one-to-all and self-addressed
// messages, with segment 5 running on its spare lines because two of its
// lines are stuck; (B) a receiver whose FIFO2 overflows (FF2, receipt bit
// 0); (C) a FIFO1 byte that fails its check while being sent (FF1, message
// closed early); (D) a stuck line on an unprotected segment (FA), then
// repair by marking the line failed, initial set and a new token set;
// (E) a controller disconnected, so the ones after it move up one address
// position, and reconnected.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ring_channel_top;
  import ring_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic [N-1:0] is, ts, isf1, isf2, disc, f1_wr, f1_full, f1_ovf, f2_rd, f2_empty, f2_err, f2_ovf;
  logic [N-1:0] ff1, ff2, fa, chosen;
  fbyte_t f1_din [N];
  fbyte_t f2_dout [N];
  bid_state_e bid_state [N];
  logic [3:0] prio [N];
  logic [SEG_LINES-1:0] seg_fail_mask [N];

  ring_channel_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int         src;
    logic [7:0] addr;
    int         len;        // information bytes incl. the tagged last byte
    int         sent_len;   // bytes actually sent (less if FIFO1 failed)
    logic [7:0] info [128];
    logic [N-1:0] dropped;  // receivers whose FIFO2 overflowed
    logic [N-1:0] off;      // controllers disconnected while it was sent
  } msg_t;

  msg_t   msgs [$];
  fbyte_t txq [N][$];
  fbyte_t rxlog [N][$];
  logic [N-1:0] drain_en;
  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_ts = 0, n_lost_bid = 0, n_prio_up = 0, n_master = 0, n_self = 0;
  int n_one = 0, n_many = 0, n_all = 0, n_tie = 0, n_ff2 = 0, n_ff1 = 0, n_fa = 0;
  int n_spare = 0, n_repair = 0, n_ovf = 0, n_disc = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- computer models ----------------
  always @(negedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) begin
      f1_wr[i] = 1'b0;
      if (txq[i].size() != 0 && !f1_full[i] && !is[i] && !isf1[i]) begin
        f1_din[i] = txq[i].pop_front();
        f1_wr[i]  = 1'b1;
      end
      f2_rd[i] = 1'b0;
      if (drain_en[i] && !f2_empty[i] && !is[i] && !isf2[i]) begin
        if (f2_err[i]) begin failures++; $display("FAIL FIFO2 parity at node %0d", i); end
        rxlog[i].push_back(f2_dout[i]);
        f2_rd[i] = 1'b1;
      end
    end
  end

  // ---------------- mechanism observation ----------------
  bid_state_e prev_state [N];
  logic [3:0] prev_prio [N];
  logic [N-1:0] prev_ff1, prev_ff2, prev_fa;
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (bid_state[i] == B_REC_BID && prev_state[i] != B_REC_BID) n_lost_bid++;
      if (bid_state[i] == B_MASTER && prev_state[i] != B_MASTER) begin
        n_master++;
        // another bidder holds the same priority: the tie went to the first one reached
        for (int j = 0; j < N; j++)
          if (j != i && bid_state[j] == B_BID && prio[j] == prio[i]) n_tie++;
      end
      if (bid_state[i] == B_S0P && prev_state[i] == B_REC_BID && prio[i] == prev_prio[i] + 4'd1) n_prio_up++;
      if (ff1[i] && !prev_ff1[i]) n_ff1++;
      if (ff2[i] && !prev_ff2[i]) n_ff2++;
      if (f2_ovf[i]) n_ovf++;
      if (f1_ovf[i]) begin failures++; $display("FAIL FIFO1 write lost at node %0d", i); end
      if (fa[i] && !prev_fa[i]) n_fa++;
      prev_state[i] = bid_state[i];
      prev_prio[i]  = prio[i];
    end
    prev_ff1 = ff1; prev_ff2 = ff2; prev_fa = fa;
  end

  // ---------------- helpers ----------------
  task automatic send_msg(input int src, input logic [3:0] p, input logic [7:0] addr, input int len);
    msg_t m;
    m.src = src; m.addr = addr; m.len = len; m.sent_len = len; m.dropped = '0; m.off = disc;
    for (int k = 0; k < len; k++) m.info[k] = (k == 0) ? 8'(msgs.size()) : 8'($urandom);
    txq[src].push_back('{last: 1'b0, data: {4'h1, p}});
    txq[src].push_back('{last: 1'b0, data: addr});
    for (int k = 0; k < len; k++) txq[src].push_back('{last: (k == len - 1), data: m.info[k]});
    msgs.push_back(m);
  endtask

  // address position of controller r for message m: connected controllers
  // after the sender count 1, 2, ...; the sender itself comes last
  function automatic int position(msg_t m, int r);
    int l = 0;
    for (int j = 1; j <= N; j++) begin
      int c = (m.src + j) % N;
      if (!m.off[c]) l++;
      if (c == r) return m.off[c] ? 0 : l;
    end
    return 0;
  endfunction

  function automatic logic is_chosen(msg_t m, int r);
    int l = position(m, r);
    return (l != 0) && m.addr[8 - l];
  endfunction

  function automatic int expected_receptions();
    int n = 0;
    foreach (msgs[i]) for (int r = 0; r < N; r++)
      if (is_chosen(msgs[i], r) && !msgs[i].dropped[r]) n++;
    return n;
  endfunction

  function automatic int logged_messages();
    int n = 0;
    for (int r = 0; r < N; r++) foreach (rxlog[r][k]) if (rxlog[r][k].last) n++;
    return n;
  endfunction

  task automatic wait_delivered(input int limit, input string what);
    int t = 0;
    while ((logged_messages() < expected_receptions() ||
            (txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size() +
             txq[4].size() + txq[5].size() + txq[6].size() + txq[7].size()) != 0) && t < limit) begin
      @(posedge clk); t++;
    end
    repeat (400) @(posedge clk);
    check(t < limit, what);
  endtask

  task automatic pulse(ref logic [N-1:0] sig, input logic [N-1:0] which);
    @(negedge clk); sig = which; @(negedge clk); sig = '0;
  endtask

  // ---------------- final log check ----------------
  task automatic check_logs();
    for (int r = 0; r < N; r++) begin
      fbyte_t cur [$];
      foreach (rxlog[r][k]) begin
        cur.push_back(rxlog[r][k]);
        if (rxlog[r][k].last) begin
          int id, l, exp_n;
          logic [7:0] ew;
          msg_t m;
          id = (cur.size() > 2) ? int'(cur[1].data) : -1;
          if (id < 0 || id >= msgs.size()) begin
            failures++; $display("FAIL node %0d: unknown message, %0d bytes, id %0d", r, cur.size(), id);
          end else begin
            m = msgs[id];
            l = position(m, r);
            check(is_chosen(m, r), "only chosen controllers receive");
            check(cur[0].data[1] == (r == m.src), "state byte marks the master");
            exp_n = m.sent_len;
            check(cur.size() == exp_n + 2, "message length in FIFO2");
            for (int k = 0; k < exp_n && k + 1 < cur.size() - 1; k++)
              check(cur[k + 1].data == m.info[k] && !cur[k + 1].last, "information byte");
            ew = '0;
            for (int j = 1; j <= N; j++) begin
              int rj = (m.src + j) % N;
              if (!m.off[rj] && position(m, rj) <= l)
                ew = {ew[6:0], is_chosen(m, rj) & !m.dropped[rj]};
            end
            check(cur[cur.size() - 1].data == ew, "end word receipt bits");
            if (r == m.src) n_self++;
            if ($countones(m.addr) == 1) n_one++;
            if (m.off != '0) n_disc++;
            if ($countones(m.addr) > 1 && m.addr != 8'hFF) n_many++;
            if (m.addr == 8'hFF) n_all++;
          end
          cur.delete();
        end
      end
      check(cur.size() == 0, "no incomplete message left in a log");
    end
    check(logged_messages() == expected_receptions(), "number of receptions");
  endtask

  // ---------------- scenario ----------------
  initial begin
    is = '1; ts = '0; disc = '0; isf1 = '0; isf2 = '0; f1_wr = '0; f2_rd = '0; drain_en = '1;
    for (int i = 0; i < N; i++) begin
      f1_din[i] = '0; seg_fail_mask[i] = '0; prev_state[i] = B_S0; prev_prio[i] = '0;
    end
    prev_ff1 = '0; prev_ff2 = '0; prev_fa = '0;
    // segment 5 has lines 2 (stuck at 1) and 4 (stuck at 0) out of service
    seg_fail_mask[5] = 9'b0_0001_0100;
    force dut.seg_line[5][2] = 1'b1;
    force dut.seg_line[5][4] = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) is = '0;

    // ---- A: contention and addressing modes ----
    send_msg(2, 4'd3, 8'hFF, 5);     // one-to-all, master included
    send_msg(5, 4'd9, 8'h80, 3);     // one-to-one to node 6
    send_msg(7, 4'd9, 8'h55, 6);     // equal priority, one-to-many
    send_msg(1, 4'd1, 8'h24, 4);     // low priority: loses and climbs
    send_msg(5, 4'd2, 8'h01, 2);     // self only
    send_msg(0, 4'd6, 8'h3C, 7);     // one-to-many across segment 5
    repeat (200) @(posedge clk);
    pulse(ts, 8'h01); n_ts++;
    wait_delivered(50000, "phase A delivered");
    n_spare = logged_messages();

    // ---- B: FIFO2 overflow at node 3 ----
    drain_en[3] = 1'b0;
    send_msg(4, 4'd5, 8'h82, 70);     // to node 5 (position 1) and node 3 (position 7)
    msgs[msgs.size() - 1].dropped[3] = 1'b1;
    begin
      // half-byte rate: 2 address + 140 information half-bytes, T4 and two zero half-bytes
      int t0;
      real per_hb;
      while (bid_state[4] != B_MASTER) @(posedge clk);
      t0 = cyc;
      while (bid_state[4] == B_MASTER) @(posedge clk);
      per_hb = real'(cyc - t0) / 145.0;
      $display("master 4 held the channel %0d cycles, %0.2f cycles per half-byte", cyc - t0, per_hb);
      // 5 Mbit/s needs a half-byte every 800 ns: 40 cycles of a 50 MHz clock
      check(per_hb <= 40.0, "half-byte rate meets 800 ns at 50 MHz");
    end
    wait_delivered(50000, "phase B delivered");
    check(ff2[3], "FF2 at the overflowing receiver");
    pulse(isf2, 8'h08);
    check(!ff2[3], "FF2 cleared by ISF2");
    drain_en[3] = 1'b1;

    // ---- C: FIFO1 fault at node 6 while it transmits ----
    send_msg(6, 4'd7, 8'h80, 20);
    while (bid_state[6] != B_MASTER) @(posedge clk);
    repeat (3) @(posedge dut.g_node[6].u_ctrl.f1_rd);   // address and two bytes out
    force dut.g_node[6].u_ctrl.u_fifo1.head = dut.g_node[6].u_ctrl.u_fifo1.head ^ 10'h001;
    while (!ff1[6]) @(posedge clk);
    release dut.g_node[6].u_ctrl.u_fifo1.head;
    msgs[msgs.size() - 1].sent_len = 2;
    pulse(isf1, 8'h40);
    check(!ff1[6], "FF1 cleared by ISF1");
    wait_delivered(50000, "phase C delivered");

    // ---- D: stuck line on segment 1, detection, repair ----
    force dut.seg_line[1][0] = 1'b1;
    begin
      int t = 0;
      while (!(fa[1] || fa[2]) && t < 20000) begin @(posedge clk); t++; end
      check(fa[1] || fa[2], "stuck line detected next to segment 1");
    end
    seg_fail_mask[1] = 9'b0_0000_0001;
    pulse(is, '1);
    n_repair++;
    check(fa == '0, "faults cleared by initial set");
    pulse(ts, 8'h04); n_ts++;          // a second initiator (controller 2) restarts the ring
    send_msg(1, 4'd4, 8'hFF, 9);      // crosses the repaired segment to everyone
    wait_delivered(50000, "phase D delivered");
    check(fa == '0, "no fault after repair");

    // ---- E: controller 3 disconnected: those after it move up one place ----
    disc[3] = 1'b1;
    send_msg(1, 4'd2, 8'h43, 3);      // node 4 is now position 2, node 1 itself position 7; bit 0 has no owner
    send_msg(6, 4'd5, 8'h23, 4);      // node 1 at position 3, node 6 itself position 7
    begin
      int t = 0;
      while (logged_messages() < expected_receptions() && t < 50000) begin @(posedge clk); t++; end
      check(t < 50000, "phase E delivered while disconnected");
    end
    repeat (400) @(posedge clk);
    check(f2_empty[3] && bid_state[3] == B_S0, "disconnected controller stays out");
    // reconnect: everybody back in place
    @(negedge clk) disc[3] = 1'b0;
    send_msg(3, 4'd9, 8'hFF, 2);
    wait_delivered(50000, "phase E delivered");

    check_logs();
    $display("mechanisms: ts=%0d masters=%0d lost_bids=%0d prio_up=%0d tie=%0d self=%0d one=%0d many=%0d all=%0d ff2=%0d ff1=%0d fa=%0d spare=%0d repair=%0d disc=%0d",
             n_ts, n_master, n_lost_bid, n_prio_up, n_tie, n_self, n_one, n_many, n_all,
             n_ff2, n_ff1, n_fa, n_spare, n_repair, n_disc);
    check(n_ts > 0, "token set used");
    check(n_master > 0, "masters elected");
    check(n_lost_bid > 0, "a bidder lost");
    check(n_prio_up > 0, "priority raised");
    check(n_tie > 0, "equal priorities resolved");
    check(n_self > 0, "master received its own message");
    check(n_one > 0 && n_many > 0 && n_all > 0, "one-to-one, one-to-many, one-to-all");
    check(n_ff2 > 0 && n_ovf > 0, "FIFO2 overflow reported");
    check(n_ff1 > 0, "FIFO1 fault reported");
    check(n_fa > 0, "channel fault reported");
    check(n_spare > 0, "traffic over spare lines");
    check(n_repair > 0, "repair by line reassignment");
    check(n_disc > 0, "messages routed past a disconnected controller");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
