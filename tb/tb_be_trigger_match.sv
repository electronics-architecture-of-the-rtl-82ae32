// tb_be_trigger_match: self-checking test of the BE trigger buffer and event
// selection. One decision per crossing (4 clocks) with a random accept; the
// crossing's packet follows after a random, order-preserving delay, as data
// behind zero suppression would. Some packets are left out (the block must
// consume the decision and, for an accept, send an empty truncated fragment)
// and some stale packets are slipped in (the block must drop them). A
// reference queue built at stimulus time gives every expected fragment with
// its Event-ID; sync_err pulses are counted against the injected faults. The
// fragment consumer stalls at random. At the end packets stop so that the
// trigger buffer fills: alarm and trig_lost must be seen, and eid_reset must
// clear the Event-ID counter.
module tb_be_trigger_match;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic be_reset, eid_reset, trig_valid, pkt_valid, pkt_ready, frag_valid, frag_ready;
  logic sync_err, trig_lost, alarm;
  logic [EID_W-1:0] eid;
  trig_decision_t trig;
  fe_packet_t pkt;
  fragment_t frag;

  be_trigger_match dut (.clk, .rst_n, .be_reset, .eid_reset, .trig_valid, .trig,
    .pkt_valid, .pkt_ready, .pkt, .frag_valid, .frag, .frag_ready,
    .sync_err, .trig_lost, .alarm, .eid);

  int checks = 0, failures = 0, n_frag = 0, n_sync = 0, exp_sync = 0;
  int n_empty = 0, n_alarm = 0, n_lost = 0;
  fragment_t expq[$];
  fe_packet_t pq[$];      // packets released to the block
  fe_packet_t pend[$];    // packets waiting for their release crossing
  int pend_t[$];
  bit stop_check = 0;
  int next_eid = 0;

  // packet source: present the queue head, advance on pkt_ready
  always_comb begin
    pkt_valid = pq.size() != 0;
    pkt = pq.size() ? pq[0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (pkt_valid && pkt_ready) void'(pq.pop_front());
    if (frag_valid && frag_ready && !stop_check) begin
      n_frag++; checks++;
      if (frag.pkt.hdr.trunc && frag.pkt.hdr.len == 0) n_empty++;
      if (expq.size() == 0 || frag !== expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL frag %p expected %p t=%0t", frag, expq.size() ? expq[0] : '0, $time);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (sync_err) n_sync++;
    if (alarm) n_alarm++;
    if (trig_lost) n_lost++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    be_reset = 0; eid_reset = 0; trig_valid = 0; trig = '0; frag_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int bx = 0; bx < 20000; bx++) begin
      trig_decision_t t;
      fe_packet_t p;
      fragment_t f;
      int kind, dly;
      t = '0;
      t.bid = BID_W'(bx % ORBIT_BX);
      t.accept = ($urandom_range(0, 2) == 0);
      t.mep_dest = DEST_W'($urandom);
      t.trig_type = 4'($urandom_range(0, 2));
      p = rnd_pkt(t.bid[3:0], 40);
      kind = $urandom_range(0, 99);          // 0: packet missing, 1: stale extra packet
      if (bx < 10) kind = 50;
      if (kind == 0) exp_sync++;
      if (kind == 1) begin
        fe_packet_t s;
        s = rnd_pkt(4'(t.bid[3:0] - 4'd3), 10);
        exp_sync++;
        pend.push_back(s); pend_t.push_back(bx);
      end
      if (kind != 0) begin
        dly = bx + $urandom_range(0, 3);
        if (pend_t.size() && dly < pend_t[$]) dly = pend_t[$];
        pend.push_back(p); pend_t.push_back(dly);
      end
      if (t.accept) begin
        f = '0;
        f.eid = EID_W'(next_eid); next_eid++;
        f.bid = t.bid; f.mep_dest = t.mep_dest; f.trig_type = t.trig_type;
        if (kind == 0) begin f.pkt.hdr.bcnt = t.bid[3:0]; f.pkt.hdr.trunc = 1'b1; end
        else f.pkt = p;
        expq.push_back(f);
      end
      @(negedge clk);
      trig_valid = 1; trig = t;
      frag_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk); trig_valid = 0;
      while (pend_t.size() && pend_t[0] <= bx) begin
        pq.push_back(pend.pop_front()); void'(pend_t.pop_front());
      end
      frag_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk); frag_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk); frag_ready = 1;
    end
    while (pend.size()) begin pq.push_back(pend.pop_front()); void'(pend_t.pop_front()); end
    repeat (200) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d fragments missing", expq.size()); end
    checks++;
    if (n_sync != exp_sync) begin failures++; $display("FAIL sync_err %0d expected %0d", n_sync, exp_sync); end
    checks++;
    if (eid != EID_W'(next_eid)) begin failures++; $display("FAIL eid %0d expected %0d", eid, next_eid); end
    checks++;
    if (n_empty == 0) begin failures++; $display("FAIL no empty fragment"); end
    // fill the trigger buffer: decisions with no data
    stop_check = 1;
    n_alarm = 0;
    for (int i = 0; i < 72; i++) begin
      @(negedge clk); trig_valid = 1; trig = '0;
    end
    @(negedge clk); trig_valid = 0;
    @(negedge clk);
    checks++;
    if (n_alarm == 0 || n_lost != 8) begin failures++; $display("FAIL alarm %0d lost %0d", n_alarm, n_lost); end
    eid_reset = 1; @(negedge clk); eid_reset = 0; be_reset = 1; @(negedge clk); be_reset = 0;
    @(negedge clk);
    checks++;
    if (eid != 0 || alarm) begin failures++; $display("FAIL resets: eid %0d alarm %b", eid, alarm); end
    $display("fragments=%0d empty=%0d sync_err=%0d", n_frag, n_empty, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
