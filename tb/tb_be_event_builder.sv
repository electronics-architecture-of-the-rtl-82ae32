// tb_be_event_builder: self-checking test of the BE event-building
// multiplexer. Three link sources each deliver the fragments of a common
// sequence of events with independent random gaps; the output must carry,
// for every event, the three fragments in link order with out_last on the
// third, whatever the arrival pattern and the random output stalls. One
// event is given a wrong Event-ID on link 1 and must raise eid_err exactly
// once.
module tb_be_event_builder;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;

  localparam int NL = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic be_reset, out_valid, out_last, out_ready, eid_err;
  logic [NL-1:0] in_valid, in_ready;
  fragment_t in_frag [NL];
  fragment_t out_frag;
  logic [3:0] out_link;

  be_event_builder #(.NLINK(NL)) dut (.clk, .rst_n, .be_reset, .in_valid, .in_frag, .in_ready,
    .out_valid, .out_frag, .out_link, .out_last, .out_ready, .eid_err);

  int checks = 0, failures = 0, n_out = 0, n_err = 0;
  fragment_t src [NL][$];
  fragment_t expq[$];
  int expl[$];
  bit gate [NL];

  always_comb
    for (int l = 0; l < NL; l++) begin
      in_valid[l] = gate[l] && src[l].size() != 0;
      in_frag[l]  = src[l].size() ? src[l][0] : '0;
    end

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) if (in_valid[l] && in_ready[l]) void'(src[l].pop_front());
    if (out_valid && out_ready) begin
      n_out++; checks++;
      if (expq.size() == 0 || out_frag !== expq[0] || out_link != 4'(expl[0]) ||
          out_last != (expl[0] == NL - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL link %0d last %b frag %p t=%0t", out_link, out_last, out_frag, $time);
      end
      if (expq.size()) begin void'(expq.pop_front()); void'(expl.pop_front()); end
    end
    if (eid_err) n_err++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    be_reset = 0; out_ready = 1;
    for (int l = 0; l < NL; l++) gate[l] = 0;
    for (int e = 0; e < 5000; e++)
      for (int l = 0; l < NL; l++) begin
        fragment_t f;
        f = '0;
        f.eid = EID_W'(e);
        f.bid = BID_W'(e * 3);
        f.mep_dest = DEST_W'(e / 8);
        f.pkt = rnd_pkt(f.bid[3:0], 63);
        if (e == 1234 && l == 1) f.eid = EID_W'(99999);
        src[l].push_back(f);
        expq.push_back(f); expl.push_back(l);
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (expq.size() != 0) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) gate[l] = ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 4) != 0);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_out != 5000 * NL) begin failures++; $display("FAIL %0d fragments out", n_out); end
    checks++;
    if (n_err != 1) begin failures++; $display("FAIL eid_err %0d", n_err); end
    $display("fragments=%0d eid_err=%0d", n_out, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
