// tb_gbt_packer: self-checking test of the GBT frame packer. Random-length
// packets are offered each crossing while the GBT READY signal drops now and
// then. Every frame the packer sends is appended to a bit stream, which the
// testbench parses back into packets and compares with those the packer
// accepted. Also checked: no frame leaves while READY is low, a frame leaves
// in every crossing where 80 bits were waiting and READY was high, and the
// packer stops accepting when its accumulator is full.
module tb_gbt_packer;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_frames = 0, n_pkts = 0, n_stall = 0, n_notready = 0;

  logic bx_en, gbt_ready, tx_en;
  logic [1:0] pkt_avail, pkt_take;
  fe_packet_t pkt [2];
  fe_packet_t src[$];
  logic [79:0] tx_data;

  gbt_packer dut (.clk, .rst_n, .bx_en, .pkt_avail, .pkt, .pkt_take, .gbt_ready, .tx_data, .tx_en);

  fe_packet_t sent[$];
  bit rx[$];
  int pending_bits;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_en = 0; pkt_avail = 0; pkt[0] = '0; pkt[1] = '0; gbt_ready = 1; pending_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      bit exp_emit;
      logic [1:0] tk;
      @(negedge clk);
      bx_en = 1;
      // one new packet per crossing, plus bursts that build a backlog
      src.push_back(rnd_pkt(4'(i), 63));
      if (i % 500 == 0) repeat (10) src.push_back(rnd_pkt(4'(i), 20));
      pkt_avail = 2'(src.size() > 2 ? 2 : src.size());
      pkt[0] = src.size() > 0 ? src[0] : '0;
      pkt[1] = src.size() > 1 ? src[1] : '0;
      gbt_ready = !((i % 700) > 600);
      exp_emit  = gbt_ready && pending_bits >= 80;
      #1 tk = pkt_take;
      begin
        int fit, want_n;
        // independent expectation of how many packets fit after the frame leaves
        fit = 240 - (pending_bits - (exp_emit ? 80 : 0));
        want_n = 0;
        if (pkt_avail >= 1 && 11 + int'(pkt[0].hdr.len) <= fit) begin
          want_n = 1;
          if (pkt_avail == 2 && 22 + int'(pkt[0].hdr.len) + int'(pkt[1].hdr.len) <= fit) want_n = 2;
        end
        checks++;
        if (int'(tk) != want_n) begin failures++; if (failures < 10) $display("FAIL take %0d expected %0d", tk, want_n); end
      end
      @(posedge clk); #1;
      repeat (tk) begin
        sent.push_back(src[0]); pending_bits += 11 + int'(src[0].hdr.len); n_pkts++;
        void'(src.pop_front());
      end
      if (tk == 2) n_stall++;
      if (!gbt_ready) n_notready++;
      if (exp_emit) pending_bits -= 80;
      checks++;
      if (tx_en !== exp_emit) begin failures++; if (failures < 10) $display("FAIL tx_en=%b exp %b at %0d", tx_en, exp_emit, i); end
      if (tx_en) begin
        fe_packet_t p;
        n_frames++;
        push_frame(rx, tx_data);
        while (pop_pkt(rx, p)) begin
          checks++;
          if (sent.size() == 0 || p !== sent[0]) begin
            failures++; if (failures < 10) $display("FAIL packet %h expected %h", p, sent.size() ? sent[0] : '0);
          end
          if (sent.size()) void'(sent.pop_front());
        end
      end
      bx_en = 0;
      @(negedge clk);
    end
    checks++;
    if (n_stall == 0 || n_notready == 0 || n_frames < 1000) begin failures++; $display("FAIL coverage"); end
    $display("frames=%0d packets=%0d double_takes=%0d notready=%0d", n_frames, n_pkts, n_stall, n_notready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
