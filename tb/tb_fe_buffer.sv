// tb_fe_buffer: self-checking test of the FE derandomising buffer. Random
// packets are written at random rates and read at random rates; a queue model
// tracks the contents, the bit occupancy and the truncation state with the
// same thresholds, so every packet read, the occupancy, truncation switching
// on and off, and packet loss on a full buffer are checked. An FE reset in the
// middle must empty the buffer.
module tb_fe_buffer;
  import lhcb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_lost = 0, n_tr = 0;

  logic fe_reset, wr_valid, truncating, trunc_evt, lost, tmr_err;
  fe_packet_t wr_pkt;
  fe_packet_t rd_pkt [2];
  logic [1:0] rd_avail, rd_take;
  logic [15:0] hi_thr, lo_thr, occ_bits;

  fe_buffer #(.DEPTH(16)) dut (.clk, .rst_n, .fe_reset, .wr_valid, .wr_pkt, .rd_avail, .rd_take,
    .rd_pkt, .hi_thr, .lo_thr, .occ_bits, .truncating, .trunc_evt, .lost, .tmr_err);

  fe_packet_t q[$];
  int m_occ; bit m_tr;

  function automatic fe_packet_t rnd_pkt();
    fe_packet_t p;
    int l = $urandom_range(0, 63);
    p.hdr.len = 6'(l); p.hdr.bcnt = 4'($urandom); p.hdr.trunc = 1'b0;
    p.data = {$urandom, $urandom} & ((63'(1) << l) - 1);
    return p;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_reset = 0; wr_valid = 0; rd_take = 0; wr_pkt = '0; hi_thr = 400; lo_thr = 150;
    m_occ = 0; m_tr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12000; i++) begin
      bit do_w, full;
      int n_r;
      fe_packet_t stored;
      @(negedge clk);
      // reading slower than writing in bursts, faster in others
      wr_valid = ($urandom_range(0, 99) < ((i / 500) % 2 ? 80 : 30));
      rd_take  = 2'($urandom_range(0, 99) < 50 ? $urandom_range(0, 2) : 0);
      wr_pkt   = rnd_pkt();
      fe_reset = (i == 6000);
      // compare head and state before the edge
      checks++;
      if (rd_avail !== 2'(q.size() > 2 ? 2 : q.size()) || (q.size() > 0 && rd_pkt[0] !== q[0])
          || (q.size() > 1 && rd_pkt[1] !== q[1])) begin
        failures++; if (failures < 10) $display("FAIL head at %0d", i);
      end
      checks++;
      if (occ_bits !== 16'(m_occ) || truncating !== m_tr) begin
        failures++; if (failures < 10) $display("FAIL occ %0d/%0d tr %b/%b", occ_bits, m_occ, truncating, m_tr);
      end
      @(posedge clk); #1;
      if (fe_reset) begin q.delete(); m_occ = 0; m_tr = 0; continue; end
      full = (q.size() == 16);
      n_r = int'(rd_take) < q.size() ? int'(rd_take) : q.size();
      do_w = wr_valid && !full;
      stored = wr_pkt;
      if (m_tr) begin stored.data = '0; stored.hdr.len = '0; stored.hdr.trunc = 1; n_tr++; end
      if (wr_valid && full) n_lost++;
      checks++;
      if (lost !== (wr_valid && full)) begin failures++; $display("FAIL lost flag"); end
      begin
        int occ_before;
        occ_before = m_occ;
        repeat (n_r) begin m_occ -= 11 + int'(q[0].hdr.len); void'(q.pop_front()); end
        if (do_w) begin q.push_back(stored); m_occ += 11 + int'(stored.hdr.len); end
        if (!m_tr && occ_before >= 400) begin m_tr = 1; n_on++; end
        else if (m_tr && occ_before <= 150) begin m_tr = 0; n_off++; end
      end
    end
    checks++;
    if (n_on == 0 || n_off == 0 || n_lost == 0 || n_tr == 0) begin failures++; $display("FAIL case missing"); end
    checks++;
    if (tmr_err) begin failures++; $display("FAIL tmr_err"); end
    $display("trunc_on=%0d off=%0d truncated=%0d lost=%0d", n_on, n_off, n_tr, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
