// tb_be_input_buffer: self-checking test of the BE input buffer. Random
// packets are written and read at changing rates; a queue model with the same
// thresholds (24 entries on, 8 off) predicts every packet read, including
// the header-only truncated ones, the alarm and the loss on a full buffer.
module tb_be_input_buffer;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_tr = 0, n_lost = 0, n_on = 0;

  logic be_reset, wr_valid, rd_valid, rd_ready, truncating, trunc_evt, alarm, lost;
  fe_packet_t wr_pkt, rd_pkt;

  be_input_buffer dut (.clk, .rst_n, .be_reset, .wr_valid, .wr_pkt, .rd_valid, .rd_ready, .rd_pkt,
    .truncating, .trunc_evt, .alarm, .lost);

  fe_packet_t q[$];
  bit m_tr;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    be_reset = 0; wr_valid = 0; rd_ready = 0; wr_pkt = '0; m_tr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      int cnt;
      fe_packet_t st;
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < ((i / 400) % 2 ? 90 : 30));
      rd_ready = ($urandom_range(0, 99) < 50);
      wr_pkt   = rnd_pkt(4'(i), 63);
      checks++;
      if (rd_valid !== (q.size() != 0) || (q.size() && rd_pkt !== q[0]) || truncating !== m_tr || alarm !== m_tr) begin
        failures++; if (failures < 10) $display("FAIL at %0d", i);
      end
      @(posedge clk); #1;
      cnt = q.size();
      checks++;
      if (lost !== (wr_valid && cnt == 32)) begin failures++; $display("FAIL lost"); end
      if (wr_valid && cnt == 32) n_lost++;
      if (rd_ready && cnt > 0) void'(q.pop_front());
      if (wr_valid && cnt < 32) begin
        st = wr_pkt;
        if (m_tr) begin st.data = '0; st.hdr.len = 0; st.hdr.trunc = 1; n_tr++; end
        q.push_back(st);
      end
      if (!m_tr && cnt >= 24) begin m_tr = 1; n_on++; end
      else if (m_tr && cnt <= 8) m_tr = 0;
    end
    checks++;
    if (n_tr == 0 || n_lost == 0 || n_on == 0) begin failures++; $display("FAIL coverage"); end
    $display("truncated=%0d lost=%0d on=%0d", n_tr, n_lost, n_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
