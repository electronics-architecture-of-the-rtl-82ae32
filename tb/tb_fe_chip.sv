// tb_fe_chip: self-checking test of a complete FE chip. The testbench plays
// the TFC downlink (BID resets every 3564 crossings, random BX veto, data
// force, NZS and calibration commands) and the detector (random hits), and
// collects the GBT frames. The frames are parsed back into packets and each
// one is compared with an independent model of zero suppression and
// formatting for that crossing, using a reference bunch counter with the
// programmed offset. READY is dropped for a while with low buffer thresholds
// so the buffer truncates; a truncated packet must keep its Bcnt, carry no
// data and have the truncation bit. Finally the test-pattern mode is checked.
module tb_fe_chip;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_skip = 0, n_skip_run = 0;
  int n_pkt = 0, n_buf_trunc = 0, n_zs_trunc = 0, n_veto = 0, n_nzs = 0, n_force = 0, n_calib = 0;

  logic bx_en, gbt_ready, tx_en, calib_pulse, truncating, tmr_err, cfg_wr;
  logic [31:0] hits, cfg_wdata, cfg_rdata;
  logic [2:0] cfg_addr;
  tfc_fe_word_t tfc_word;
  logic [79:0] tx_data;
  logic [3:0] calib_type;
  logic [11:0] bcnt;

  fe_chip dut (.clk, .rst_n, .bx_en, .hits, .tfc_word, .gbt_ready, .cfg_wr, .cfg_addr, .cfg_wdata,
    .cfg_rdata, .tx_data, .tx_en, .calib_pulse, .calib_type, .bcnt, .truncating, .tmr_err);

  fe_packet_t expq[$];
  bit rx[$];
  logic [31:0] mask;
  int ref_bcnt;
  bit synced;

  function automatic fe_packet_t model(logic [31:0] h, logic [31:0] m, int b, tfc_fe_word_t w);
    fe_packet_t p = '0;
    int k = 0;
    p.hdr.bcnt = 4'(b);
    if (w.bx_veto && !w.data_force) return p;
    if (w.nzs) begin p.hdr.len = 6'd32; p.data = 63'(h); return p; end
    for (int c = 0; c < 32; c++) if (h[c] && !m[c]) begin
      if (k < 12) begin p.data[k*5 +: 5] = 5'(c); k++; end else p.hdr.trunc = 1;
    end
    p.hdr.len = 6'(k * 5);
    return p;
  endfunction

  task automatic cfg(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); cfg_wr = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_wr = 0;
  endtask

  task automatic collect();
    fe_packet_t p;
    if (tx_en) begin
      push_frame(rx, tx_data);
      while (pop_pkt(rx, p)) begin
        n_pkt++;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected packet"); continue; end
        // packets lost on a full buffer are skipped; their number is checked at the end
        while (expq.size() > 1 && expq[0].hdr.bcnt != p.hdr.bcnt && n_skip_run < 15) begin
          void'(expq.pop_front()); n_skip++; n_skip_run++;
        end
        n_skip_run = 0;
        if (p === expq[0]) begin
          if (p.hdr.trunc) n_zs_trunc++;
        end else if (p.hdr.trunc && p.hdr.len == 0 && p.hdr.bcnt == expq[0].hdr.bcnt) begin
          n_buf_trunc++;
        end else begin
          failures++;
          if (failures < 10) $display("FAIL packet %h expected %h n=%0d t=%0t q=%0d", p, expq[0], n_pkt, $time, expq.size());
        end
        void'(expq.pop_front());
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_en = 0; gbt_ready = 1; hits = 0; tfc_word = '0; cfg_wr = 0; cfg_addr = 0; cfg_wdata = 0;
    synced = 0; ref_bcnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mask = 32'h0000_8001;
    cfg(3'd0, mask);
    cfg(3'd1, 32'd7);           // Bcnt offset
    cfg(3'd3, {16'd100, 16'd300}); // lo 100, hi 300 bits
    for (int i = 0; i < 9000; i++) begin
      int occ;
      @(negedge clk);
      tfc_word = '0;
      tfc_word.bid = 12'(i % 3564);
      tfc_word.bid_reset = (i % 3564 == 3563) || (i == 20);
      tfc_word.fe_reset  = (i % 3564 == 3563);
      tfc_word.bx_veto    = ($urandom_range(0, 5) == 0);
      tfc_word.data_force = tfc_word.bx_veto && ($urandom_range(0, 2) == 0);
      tfc_word.nzs        = ($urandom_range(0, 30) == 0);
      // the orbit gap: headers only, so the buffer is empty at the FE reset
      if (i % 3564 >= 3445) begin tfc_word.bx_veto = 1; tfc_word.data_force = 0; end
      tfc_word.calib_type = ($urandom_range(0, 200) == 0) ? 4'($urandom_range(1, 15)) : 4'd0;
      occ  = (i % 1000 < 100) ? 50 : 10;
      for (int c = 0; c < 32; c++) hits[c] = ($urandom_range(0, 99) < occ);
      gbt_ready = !((i % 3000) >= 1000 && (i % 3000) < 1025);
      bx_en = 1;
      if (synced) begin
        fe_packet_t e;
        e = model(hits, mask, ref_bcnt, tfc_word);
        expq.push_back(e);
        if (tfc_word.bx_veto && !tfc_word.data_force) n_veto++;
        else if (tfc_word.bx_veto) n_force++;
        else if (tfc_word.nzs) n_nzs++;
      end
      @(posedge clk); #1;
      // reference bunch counter
      if (tfc_word.bid_reset) begin ref_bcnt = 7; synced = 1; end
      else ref_bcnt = (ref_bcnt == 3563) ? 0 : ref_bcnt + 1;
      collect();
      bx_en = 0;
      @(negedge clk);
      checks++;
      if (calib_pulse !== (tfc_word.calib_type != 0) || (calib_pulse && calib_type !== tfc_word.calib_type)) begin
        failures++; $display("FAIL calib pulse");
      end
      if (calib_pulse) n_calib++;
    end
    checks++;
    if (n_buf_trunc == 0 || n_zs_trunc == 0 || n_veto == 0 || n_nzs == 0 || n_force == 0 || n_calib == 0 || n_pkt < 8000) begin
      failures++; $display("FAIL coverage");
    end
    checks++;
    if (tmr_err) begin failures++; $display("FAIL tmr"); end
    // register read-back of the status counters
    cfg_addr = 3'd4; #1;
    checks++;
    if (cfg_rdata[15:0] == 0) begin failures++; $display("FAIL status truncation count"); end
    checks++;
    if (32'(cfg_rdata[31:16]) != n_skip || n_skip == 0) begin
      failures++; $display("FAIL lost count %0d, skipped %0d", cfg_rdata[31:16], n_skip);
    end
    // pattern mode
    cfg(3'd2, 32'd2);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); bx_en = 1; tfc_word = '0;
      @(posedge clk); #1; bx_en = 0;
      @(negedge clk);
      if (i > 2) begin
        checks++;
        if (!tx_en || tx_data[11:0] !== 12'(bcnt - 1) || tx_data[79:44] !== ~tx_data[35:0]) begin
          failures++; $display("FAIL pattern %h bcnt %0d", tx_data, bcnt);
        end
      end
    end
    $display("lost=%0d packets=%0d buf_trunc=%0d zs_trunc=%0d veto=%0d force=%0d nzs=%0d calib=%0d",
             n_skip, n_pkt, n_buf_trunc, n_zs_trunc, n_veto, n_force, n_nzs, n_calib);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
