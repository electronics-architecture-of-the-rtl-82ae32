// tb_lhcb_readout_top: end-to-end test of the readout chain at its default
// size (eight TFC masters behind the partitioning switch, a TFC interface,
// three FE links of 32 channels and one BE board). For part of the run a
// second master takes the slice over, as a local partition would. The testbench plays the parts that are outside the RTL: the
// detector (random hits per channel and crossing), the GBT links (the 24-bit
// TFC word to each FE with a different latency per link, and the 80-bit FE
// frames to the BE two crossings later), the sub-trigger processors, the
// event-filter farm (node requests) and the DAQ network (random back-pressure
// and one long stall).
//
// Checking. For every FE link and crossing the testbench computes, from the
// hits and the TFC word it delivered, the packet the FE should send (zero
// suppressed, NZS, or header only when vetoed). Every word of the TFC master
// with the trigger bit set is an accepted crossing. The DAQ stream is parsed:
// every accepted crossing must appear, in order, as one event of three
// fragments in link order with consecutive Event-IDs, the right BID, trigger
// type and MEP destination, and each fragment must equal the expected packet
// unless it is flagged truncated with no data (FE or BE truncation, or a
// packet lost to the buffers). Monitoring counters, the MEP spy and the DAQ
// data generator are checked at the end.
//
// Mechanisms counted (each must happen at least once): partition switch
// (accepts issued by the second master), orbit BID reset, BX
// veto, zero suppression, ZS truncation (too many hits), FE buffer
// truncation, NZS readout, calibration forced trigger, throttle, MEP closed
// full, MEP destination change, channel mask, MEP spy capture, counter
// snapshot, DAQ data generator.
module tb_lhcb_readout_top;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;

  localparam int NL = 3, NCH = 32, PF = 8, RUN_BX = 6 * ORBIT_BX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] run;
  logic [2:0] part_sel;
  logic bx_en_o, trig_ecal, trig_hcal, trig_muon, farm_req_valid, calib_en, nzs_req;
  logic eid_reset_req, be_reset_req, throttle_o;
  logic [DEST_W-1:0] farm_req_node;
  logic [11:0] calib_bx;
  logic [3:0] calib_type;
  tfc_info_t tfc_info_o;
  logic [NCH-1:0] hits [NL];
  tfc_fe_word_t fe_tfc_word_o;
  tfc_fe_word_t fe_tfc_word_i [NL];
  logic [NL-1:0] gbt_ready, fe_tx_en_o, calib_pulse_o, cfg_wr, be_frame_valid_i;
  logic [GBT_D_W-1:0] fe_tx_data_o [NL];
  logic [GBT_D_W-1:0] be_frame_i [NL];
  logic [2:0] cfg_addr, cnt_addr;
  logic [31:0] cfg_wdata, cnt_data;
  logic [31:0] cfg_rdata [NL];
  logic daq_valid, daq_sop, daq_eop, daq_ready, datagen_en, spy_arm, spy_done, cnt_latch, cnt_clear, cnt_shadow;
  logic [63:0] daq_data, spy_rd_data;
  logic [6:0] spy_rd_addr;
  logic [7:0] spy_nwords;

  logic [7:0] local_run;
  logic special_dest_en;
  logic [DEST_W-1:0] special_dest;
  logic [31:0] run_number, utc;
  logic bank_valid_o;
  logic [4:0][31:0] bank_o;
  logic [2:0] bank_len_o;

  lhcb_readout_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_orbit = 0, m_veto = 0, m_zs = 0, m_zs_trunc = 0, m_fe_trunc = 0, m_nzs = 0, m_calib = 0;
  int m_throttle = 0, m_full_mep = 0, m_dest_chg = 0, m_mask = 0, m_spy = 0, m_snap = 0, m_gen = 0, m_part = 0;
  int n_events = 0, n_meps = 0, n_frag_ok = 0, m_bank = 0, m_bank_red = 0, m_spec = 0;

  fe_packet_t expp [NL][ORBIT_BX];
  trig_decision_t accq[$];
  tfc_fe_word_t wline [$];                 // TFC words, newest first
  logic [GBT_D_W-1:0] fline [NL][$];       // frames in flight on the GBT links
  bit fvline [NL][$];
  logic [NCH-1:0] mask [NL];
  bit started = 0, check_daq = 1, dense1 = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s t=%0t", msg, $time);
  endtask

  // expected FE packet for a crossing, from the hits and the TFC word
  function automatic fe_packet_t fe_expect(logic [NCH-1:0] h, logic [NCH-1:0] m, tfc_fe_word_t w);
    fe_packet_t p;
    int n;
    p = '0;
    p.hdr.bcnt = w.bid[3:0];
    if (w.bx_veto && !w.data_force) return p;
    if (w.nzs) begin
      p.hdr.len = 6'(NCH); p.data = 63'(h);
      return p;
    end
    n = 0;
    for (int c = 0; c < NCH; c++)
      if (h[c] && !m[c]) begin
        if (n < 12) begin p.data[5 * n +: 5] = 5'(c); n++; end
        else p.hdr.trunc = 1'b1;
      end
    p.hdr.len = 6'(5 * n);
    return p;
  endfunction

  // ---------------------------------------------------------------- links
  // Once per crossing, just before the bx_en edge: deliver the TFC word and
  // hits to each FE, and move the FE frames along the GBT links.
  always @(negedge clk) if (rst_n && bx_en_o) begin
    wline.push_front(fe_tfc_word_o);
    if (wline.size() > 4) void'(wline.pop_back());
    for (int l = 0; l < NL; l++) begin
      tfc_fe_word_t w;
      logic [NCH-1:0] h;
      w = (wline.size() > l) ? wline[l] : '0;      // link l: l extra crossings of latency
      fe_tfc_word_i[l] = w;
      h = '0;
      for (int c = 0; c < NCH; c++) h[c] = ($urandom_range(0, 99) < ((dense1 && l == 1) ? 60 : 8));
      hits[l] = h;
      expp[l][w.bid] = fe_expect(h, mask[l], w);
      if (w.bid_reset && l == 0) m_orbit++;
      if (w.bx_veto && l == 0) m_veto++;
      if (h & mask[l]) m_mask++;
      // GBT data link: two crossings
      fline[l].push_back(fe_tx_data_o[l]); fvline[l].push_back(fe_tx_en_o[l]);
      be_frame_valid_i[l] = 1'b0;
      if (fline[l].size() > 2) begin
        be_frame_i[l] = fline[l].pop_front();
        be_frame_valid_i[l] = fvline[l].pop_front();
      end
    end
    // accepted crossings, from the TFC master's words
    if (tfc_info_o.trigger && started) begin
      trig_decision_t d;
      d.bid = 12'((int'(tfc_info_o.bid) + ORBIT_BX - 4) % ORBIT_BX);
      d.accept = 1'b1; d.mep_dest = tfc_info_o.mep_dest; d.trig_type = tfc_info_o.trig_type;
      accq.push_back(d);
    end
  end
  always @(negedge clk) if (rst_n && !bx_en_o) be_frame_valid_i = '0;

  // event data bank: one per accepted word of the selected master, with the
  // crossing of the decision and event numbers counting up
  logic [2:0] bank_sel = '0;
  logic [31:0] bank_next = '0;
  always @(negedge clk) if (started && bank_valid_o) begin
    checks++;
    if (!tfc_info_o.trigger || bank_o[1][31:20] != 12'((int'(tfc_info_o.bid) + ORBIT_BX - 4) % ORBIT_BX)
        || bank_o[1][19:16] != tfc_info_o.trig_type || bank_len_o != (local_run[part_sel] ? 3'd2 : 3'd5)
        || (!local_run[part_sel] && bank_o[2] != run_number)
        || (bank_sel == part_sel && bank_o[0] != bank_next))
      fail($sformatf("event bank %p for word %p", bank_o, tfc_info_o));
    else begin m_bank++; if (bank_len_o == 3'd2) m_bank_red++; end
    bank_sel = part_sel; bank_next = bank_o[0] + 1;
  end
  always @(posedge clk) if (throttle_o) m_throttle++;

  // ---------------------------------------------------------------- DAQ
  int st = 0, words_left = 0, frag_i = 0, exp_eid = 0, mep_nev = 0;
  logic [15:0] mep_dest, last_dest = '1;
  logic [63:0] desc;
  trig_decision_t cur_ev;

  always @(posedge clk) if (rst_n && daq_valid && daq_ready && check_daq) begin
    checks++;
    if (st == 0) begin
      if (!daq_sop || daq_data[63:56] != 8'hAB) fail($sformatf("MEP header expected, got %h", daq_data));
      mep_dest = daq_data[55:40]; mep_nev = daq_data[39:32]; words_left = daq_data[7:0];
      if (daq_data[31:8] != 24'(exp_eid)) fail("MEP first Event-ID");
      if (mep_nev == PF) m_full_mep++;
      if (mep_dest != last_dest && last_dest != '1) m_dest_chg++;
      last_dest = mep_dest;
      n_meps++;
      st = (words_left == 0) ? 0 : 1;
    end else begin
      words_left--;
      if (daq_eop != (words_left == 0)) fail("eop");
      if (st == 1) begin
        desc = daq_data;
        st = 2;
      end else begin
        fe_packet_t got, e;
        int l;
        l = desc[55:52];
        got = '0;
        got.hdr.trunc = desc[51]; got.hdr.len = desc[50:45]; got.data = daq_data[62:0];
        got.hdr.bcnt = desc[27:24];
        if (frag_i == 0) begin
          if (accq.size() == 0) begin fail("event without an accepted crossing"); cur_ev = '0; end
          else cur_ev = accq.pop_front();
          n_events++;
          if (cur_ev.trig_type == TT_CALIB) m_calib++;
          if (cur_ev.trig_type == TT_NZS) m_nzs++;
        end
        if (desc[63:56] != 8'hF0 || l != frag_i || desc[23:0] != 24'(exp_eid) || desc[35:24] != cur_ev.bid ||
            desc[44:41] != cur_ev.trig_type || mep_dest != cur_ev.mep_dest)
          fail($sformatf("fragment header %h link %0d expected eid %0d bid %0d", desc, frag_i, exp_eid, cur_ev.bid));
        e = expp[l][cur_ev.bid];
        if (got.hdr.trunc && got.hdr.len == 0 && e != got) begin
          if (l == 1) m_fe_trunc++;
        end else if (got !== e) begin
          fail($sformatf("data link %0d bid %0d got %h expected %h", l, cur_ev.bid, got, e));
        end else begin
          n_frag_ok++;
          if (e.hdr.trunc) m_zs_trunc++;
          else if (e.hdr.len != 0 && e.hdr.len != 6'(NCH)) m_zs++;
        end
        frag_i++;
        if (frag_i == NL) begin frag_i = 0; exp_eid++; end
        st = 1;
      end
      if (words_left == 0) begin
        st = 0;
        if (frag_i != 0) fail("MEP ends inside an event");
      end
    end
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (4 * (RUN_BX + 3 * ORBIT_BX)) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- control
  initial begin
    int bx, nreq;
    special_dest_en = 0; special_dest = 16'h0CA1;
    run = '0; part_sel = 3'd0; local_run = 8'b1110_0000; run_number = 32'd271828; utc = 32'h6500_0000; trig_ecal = 0; trig_hcal = 0; trig_muon = 0; farm_req_valid = 0; farm_req_node = '0;
    calib_en = 0; calib_bx = 12'd200; calib_type = 4'd3; nzs_req = 0; eid_reset_req = 0; be_reset_req = 0;
    gbt_ready = '1; cfg_wr = '0; cfg_addr = '0; cfg_wdata = '0; daq_ready = 1; datagen_en = 0;
    spy_arm = 0; spy_rd_addr = '0; cnt_latch = 0; cnt_clear = 0; cnt_addr = '0; cnt_shadow = 0;
    for (int l = 0; l < NL; l++) begin
      hits[l] = '0; fe_tfc_word_i[l] = '0; be_frame_i[l] = '0; mask[l] = '0;
    end
    be_frame_valid_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // configuration: mask four channels of link 2
    @(negedge clk); cfg_wr = 3'b100; cfg_addr = 3'd0; cfg_wdata = 32'h0000_000F; mask[2] = 32'h0000_000F;
    @(negedge clk); cfg_wr = '0;
    @(negedge clk);
    checks++;
    if (cfg_rdata[2] != 32'hF) fail("configuration read-back");
    // wait for the first orbit reset to synchronise FEs and TFC interface
    while (m_orbit == 0) @(negedge clk);
    repeat (4 * 20) @(negedge clk);
    started = 1;
    run = 8'b0000_0001; calib_en = 1;
    nreq = 0;
    bx = 0;
    while (bx < RUN_BX) begin
      @(negedge clk);
      if (!bx_en_o) begin
        // off-crossing clocks: DAQ readiness, farm requests
        daq_ready = (bx >= 2 * ORBIT_BX && bx < 2 * ORBIT_BX + 600) ? 1'b0 : ($urandom_range(0, 3) != 0);
        farm_req_valid = 0;
        if (nreq < n_events / PF + 6 + accq.size() / PF) begin
          farm_req_valid = 1; farm_req_node = 16'(16'h200 + nreq); nreq++;
        end
        continue;
      end
      bx++;
      trig_ecal = ($urandom_range(0, 14) == 0);
      trig_hcal = ($urandom_range(0, 14) == 0);
      trig_muon = ($urandom_range(0, 14) == 0);
      nzs_req = (bx % 500 == 250);
      special_dest_en = (bx >= 4 * ORBIT_BX);
      if (tfc_info_o.trigger && tfc_info_o.mep_dest == 16'h0CA1) m_spec++;
      dense1 = (bx % 3000 >= 1000 && bx % 3000 < 1040);
      gbt_ready[1] = !(bx % 3000 >= 1010 && bx % 3000 < 1022);
      spy_arm = (bx == ORBIT_BX + 100);
      // a local partition: master 5 takes the slice over for a while
      if (bx == 3 * ORBIT_BX + 200) begin run = 8'b0010_0001; part_sel = 3'd5; end
      if (bx == 3 * ORBIT_BX + 1400) begin part_sel = 3'd0; run = 8'b0000_0001; end
      if (part_sel == 3'd5 && tfc_info_o.trigger) m_part++;
      cnt_latch = 0;
      if (bx % 40000 == 0) utc++;
    end
    // stop triggering, let everything drain (MEP timeout included)
    run = '0; nzs_req = 0; spy_arm = 0; farm_req_valid = 0; daq_ready = 1; gbt_ready = '1;
    repeat (4 * 800) @(negedge clk);
    checks++;
    if (accq.size() != 0) fail($sformatf("%0d accepted crossings not delivered", accq.size()));
    // monitoring counters: events built and MEPs sent
    @(negedge clk); cnt_latch = 1; @(negedge clk); cnt_latch = 0; cnt_shadow = 1;
    cnt_addr = 3'd0; #1 checks++;
    if (cnt_data != 32'(n_events)) fail($sformatf("event counter %0d, %0d seen", cnt_data, n_events)); else m_snap++;
    cnt_addr = 3'd1; #1 checks++;
    if (cnt_data != 32'(n_meps)) fail($sformatf("MEP counter %0d, %0d seen", cnt_data, n_meps));
    // MEP spy
    spy_rd_addr = 0; #1 checks++;
    if (!spy_done || spy_rd_data[63:56] != 8'hAB) fail("spy capture"); else m_spy++;
    // DAQ data generator
    check_daq = 0;
    @(negedge clk); datagen_en = 1;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      if (daq_valid && daq_ready && daq_sop && daq_data[63:56] == 8'hDA) m_gen++;
    end
    @(negedge clk); datagen_en = 0;
    // every mechanism must have happened
    begin
      string names [18] = '{"special destination", "event bank", "reduced bank", "partition switch", "orbit reset", "bx veto", "zero suppression", "ZS truncation", "FE truncation",
                            "NZS", "calibration", "throttle", "full MEP", "MEP dest change", "channel mask",
                            "spy", "counter snapshot", "data generator"};
      int cnt [18];
      cnt = '{m_spec, m_bank, m_bank_red, m_part, m_orbit, m_veto, m_zs, m_zs_trunc, m_fe_trunc, m_nzs, m_calib, m_throttle, m_full_mep,
              m_dest_chg, m_mask, m_spy, m_snap, m_gen};
      for (int i = 0; i < 18; i++) begin
        checks++;
        $display("mechanism %-18s %0d", names[i], cnt[i]);
        if (cnt[i] == 0) fail($sformatf("mechanism %s never happened", names[i]));
      end
    end
    $display("events=%0d meps=%0d fragments_checked=%0d", n_events, n_meps, n_frag_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
