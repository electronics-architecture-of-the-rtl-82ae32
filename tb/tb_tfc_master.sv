// tb_tfc_master: self-checking test of the TFC Master. Crossings are driven
// with a bx_en strobe every 4 clocks. Random ECAL, HCAL and MUON decisions
// are presented at their own latencies; calibration crossings, NZS requests,
// throttle periods, a run pause and farm-node requests are applied. A
// crossing-level reference model computes, for every 44-bit word, the BID,
// the orbit resets, the veto (empty gap and NZS span), the forced-trigger
// bits, the delayed trigger decision with its type, and the MEP destination
// (PF accepted events per farm request, in request order). Each mechanism
// (accept, throttle block, veto suppression, calibration, NZS, orbit reset,
// destination change) is counted and must have occurred.
module tb_tfc_master;
  import lhcb_pkg::*;

  localparam int TL = 4, LE = 2, LH = 3, LM = 4, PF = 8, SPAN = 4, NW = 4 * ORBIT_BX + 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bx_en, run, trig_ecal, trig_hcal, trig_muon, throttle, farm_req_valid, calib_en, nzs_req;
  logic eid_reset_req, be_reset_req;
  logic [DEST_W-1:0] farm_req_node;
  logic [11:0] calib_bx;
  logic [3:0] calib_type;
  tfc_info_t tfc_info;
  logic [2:0] trig_src;
  logic special_dest_en;
  logic [DEST_W-1:0] special_dest;
  logic [31:0] n_accept, n_blocked;

  tfc_master dut (.clk, .rst_n, .bx_en, .run, .trig_ecal, .trig_hcal, .trig_muon, .throttle,
    .farm_req_valid, .farm_req_node, .calib_en, .calib_bx, .calib_type, .nzs_req, .special_dest_en, .special_dest,
    .eid_reset_req, .be_reset_req, .tfc_info, .trig_src, .n_accept, .n_blocked);

  int checks = 0, failures = 0;
  int m_reg = 0, m_spec = 0, m_acc = 0, m_blk = 0, m_veto_sup = 0, m_calib = 0, m_nzs = 0, m_orbit = 0, m_dchg = 0;
  bit e[NW], h[NW], mu[NW], veto[NW], cal[NW], nz[NW], runv[NW];

  task automatic chk(bit ok, string what, int w);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s word %0d got %p", what, w, tfc_info); end
  endtask

  initial begin
    repeat (40 * NW) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int span, n_req, bidw, c;
    bit pend, want, thr, calnow, acc;
    logic [15:0] last_dest;
    bx_en = 0; run = 1; trig_ecal = 0; trig_hcal = 0; trig_muon = 0; throttle = 0; farm_req_valid = 0;
    farm_req_node = '0; calib_en = 1; calib_bx = 12'd100; calib_type = 4'd5; nzs_req = 0;
    eid_reset_req = 0; be_reset_req = 0; special_dest_en = 0; special_dest = 16'h0CA1;
    span = 0; n_req = 0; pend = 0; last_dest = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      bidw = w % ORBIT_BX;
      e[w] = ($urandom_range(0, 19) == 0); h[w] = ($urandom_range(0, 19) == 0); mu[w] = ($urandom_range(0, 19) == 0);
      runv[w] = !(w >= 9000 && w < 9100);
      // reference flags of this crossing
      calnow = (bidw == 100);
      if (w % 777 == 5) pend = 1;
      nz[w] = pend && bidw < ORBIT_BX - EMPTY_BX && span == 0 && !calnow;
      veto[w] = (bidw >= ORBIT_BX - EMPTY_BX) || (span != 0);
      cal[w] = calnow;
      if (nz[w]) begin pend = 0; span = SPAN - 1; end else if (span != 0) span--;
      thr = (w % 1500) >= 700 && (w % 1500) < 760;
      // drive the crossing
      @(negedge clk);
      bx_en = 1; run = runv[w]; throttle = thr; special_dest_en = ((w / 2000) % 2 == 1);
      nzs_req = (w % 777 == 5);
      trig_ecal = (w >= LE) ? e[w - LE] : 1'b0;
      trig_hcal = (w >= LH) ? h[w - LH] : 1'b0;
      trig_muon = (w >= LM) ? mu[w - LM] : 1'b0;
      @(negedge clk);
      bx_en = 0; nzs_req = 0;
      // expected word
      c = w - TL;
      want = 0;
      if (c >= 0) want = runv[w] && (cal[c] || nz[c] || ((e[c] | h[c] | mu[c]) && !veto[c]));
      acc = want && !thr;
      chk(tfc_info.bid == 12'(bidw), "bid", w);
      chk(tfc_info.bid_reset == (bidw == ORBIT_BX - 1) && tfc_info.fe_reset == (bidw == ORBIT_BX - 1), "orbit reset", w);
      chk(tfc_info.bx_veto == veto[w] && tfc_info.nzs == nz[w] && tfc_info.data_force == cal[w], "flags", w);
      chk(tfc_info.calib_type == (cal[w] ? 4'd5 : 4'd0), "calib type", w);
      chk(tfc_info.trigger == acc, "trigger", w);
      chk(trig_src == (acc ? {e[c], h[c], mu[c]} : 3'd0), "trigger source", w);
      if (acc) begin
        chk(tfc_info.trig_type == (cal[c] ? TT_CALIB : (nz[c] ? TT_NZS : TT_PHYSICS)), "type", w);
        if (special_dest_en && (cal[c] || nz[c])) begin
          chk(tfc_info.mep_dest == 16'h0CA1, "special dest", w); m_spec++;
        end else begin
          chk(tfc_info.mep_dest == 16'(16'h40 + m_reg / PF), "dest", w); m_reg++;
        end
        if (tfc_info.mep_dest != last_dest) m_dchg++;
        last_dest = tfc_info.mep_dest;
        m_acc++;
        if (cal[c]) m_calib++;
        if (nz[c]) m_nzs++;
      end
      if (want && !acc) m_blk++;
      if (c >= 0 && (e[c] | h[c] | mu[c]) && veto[c] && !cal[c] && !nz[c] && runv[w]) m_veto_sup++;
      if (bidw == ORBIT_BX - 1) m_orbit++;
      // farm requests, kept a few ahead of need
      @(negedge clk);
      if (n_req < m_reg / PF + 4) begin
        farm_req_valid = 1; farm_req_node = 16'(16'h40 + n_req); n_req++;
      end
      @(negedge clk); farm_req_valid = 0;
    end
    checks++;
    if (n_accept != 32'(m_acc) || n_blocked != 32'(m_blk)) begin
      failures++; $display("FAIL counters %0d/%0d expected %0d/%0d", n_accept, n_blocked, m_acc, m_blk);
    end
    checks++;
    if (m_acc == 0 || m_blk == 0 || m_veto_sup == 0 || m_calib == 0 || m_nzs == 0 || m_orbit == 0 || m_dchg < 2 || m_spec == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("special_dest=%0d", m_spec);
    $display("accepted=%0d blocked=%0d veto_suppressed=%0d calib=%0d nzs=%0d orbits=%0d dest_changes=%0d",
             m_acc, m_blk, m_veto_sup, m_calib, m_nzs, m_orbit, m_dchg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
