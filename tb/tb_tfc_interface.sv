// tb_tfc_interface: self-checking test of the TFC Interface. Random 44-bit
// TFC words are sent one per crossing (bx_en every 4 clocks), with an orbit
// BID reset in the word of BID 3563. After each crossing the FE word must
// carry the word's BID and FE commands in the Table-4 fields; BE and
// Event-ID resets must pulse for one clock; no decision may reach the BE
// before the first BID reset plus the trigger latency, and after that every
// crossing's decision must arrive with its BID corrected back by the trigger
// latency (modulo the orbit). The throttle output must be the OR of the BE
// throttle flags.
module tb_tfc_interface;
  import lhcb_pkg::*;
  localparam int TL = 4, NBE = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bx_en, be_trig_valid, be_reset, eid_reset, throttle;
  tfc_info_t tfc_info;
  tfc_fe_word_t fe_word;
  trig_decision_t be_trig;
  logic [THR_W-1:0] be_throttle [NBE];

  tfc_interface #(.TRIG_LAT(TL), .NBE(NBE)) dut (.clk, .rst_n, .bx_en, .tfc_info, .fe_word, .be_trig_valid,
    .be_trig, .be_reset, .eid_reset, .be_throttle, .throttle);

  int checks = 0, failures = 0, n_dec = 0, n_early = 0, n_wrap = 0, n_rst = 0;

  task automatic chk(bit ok, string what, int w);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s crossing %0d", what, w); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tfc_info_t t;
    int first_reset, bid, nrst;
    bit thr;
    bx_en = 0; tfc_info = '0; be_throttle[0] = '0; be_throttle[1] = '0;
    first_reset = -1; bid = 3000;   // start mid-orbit: the FE is not yet synchronised
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 9000; w++) begin
      t = tfc_info_t'({$urandom, $urandom});
      t.bid = 12'(bid);
      t.bid_reset = (bid == ORBIT_BX - 1);
      t.fe_reset  = (bid == ORBIT_BX - 1);
      if (t.bid_reset && first_reset < 0) first_reset = w;
      @(negedge clk);
      bx_en = 1; tfc_info = t;
      be_throttle[0] = THR_W'($urandom); be_throttle[0][0] = ($urandom_range(0, 3) == 0);
      be_throttle[1] = THR_W'($urandom); be_throttle[1][0] = ($urandom_range(0, 3) == 0);
      thr = be_throttle[0][0] | be_throttle[1][0];
      @(negedge clk);
      bx_en = 0;
      chk(fe_word.bid == t.bid && fe_word.calib_type == t.calib_type && fe_word.bx_veto == t.bx_veto &&
          fe_word.nzs == t.nzs && fe_word.data_force == t.data_force && fe_word.fe_reset == t.fe_reset &&
          fe_word.bid_reset == t.bid_reset && fe_word.reserve == 3'b0, "fe word", w);
      chk(be_reset == t.be_reset && eid_reset == t.eid_reset, "be resets", w);
      chk(throttle == thr, "throttle", w);
      if (first_reset >= 0 && w > first_reset + TL) begin
        chk(be_trig_valid && be_trig.accept == t.trigger && be_trig.mep_dest == t.mep_dest &&
            be_trig.trig_type == t.trig_type &&
            be_trig.bid == 12'((bid + ORBIT_BX - TL) % ORBIT_BX), "decision", w);
        n_dec++;
        if (bid < TL) n_wrap++;
      end else begin
        chk(!be_trig_valid, "early decision", w);
        n_early++;
      end
      if (t.be_reset) n_rst++;
      @(negedge clk);
      chk(!be_trig_valid && !be_reset && !eid_reset, "one-clock pulses", w);
      @(negedge clk);
      bid = (bid + 1) % ORBIT_BX;
    end
    checks++;
    if (n_dec == 0 || n_early == 0 || n_wrap == 0 || n_rst == 0) begin
      failures++; $display("FAIL decisions %0d early %0d wrapped %0d resets %0d", n_dec, n_early, n_wrap, n_rst);
    end
    $display("decisions=%0d before_sync=%0d wrapped_bid=%0d", n_dec, n_early, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
