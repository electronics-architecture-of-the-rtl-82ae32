// tb_tfc_event_bank: self-checking test of the event data bank. A short
// orbit (50 crossings) of TFC words is driven, with random accepts, trigger
// types, sub-trigger sources, occasional Event-ID resets, and stretches of
// local running. A reference model counts orbits and events on its own and
// works out the expected bank, which must appear one clock after each
// accepted word, and only then.
module tb_tfc_event_bank;
  import lhcb_pkg::*;
  localparam int OB = 50, TL = 4, NW = 20 * OB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bx_en, local_run;
  tfc_info_t tfc_info;
  logic [2:0] trig_src;
  logic [31:0] run_number, utc;
  logic bank_valid;
  logic [4:0][31:0] bank;
  logic [2:0] bank_len;

  tfc_event_bank #(.ORBIT_BX(OB), .TRIG_LAT(TL)) dut (.clk, .rst_n, .bx_en, .tfc_info, .trig_src,
    .local_run, .run_number, .utc, .bank_valid, .bank, .bank_len);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what, int w);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s word %0d got %p len %0d", what, w, bank, bank_len); end
  endtask

  initial begin
    repeat (10 * NW) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int orbit, evn, n_bank, n_local, n_prev, n_rst, ebid, eorb;
    logic [4:0][31:0] exp_b;
    bx_en = 0; local_run = 0; tfc_info = '0; trig_src = '0; run_number = 32'd1234; utc = '0;
    orbit = 0; evn = 0; n_bank = 0; n_local = 0; n_prev = 0; n_rst = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      if (w % 300 == 0) local_run = ($urandom_range(0, 1) == 1);
      if (w % 200 == 0) run_number = $urandom;
      utc = 32'(w / 7) + 32'h6000_0000;
      tfc_info = '0;
      tfc_info.bid       = 12'(w % OB);
      tfc_info.bid_reset = (w % OB == OB - 1);
      tfc_info.trigger   = ($urandom_range(0, 2) == 0);
      tfc_info.trig_type = 4'($urandom_range(0, 2));
      tfc_info.eid_reset = ($urandom_range(0, 120) == 0);
      trig_src = tfc_info.trigger ? 3'($urandom_range(1, 7)) : 3'd0;
      // reference bank for this word
      if (tfc_info.eid_reset) begin evn = 0; n_rst++; end
      ebid = (w % OB) - TL; eorb = orbit;
      if (ebid < 0) begin ebid += OB; if (orbit > 0) eorb--; end
      exp_b[0] = 32'(evn);
      exp_b[1] = {12'(ebid), tfc_info.trig_type, trig_src, 13'd0};
      exp_b[2] = local_run ? 32'd0 : run_number;
      exp_b[3] = local_run ? 32'd0 : 32'(eorb);
      exp_b[4] = local_run ? 32'd0 : utc;
      bx_en = 1;
      @(negedge clk);
      bx_en = 0;
      chk(bank_valid == tfc_info.trigger, "bank valid", w);
      if (tfc_info.trigger) begin
        chk(bank == exp_b, "bank contents", w);
        chk(bank_len == (local_run ? 3'd2 : 3'd5), "bank length", w);
        n_bank++; evn++;
        if (local_run) n_local++;
        if ((w % OB) < TL && orbit > 0) n_prev++;
      end
      if (tfc_info.bid_reset) orbit++;
      @(negedge clk);
      chk(!bank_valid, "single pulse", w);
    end
    checks++;
    if (n_bank == 0 || n_local == 0 || n_local == n_bank || n_prev == 0 || n_rst == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("banks=%0d reduced=%0d previous_orbit=%0d eid_resets=%0d", n_bank, n_local, n_prev, n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
