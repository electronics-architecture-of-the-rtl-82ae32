// tb_be_module: self-checking test of a complete BE board. Three GBT links
// carry random FE packets (one per crossing, Bcnt = crossing, random length),
// serialised into 80-bit frames by an independent bit-level model. A decision
// per crossing (one in four accepted, MEP destination changing every PF
// accepts) arrives from the TFC side. The reference model builds the expected
// DAQ stream: every accepted crossing gives one event of three fragments with
// consecutive Event-IDs, packed PF events per MEP. The DAQ side stalls at
// random. After the run, the monitoring counters (snapshot), the MEP spy and
// the DAQ data generator are checked.
module tb_be_module;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;

  localparam int NL = 3, PF = 8, NBX = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NL-1:0] frame_valid;
  logic [GBT_D_W-1:0] frame [NL];
  logic trig_valid, eid_reset, be_reset, daq_valid, daq_sop, daq_eop, daq_ready, throttle;
  logic datagen_en, spy_arm, spy_done, cnt_latch, cnt_clear, cnt_shadow;
  trig_decision_t trig;
  logic [63:0] daq_data, spy_rd_data;
  logic [THR_W-1:0] throttle_word;
  logic [6:0] spy_rd_addr;
  logic [7:0] spy_nwords;
  logic [2:0] cnt_addr;
  logic [31:0] cnt_data;
  logic [EID_W-1:0] eid;

  be_module #(.NLINK(NL), .PF(PF)) dut (.clk, .rst_n, .frame_valid, .frame, .trig_valid, .trig, .eid_reset,
    .be_reset, .daq_valid, .daq_data, .daq_sop, .daq_eop, .daq_ready, .throttle_word, .throttle,
    .datagen_en, .spy_arm, .spy_rd_addr, .spy_rd_data, .spy_done, .spy_nwords, .cnt_latch, .cnt_clear,
    .cnt_addr, .cnt_shadow, .cnt_data, .eid);

  int checks = 0, failures = 0, n_words = 0, n_mep = 0, n_gen = 0;
  logic [63:0] expw[$];
  bit expsop[$], expeop[$];
  bit tx [NL][$];
  bit check_on = 1;

  always @(posedge clk) if (rst_n && daq_valid && daq_ready) begin
    if (check_on) begin
      n_words++; checks++;
      if (daq_sop) n_mep++;
      if (expw.size() == 0 || daq_data !== expw[0] || daq_sop != expsop[0] || daq_eop != expeop[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h expected %h t=%0t", daq_data, expw.size() ? expw[0] : 64'h0, $time);
      end
      if (expw.size()) begin void'(expw.pop_front()); void'(expsop.pop_front()); void'(expeop.pop_front()); end
    end else if (datagen_en) begin
      if (daq_sop && daq_data[63:56] == 8'hDA) n_gen++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_cnt(input int a, input int exp, input string what);
    @(negedge clk); cnt_addr = 3'(a); cnt_shadow = 1;
    #1 checks++;
    if (cnt_data != 32'(exp)) begin failures++; $display("FAIL counter %s %0d expected %0d", what, cnt_data, exp); end
  endtask

  initial begin
    logic [63:0] body[$];
    int nev, nacc;
    logic [15:0] dest;
    frame_valid = '0; trig_valid = 0; trig = '0; eid_reset = 0; be_reset = 0; daq_ready = 0;
    datagen_en = 0; spy_arm = 0; spy_rd_addr = '0; cnt_latch = 0; cnt_clear = 0; cnt_addr = '0; cnt_shadow = 0;
    for (int l = 0; l < NL; l++) frame[l] = '0;
    nev = 0; nacc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); daq_ready = ($urandom_range(0, 3) != 0); end
    join_none
    for (int c = 0; c < NBX; c++) begin
      trig_decision_t t;
      t = '0;
      t.bid = 12'(c % ORBIT_BX);
      t.accept = ($urandom_range(0, 3) == 0);
      t.mep_dest = 16'(16'h100 + nacc / PF);
      t.trig_type = 4'(c % 2);
      if (nev == 0) dest = t.mep_dest;
      for (int l = 0; l < NL; l++) begin
        fe_packet_t p;
        p = rnd_pkt(t.bid[3:0], 40);
        push_pkt(tx[l], p);
        if (t.accept) begin
          body.push_back({8'hF0, 4'(l), p.hdr.trunc, p.hdr.len, t.trig_type, 5'b0, t.bid, 24'(nacc)});
          body.push_back(64'(p.data));
        end
      end
      if (t.accept) begin
        nacc++; nev++;
        if (nev == PF) begin
          expw.push_back({8'hAB, dest, 8'(nev), 24'(nacc - PF), 8'(body.size())});
          expsop.push_back(1); expeop.push_back(0);
          foreach (body[i]) begin expw.push_back(body[i]); expsop.push_back(0); expeop.push_back(i == body.size() - 1); end
          body.delete(); nev = 0;
        end
      end
      @(negedge clk);
      trig_valid = 1; trig = t;
      for (int l = 0; l < NL; l++) begin
        frame_valid[l] = (tx[l].size() >= GBT_D_W);
        if (frame_valid[l]) frame[l] = pop_frame(tx[l]);
      end
      if (c == NBX / 2) spy_arm = 1;
      @(negedge clk); trig_valid = 0; frame_valid = '0; spy_arm = 0;
      repeat (2) @(negedge clk);
    end
    // flush the links with empty packets, then let the last MEP time out
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        frame_valid[l] = (tx[l].size() != 0);
        while (tx[l].size() < GBT_D_W) tx[l].push_back(1'b0);
        if (frame_valid[l]) frame[l] = pop_frame(tx[l]);
      end
      @(negedge clk); frame_valid = '0;
      repeat (2) @(negedge clk);
    end
    if (nev != 0) begin
      expw.push_back({8'hAB, dest, 8'(nev), 24'(nacc - nev), 8'(body.size())});
      expsop.push_back(1); expeop.push_back(0);
      foreach (body[i]) begin expw.push_back(body[i]); expsop.push_back(0); expeop.push_back(i == body.size() - 1); end
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (expw.size() != 0) begin failures++; $display("FAIL %0d DAQ words missing", expw.size()); end
    // counters
    @(negedge clk); cnt_latch = 1; @(negedge clk); cnt_latch = 0;
    rd_cnt(0, nacc, "events");
    rd_cnt(1, n_mep, "meps");
    rd_cnt(7, nacc, "accepts");
    rd_cnt(5, 0, "lost");
    // spy: holds two whole MEPs starting with a header
    checks++;
    @(negedge clk); spy_rd_addr = 0;
    #1 if (!spy_done || spy_rd_data[63:56] != 8'hAB || spy_nwords != 8'(2 * (spy_rd_data[7:0] + 1))) begin
      failures++; $display("FAIL spy done %b first %h nwords %0d", spy_done, spy_rd_data, spy_nwords);
    end
    // data generator replaces the event data
    check_on = 0;
    @(negedge clk); datagen_en = 1;
    repeat (500) @(negedge clk);
    datagen_en = 0;
    checks++;
    if (n_gen < 5) begin failures++; $display("FAIL generator MEPs %0d", n_gen); end
    $display("events=%0d meps=%0d words=%0d generator_meps=%0d", nacc, n_mep, n_words, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
