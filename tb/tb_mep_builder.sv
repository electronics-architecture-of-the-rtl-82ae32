// tb_mep_builder: self-checking test of the MEP formatter. Events of two
// fragments each are fed with random gaps and random destinations that
// change every few events; a reference model groups them into MEPs (close
// after PF events, on a destination change, or after an idle time longer
// than TIMEOUT, which the stimulus creates on purpose now and then) and
// builds the expected DAQ words: header, then a descriptor word and a data
// word per fragment. The DAQ side stalls at random, and once for long enough
// to fill the transmit buffer, so that back-pressure and the alarm are
// exercised. Every closing reason is counted and must occur.
module tb_mep_builder;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;

  localparam int NL = 2, PF = 8, TO = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic be_reset, in_valid, in_last, in_ready, daq_valid, daq_sop, daq_eop, daq_ready, alarm, mep_done;
  fragment_t in_frag;
  logic [3:0] in_link;
  logic [63:0] daq_data;

  mep_builder #(.PF(PF), .TIMEOUT(TO)) dut (.clk, .rst_n, .be_reset, .in_valid, .in_frag, .in_link, .in_last,
    .in_ready, .daq_valid, .daq_data, .daq_sop, .daq_eop, .daq_ready, .alarm, .mep_done);

  int checks = 0, failures = 0, n_words = 0, n_mep = 0, n_done = 0, n_alarm = 0;
  int n_pf = 0, n_dest = 0, n_to = 0;
  logic [63:0] expw[$];
  bit expsop[$], expeop[$];

  // reference MEP under construction
  logic [63:0] body[$];
  int nev = 0;
  logic [15:0] m_dest;
  logic [23:0] m_eid;

  function automatic void close_mep();
    if (nev == 0) return;
    expw.push_back({8'hAB, m_dest, 8'(nev), m_eid, 8'(body.size())});
    expsop.push_back(1); expeop.push_back(0);
    foreach (body[i]) begin
      expw.push_back(body[i]); expsop.push_back(0); expeop.push_back(i == body.size() - 1);
    end
    body.delete(); nev = 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (daq_valid && daq_ready) begin
      n_words++; checks++;
      if (daq_sop) n_mep++;
      if (expw.size() == 0 || daq_data !== expw[0] || daq_sop != expsop[0] || daq_eop != expeop[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h sop %b eop %b expected %h t=%0t", daq_data, daq_sop, daq_eop,
                                    expw.size() ? expw[0] : 64'h0, $time);
      end
      if (expw.size()) begin void'(expw.pop_front()); void'(expsop.pop_front()); void'(expeop.pop_front()); end
    end
    if (mep_done) n_done++;
    if (alarm) n_alarm++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DAQ side: random stalls, one long stall
  initial begin
    daq_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      daq_ready = ($urandom_range(0, 3) != 0);
      if ($time > 200000 && $time < 200020) begin daq_ready = 0; repeat (3000) @(negedge clk); end
    end
  end

  initial begin
    logic [15:0] dest;
    be_reset = 0; in_valid = 0; in_frag = '0; in_link = 0; in_last = 0;
    dest = 16'h100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 6000; e++) begin
      if ($urandom_range(0, 24) == 0) dest = dest + 1'b1;
      // reference: closing reasons seen at the start of an event
      if (nev != 0 && dest != m_dest) begin close_mep(); n_dest++; end
      if (nev == 0) begin m_dest = dest; m_eid = 24'(e); end
      for (int l = 0; l < NL; l++) begin
        fragment_t f;
        f = '0;
        f.eid = 24'(e); f.bid = 12'(e * 7); f.mep_dest = dest; f.trig_type = 4'(e % 3);
        f.pkt = rnd_pkt(f.bid[3:0], 63);
        body.push_back({8'hF0, 4'(l), f.pkt.hdr.trunc, f.pkt.hdr.len, f.trig_type, 5'b0, f.bid, f.eid});
        body.push_back(64'(f.pkt.data));
        @(negedge clk);
        in_valid = 1; in_frag = f; in_link = 4'(l); in_last = (l == NL - 1);
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      nev++;
      if (nev == PF) begin close_mep(); n_pf++; end
      if ($urandom_range(0, 99) == 0) begin
        if (nev != 0) begin close_mep(); n_to++; end
        repeat (TO + 20) @(negedge clk);
      end else repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    if (nev != 0) n_to++;
    close_mep();
    repeat (TO + 400) @(negedge clk);
    checks++;
    if (expw.size() != 0) begin failures++; $display("FAIL %0d words missing", expw.size()); end
    checks++;
    if (n_done != n_mep || n_pf == 0 || n_dest == 0 || n_to == 0 || n_alarm == 0) begin
      failures++; $display("FAIL done %0d meps %0d pf %0d dest %0d timeout %0d alarm %0d", n_done, n_mep, n_pf, n_dest, n_to, n_alarm);
    end
    $display("words=%0d meps=%0d closes: full=%0d dest=%0d timeout=%0d alarm_clocks=%0d", n_words, n_mep, n_pf, n_dest, n_to, n_alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
