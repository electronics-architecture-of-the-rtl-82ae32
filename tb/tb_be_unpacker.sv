// tb_be_unpacker: self-checking test of the BE data receiver. The testbench
// serialises random packets (consecutive Bcnt values, random lengths) into
// 80-bit frames exactly as the FE does, sends one frame per crossing (every
// fourth clock), with bursts of short packets that produce several packets
// per frame, and checks that the unpacker returns every packet unchanged and
// in order. A Bcnt jump is injected to check bcnt_err, a step to 0 must not
// raise it, and a frame sent into a full queue must raise overflow.
module tb_be_unpacker;
  import lhcb_pkg::*;
  import lhcb_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_pkt = 0, n_err = 0, n_ovf = 0, exp_err = 0;

  logic be_reset, frame_valid, pkt_valid, bcnt_err, overflow;
  logic [79:0] frame;
  fe_packet_t pkt;

  be_unpacker dut (.clk, .rst_n, .be_reset, .frame_valid, .frame, .pkt_valid, .pkt, .bcnt_err, .overflow);

  bit tx[$];
  fe_packet_t expq[$];
  int b;
  bit flood = 0;   // after the flood, packets are garbage and not checked

  always @(posedge clk) if (rst_n) begin
    if (pkt_valid && !flood) begin
      n_pkt++;
      checks++;
      if (expq.size() == 0 || pkt !== expq[0]) begin
        failures++; if (failures < 10) $display("FAIL got %h expected %h n=%0d t=%0t", pkt, expq.size() ? expq[0] : 0, n_pkt, $time);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (bcnt_err) n_err++;
    if (overflow) begin n_ovf++; if (n_ovf < 3) $display("ovf t=%0t", $time); end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    be_reset = 0; frame_valid = 0; frame = '0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < 8000; x++) begin
      fe_packet_t p;
      // one packet per crossing; short ones in bursts
      int np;
      np = (x % 400 < 40) ? 3 : 1;
      repeat (np) begin
        if (x == 3000) begin b = b + 5; exp_err++; end   // injected jump
        if (x == 5000) b = 0;                            // Bcnt reset: no error
        p = rnd_pkt(4'(b), (x % 400 < 40) ? 0 : 63);
        b = b + 1;
        push_pkt(tx, p);
        expq.push_back(p);
      end
      @(negedge clk);
      if (tx.size() >= 80) begin frame_valid = 1; frame = pop_frame(tx); end
      @(negedge clk); frame_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    checks++;
    if (expq.size() > 7) begin failures++; $display("FAIL %0d packets missing", expq.size()); end
    checks++;
    if (n_err != exp_err) begin failures++; $display("FAIL bcnt_err %0d expected %0d", n_err, exp_err); end
    // flood the frame queue: frames every clock overflow it
    flood = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); frame_valid = 1; frame = '0;
    end
    @(negedge clk); frame_valid = 0;
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow"); end
    $display("packets=%0d bcnt_err=%0d overflow=%0d", n_pkt, n_err, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
