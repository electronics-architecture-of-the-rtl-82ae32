// tb_mep_spy: self-checking test of the MEP spy buffer. A random stream of
// packets (sop/eop framed, random lengths, random gaps and back-pressure) is
// monitored. After each arm, the spy must hold the next NMEP complete packets
// starting at a sop, or stop at DEPTH words; the stored words and the word
// count are read back and compared with a reference capture. Both endings,
// packet count and buffer full, must occur.
module tb_mep_spy;
  localparam int D = 128, NM = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic arm, mon_valid, mon_ready, mon_sop, mon_eop, done;
  logic [63:0] mon_data, rd_data;
  logic [6:0] rd_addr;
  logic [7:0] nwords;

  mep_spy #(.DEPTH(D), .NMEP(NM)) dut (.clk, .rst_n, .arm, .mon_valid, .mon_ready, .mon_data, .mon_sop, .mon_eop,
    .rd_addr, .rd_data, .done, .nwords);

  int checks = 0, failures = 0, n_full = 0, n_cnt = 0;
  logic [63:0] cap[$];
  int state = 0, neop = 0;   // reference: 0 idle, 1 wait sop, 2 capture, 3 done
  bit streaming = 1;

  always @(posedge clk) if (rst_n && !arm && mon_valid && mon_ready) begin
    if (state == 1 && mon_sop) state = 2;
    if (state == 2) begin
      cap.push_back(mon_data);
      if (mon_eop) neop++;
      if (mon_eop && neop == NM) begin state = 3; n_cnt++; end
      else if (cap.size() == D) begin state = 3; n_full++; end
    end
  end

  // random packet source
  initial begin
    int len, w;
    mon_valid = 0; mon_sop = 0; mon_eop = 0; mon_data = '0; mon_ready = 0; w = 0;
    wait (rst_n);
    forever begin
      len = ($urandom_range(0, 3) == 0) ? $urandom_range(60, 150) : $urandom_range(1, 20);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin mon_valid = 0; mon_ready = 1; @(negedge clk); end
        mon_valid = 1; mon_sop = (i == 0); mon_eop = (i == len - 1); mon_data = {32'($urandom), 32'(w)}; w++;
        mon_ready = ($urandom_range(0, 3) != 0);
        while (!mon_ready) begin @(negedge clk); mon_ready = ($urandom_range(0, 3) != 0); end
      end
      @(negedge clk); mon_valid = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arm = 0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      repeat ($urandom_range(1, 50)) @(negedge clk);
      arm = 1; cap.delete(); neop = 0; state = 1;
      @(negedge clk); arm = 0;
      while (!done) @(negedge clk);
      checks++;
      if (state != 3 || nwords != 8'(cap.size())) begin
        failures++; $display("FAIL state %0d nwords %0d expected %0d", state, nwords, cap.size());
      end
      for (int i = 0; i < cap.size(); i++) begin
        rd_addr = 7'(i);
        #1 checks++;
        if (rd_data !== cap[i]) begin
          failures++; if (failures < 10) $display("FAIL word %0d %h expected %h", i, rd_data, cap[i]);
        end
      end
    end
    checks++;
    if (n_full == 0 || n_cnt == 0) begin failures++; $display("FAIL endings: full %0d count %0d", n_full, n_cnt); end
    $display("captures: by count=%0d by full=%0d", n_cnt, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
