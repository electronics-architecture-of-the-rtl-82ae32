// tb_counter_snapshot: self-checking test of the monitoring counters with a
// synchronous snapshot. Random increments are applied to all counters; at
// random times all of them are latched together, and the shadow copies must
// equal a reference taken in the same clock while the live counters keep
// counting; a clear must zero the live counters and leave the shadows.
module tb_counter_snapshot;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] inc;
  logic latch, clear, rd_shadow;
  logic [2:0] rd_addr;
  logic [31:0] rd_data;

  counter_snapshot #(.N(N)) dut (.clk, .rst_n, .inc, .latch, .clear, .rd_addr, .rd_shadow, .rd_data);

  int checks = 0, failures = 0, n_latch = 0;
  int unsigned ref_m [N], ref_s [N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = '0; latch = 0; clear = 0; rd_shadow = 0; rd_addr = 0;
    for (int i = 0; i < N; i++) begin ref_m[i] = 0; ref_s[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      inc = N'($urandom);
      latch = ($urandom_range(0, 499) == 0);
      clear = ($urandom_range(0, 4999) == 0);
      for (int i = 0; i < N; i++) begin
        if (latch) ref_s[i] = ref_m[i];
        if (clear) ref_m[i] = 0; else if (inc[i]) ref_m[i]++;
      end
      if (latch) n_latch++;
      @(posedge clk);
      #1 inc = '0; latch = 0; clear = 0;
      rd_addr = 3'($urandom_range(0, N - 1));
      rd_shadow = 1;
      #1 checks++;
      if (rd_data != ref_s[rd_addr]) begin
        failures++; if (failures < 10) $display("FAIL shadow %0d = %0d expected %0d", rd_addr, rd_data, ref_s[rd_addr]);
      end
      rd_shadow = 0;
      #1 checks++;
      if (rd_data != ref_m[rd_addr]) begin
        failures++; if (failures < 10) $display("FAIL live %0d = %0d expected %0d", rd_addr, rd_data, ref_m[rd_addr]);
      end
    end
    checks++;
    if (n_latch == 0) begin failures++; $display("FAIL no latch"); end
    $display("latches=%0d", n_latch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
