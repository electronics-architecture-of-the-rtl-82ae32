// tb_daq_datagen: self-checking test of the DAQ data generator. With random
// back-pressure, the output must be complete MEPs of MEP_WORDS words with the
// expected header and body words and an incrementing sequence number; a MEP
// started must finish after enable drops, and none may start while disabled.
module tb_daq_datagen;
  localparam int MW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, daq_ready, daq_valid, daq_sop, daq_eop;
  logic [63:0] daq_data;

  daq_datagen #(.MEP_WORDS(MW)) dut (.clk, .rst_n, .enable, .daq_ready, .daq_valid, .daq_data, .daq_sop, .daq_eop);

  int checks = 0, failures = 0, idx = 0, seq = 0, n_mep = 0;
  bit in_mep = 0;

  always @(posedge clk) if (rst_n) begin
    if (!enable && !in_mep && daq_valid) begin
      checks++; failures++; $display("FAIL valid while disabled t=%0t", $time);
    end
    if (daq_valid && daq_ready) begin
      logic [63:0] e;
      e = (idx == 0) ? {8'hDA, 24'b0, 32'(seq)} : {32'(seq), 32'(idx)};
      checks++;
      if (daq_data !== e || daq_sop != (idx == 0) || daq_eop != (idx == MW - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL got %h expected %h idx %0d t=%0t", daq_data, e, idx, $time);
      end
      in_mep = (idx != MW - 1);
      if (idx == MW - 1) begin idx = 0; seq++; n_mep++; end else idx++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; daq_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      daq_ready = ($urandom_range(0, 3) != 0);
      if (i % 2000 == 0) enable = ~enable;
    end
    enable = 0; daq_ready = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (n_mep < 100 || in_mep) begin failures++; $display("FAIL meps %0d open %b", n_mep, in_mep); end
    $display("meps=%0d", n_mep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
