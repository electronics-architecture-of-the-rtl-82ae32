// tb_tmr_reg: self-checking test of tmr_reg. Random loads, and random
// single-copy upsets injected through seu_inj; the voted output must always
// equal the value a plain register would hold, and mismatch must show the
// upset for exactly the clock after it.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, upsets = 0;

  logic en, mismatch;
  logic [7:0] d, q, model;
  logic [2:0][7:0] seu_inj;
  logic injected;

  tmr_reg #(.W(8)) dut (.clk, .rst_n, .en, .d, .seu_inj, .q, .mismatch);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; d = 0; seu_inj = '0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1);
      d  = 8'($urandom);
      seu_inj = '0;
      injected = ($urandom_range(0, 3) == 0);
      if (injected) begin
        seu_inj[$urandom_range(0, 2)] = 8'(1 << $urandom_range(0, 7));
        upsets++;
      end
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin failures++; if (failures < 10) $display("FAIL q=%h model=%h", q, model); end
      checks++;
      if (mismatch !== injected) begin failures++; if (failures < 10) $display("FAIL mismatch=%b injected=%b", mismatch, injected); end
    end
    $display("upsets=%0d", upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
