// tb_bx_counter: self-checking test of bx_counter at the full 3564-crossing
// orbit. Crossing strobes come on random clocks; Bcnt resets with random
// offsets (some beyond the orbit) arrive now and then. A reference counter
// in the testbench predicts every value, including the wrap to 0.
module tb_bx_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0, loads = 0;

  logic bx_en, bcnt_reset;
  logic [11:0] offset, bcnt;
  int exp_cnt;

  bx_counter dut (.clk, .rst_n, .bx_en, .bcnt_reset, .offset, .bcnt);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_en = 0; bcnt_reset = 0; offset = 0; exp_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      bx_en      = ($urandom_range(0, 3) != 0);
      bcnt_reset = ($urandom_range(0, 4000) == 0);
      offset     = 12'($urandom_range(0, 4095));
      @(posedge clk); #1;
      if (bx_en) begin
        if (bcnt_reset) begin exp_cnt = offset % 3564; loads++; end
        else if (exp_cnt == 3563) begin exp_cnt = 0; wraps++; end
        else exp_cnt++;
      end
      checks++;
      if (bcnt != 12'(exp_cnt)) begin
        failures++;
        if (failures < 10) $display("FAIL bcnt=%0d expected %0d", bcnt, exp_cnt);
      end
    end
    checks++; if (wraps < 2) begin failures++; $display("FAIL too few wraps"); end
    $display("wraps=%0d loads=%0d", wraps, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
