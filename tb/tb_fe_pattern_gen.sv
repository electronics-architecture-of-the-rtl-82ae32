// tb_fe_pattern_gen: self-checking test of the FE test-pattern generator.
// Each crossing the frame must hold the Bcnt in [11:0], the frame count in
// [43:12] and their complement in [79:44]; an FE reset restarts the count.
module tb_fe_pattern_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic bx_en, fe_reset;
  logic [11:0] bcnt;
  logic [79:0] frame;
  int unsigned fc;

  fe_pattern_gen dut (.clk, .rst_n, .bx_en, .fe_reset, .bcnt, .frame);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_en = 0; fe_reset = 0; bcnt = 0; fc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      bx_en = ($urandom_range(0, 1) == 1);
      bcnt = 12'($urandom_range(0, 3563));
      fe_reset = (i == 1500);
      @(posedge clk); #1;
      if (bx_en) begin
        checks++;
        if (frame !== {~{fc[23:0], bcnt}, fc, bcnt}) begin
          failures++; if (failures < 10) $display("FAIL frame %h fc=%0d", frame, fc);
        end
        fc = fe_reset ? 0 : fc + 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
