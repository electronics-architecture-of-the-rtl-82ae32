// tb_fe_config: self-checking test of the FE register bank. Writes random
// values to every register, reads them back, checks the decoded outputs and
// the read-only status register, and checks the reset values.
module tb_fe_config;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en; logic [2:0] addr; logic [31:0] wdata, rdata;
  logic [15:0] stat_trunc, stat_lost, buf_hi, buf_lo;
  logic [31:0] chan_mask; logic [11:0] bcnt_offset; logic nzs_mode, pattern_mode;

  fe_config #(.NCH(32)) dut (.clk, .rst_n, .wr_en, .addr, .wdata, .rdata, .stat_trunc, .stat_lost,
    .chan_mask, .bcnt_offset, .nzs_mode, .pattern_mode, .buf_hi, .buf_lo);

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v [4];
    wr_en = 0; addr = 0; wdata = 0; stat_trunc = 16'h1234; stat_lost = 16'h00ab;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(buf_hi, 600, "reset hi"); chk(buf_lo, 200, "reset lo"); chk(chan_mask, 0, "reset mask");
    for (int round = 0; round < 20; round++) begin
      for (int a = 0; a < 4; a++) begin
        v[a] = $urandom;
        @(negedge clk); wr_en = 1; addr = 3'(a); wdata = v[a];
        @(negedge clk); wr_en = 0;
      end
      addr = 0; #1 chk(rdata, v[0], "rd mask");
      addr = 1; #1 chk(rdata, {20'b0, v[1][11:0]}, "rd offset");
      addr = 2; #1 chk(rdata, {30'b0, v[2][1:0]}, "rd control");
      addr = 3; #1 chk(rdata, v[3], "rd thresholds");
      addr = 4; #1 chk(rdata, {stat_lost, stat_trunc}, "rd status");
      chk(chan_mask, v[0], "mask out"); chk(32'(bcnt_offset), 32'(v[1][11:0]), "offset out");
      chk(32'(nzs_mode), 32'(v[2][0]), "nzs out"); chk(32'(pattern_mode), 32'(v[2][1]), "pattern out");
      chk(32'(buf_hi), 32'(v[3][15:0]), "hi out"); chk(32'(buf_lo), 32'(v[3][31:16]), "lo out");
      // a write to the status register changes nothing
      @(negedge clk); wr_en = 1; addr = 4; wdata = 32'hffffffff;
      @(negedge clk); wr_en = 0;
      chk(chan_mask, v[0], "mask kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
