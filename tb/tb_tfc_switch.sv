// tb_tfc_switch: self-checking test of the partitioning switch. Six masters
// (so that a 3-bit selection can point past the last one) send random words
// every crossing; the link selections are changed at random (some out of
// range). One crossing later each link must carry the
// word of its selected master (or zeros), and each master's throttle must be
// the OR of the throttles of the links assigned to it.
module tb_tfc_switch;
  import lhcb_pkg::*;
  localparam int NM = 6, NL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bx_en;
  tfc_info_t master_info [NM];
  logic [NM-1:0] master_throttle;
  logic [2:0] sel [NL];
  tfc_info_t link_info [NL];
  logic [NL-1:0] link_throttle;

  tfc_switch #(.NMASTER(NM), .NLINK(NL)) dut (.clk, .rst_n, .bx_en, .master_info, .master_throttle, .sel,
    .link_info, .link_throttle);

  int checks = 0, failures = 0, n_off = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tfc_info_t exp [NL];
    logic [NM-1:0] et;
    bx_en = 0; link_throttle = '0;
    for (int m = 0; m < NM; m++) master_info[m] = '0;
    for (int l = 0; l < NL; l++) sel[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) master_info[m] = tfc_info_t'({$urandom, $urandom});
      if ($urandom_range(0, 9) == 0) for (int l = 0; l < NL; l++) sel[l] = 3'($urandom);
      link_throttle = NL'($urandom);
      for (int l = 0; l < NL; l++) if (sel[l] >= NM) n_off++;
      et = '0;
      for (int l = 0; l < NL; l++) begin
        exp[l] = (sel[l] < NM) ? master_info[sel[l]] : '0;
        if (link_throttle[l] && sel[l] < NM) et[sel[l]] = 1'b1;
      end
      #1 checks++;
      if (master_throttle !== et) begin failures++; $display("FAIL throttle %b expected %b", master_throttle, et); end
      bx_en = 1;
      @(negedge clk); bx_en = 0;
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (link_info[l] !== exp[l]) begin failures++; if (failures < 10) $display("FAIL link %0d", l); end
      end
      // words must hold between crossings
      for (int m = 0; m < NM; m++) master_info[m] = '0;
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (link_info[l] !== exp[l]) begin failures++; if (failures < 10) $display("FAIL hold link %0d", l); end
      end
    end
    checks++;
    if (n_off == 0) begin failures++; $display("FAIL no out-of-range selection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
