// tb_be_throttle: self-checking test of the BE throttle generator. Random
// alarm patterns and BIDs are applied; one clock later the throttle flag must
// be the OR of the alarms and the throttle word must carry the alarm sources,
// the last valid BID and the flag; the throttled-clock counter must match.
module tb_be_throttle;
  import lhcb_pkg::*;
  localparam int NA = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NA-1:0] alarms;
  logic last_bid_valid, throttle;
  logic [11:0] last_bid, bidm;
  logic [THR_W-1:0] throttle_word;
  logic [31:0] throttled_cycles;

  be_throttle #(.NALARM(NA)) dut (.clk, .rst_n, .alarms, .last_bid_valid, .last_bid,
    .throttle_word, .throttle, .throttled_cycles);

  int checks = 0, failures = 0, n_thr = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NA-1:0] a;
    alarms = '0; last_bid_valid = 0; last_bid = '0; bidm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      a = ($urandom_range(0, 3) == 0) ? NA'($urandom) : '0;
      alarms = a;
      last_bid_valid = ($urandom_range(0, 1) == 0);
      last_bid = 12'($urandom_range(0, ORBIT_BX - 1));
      if (last_bid_valid) bidm = last_bid;
      @(negedge clk);
      checks++;
      if (throttle != |a || throttle_word !== THR_W'({a, bidm, |a})) begin
        failures++;
        if (failures < 10) $display("FAIL word %h flag %b alarms %b t=%0t", throttle_word, throttle, a, $time);
      end
      if (|a) n_thr++;
      alarms = '0; last_bid_valid = 0;
    end
    @(negedge clk);
    checks++;
    if (throttled_cycles != 32'(n_thr) || n_thr == 0) begin
      failures++; $display("FAIL cycles %0d expected %0d", throttled_cycles, n_thr);
    end
    $display("throttled=%0d", n_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
