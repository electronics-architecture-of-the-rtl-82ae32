// be_throttle: throttle source of a BE board.
//
// Every buffer of the board signals an alarm when it is close to full; any of
// them asserts the throttle, which travels back to the TFC system and stops
// the interaction trigger. The architecture describes the word sent as a
// local throttle bit plus the bunch identifier of the last event, in fewer
// than 20 bits. This design's 19-bit word: [0] throttle, [12:1] BID of the
// last accepted event, [18:13] which alarms are active. The word is
// registered; throttled_cycles counts clocks with the throttle set, for
// monitoring.
module be_throttle
  import lhcb_pkg::*;
#(
  parameter int NALARM = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NALARM-1:0] alarms,
  input  logic              last_bid_valid,
  input  logic [11:0]       last_bid,
  output logic [THR_W-1:0]  throttle_word,
  output logic              throttle,
  output logic [31:0]       throttled_cycles
);
  initial assert (NALARM <= THR_W - 13) else $error("be_throttle: too many alarm sources");

  logic [11:0] bid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bid_q <= '0; throttle_word <= '0; throttle <= 1'b0; throttled_cycles <= '0;
    end else begin
      if (last_bid_valid) bid_q <= last_bid;
      throttle      <= |alarms;
      throttle_word <= THR_W'({alarms, (last_bid_valid ? last_bid : bid_q), |alarms});
      if (throttle) throttled_cycles <= throttled_cycles + 1'b1;
    end
  end
endmodule
