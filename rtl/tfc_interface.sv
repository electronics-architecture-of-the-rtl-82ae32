// tfc_interface: the TFC Interface board's decoding and relaying logic. It
// sits between the Super-ODIN TFC master and the FE and BE boards of one
// crate.
//
// Each crossing (bx_en) it takes the 44-bit TFC word of the master and
// relays a subset of it: the 24-bit word for the FE (BID, calibration type,
// BX veto, NZS, data force, FE reset, BID reset, reserved bits zero) and, for
// the BE boards, the BE and Event-ID resets and the interaction-trigger
// decision. The master sends the decision of crossing b in the word of the
// later crossing b+TRIG_LAT, at this fixed offset; this block undoes the
// offset, so the decision reaches the BE with BID b (mod 3564) together with
// the MEP destination and trigger type it travelled with. Decisions are
// relayed only from crossing 0 after the first BID reset onwards, so no
// decision refers to a crossing before the system was synchronised (own
// choice). In the other direction it ORs the throttle bits of its NBE boards
// into one throttle for the master. All outputs are registered; be_trig_valid,
// be_reset and eid_reset are one-clock pulses.
//
// Constant outputs: the 3-bit reserve field of the FE word (Table 4) is
// always 0.
module tfc_interface
  import lhcb_pkg::*;
#(
  parameter int TRIG_LAT = 4,
  parameter int NBE      = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bx_en,
  input  tfc_info_t       tfc_info,
  output tfc_fe_word_t    fe_word,
  output logic            be_trig_valid,
  output trig_decision_t  be_trig,
  output logic            be_reset,
  output logic            eid_reset,
  input  logic [THR_W-1:0] be_throttle [NBE],
  output logic            throttle
);
  localparam int KW = $clog2(TRIG_LAT + 1);

  logic          started;
  logic [KW-1:0] k;
  logic [11:0]   bid_corr;
  logic          thr_or;

  always_comb begin
    bid_corr = (tfc_info.bid >= 12'(TRIG_LAT)) ? tfc_info.bid - 12'(TRIG_LAT)
                                              : tfc_info.bid + 12'(ORBIT_BX - TRIG_LAT);
    thr_or = 1'b0;
    for (int i = 0; i < NBE; i++) thr_or |= be_throttle[i][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_word <= '0; be_trig_valid <= 1'b0; be_trig <= '0; be_reset <= 1'b0;
      eid_reset <= 1'b0; throttle <= 1'b0; started <= 1'b0; k <= '0;
    end else begin
      throttle      <= thr_or;
      be_trig_valid <= 1'b0;
      be_reset      <= 1'b0;
      eid_reset     <= 1'b0;
      if (bx_en) begin
        fe_word.bid        <= tfc_info.bid;
        fe_word.reserve    <= '0;
        fe_word.calib_type <= tfc_info.calib_type;
        fe_word.bx_veto    <= tfc_info.bx_veto;
        fe_word.nzs        <= tfc_info.nzs;
        fe_word.data_force <= tfc_info.data_force;
        fe_word.fe_reset   <= tfc_info.fe_reset;
        fe_word.bid_reset  <= tfc_info.bid_reset;
        be_reset  <= tfc_info.be_reset;
        eid_reset <= tfc_info.eid_reset;
        if (tfc_info.bid_reset && !started) begin
          started <= 1'b1;
          k       <= '0;
        end else if (started && k != KW'(TRIG_LAT)) begin
          k <= k + 1'b1;
        end
        if (started && k == KW'(TRIG_LAT)) begin
          be_trig_valid      <= 1'b1;
          be_trig.bid        <= bid_corr;
          be_trig.accept     <= tfc_info.trigger;
          be_trig.mep_dest   <= tfc_info.mep_dest;
          be_trig.trig_type  <= tfc_info.trig_type;
        end
      end
    end
  end
endmodule
