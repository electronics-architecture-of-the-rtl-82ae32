// tfc_event_bank: the event-identity data bank that a TFC Master sends to the
// event filter farm with every accepted event. It watches the master's TFC
// word and, for each word carrying an accepted trigger, emits one bank.
//
// The architecture asks for a bank per event with the run number, orbit
// number, event number, universal time and trigger source, and allows a
// reduced bank for local sub-detector runs to save bandwidth. The field
// widths, the word order and the content of the reduced bank are this
// design's own choices:
//   word 0  event number (accepts since the last Event-ID reset; its low
//           bits equal the Event-ID the BE boards give the same event)
//   word 1  {BID of the triggered crossing, trigger type, trig_src, 13'b0}
//   word 2  run number (from the run control)
//   word 3  orbit number (orbits since reset, counted on the BID reset)
//   word 4  universal time (from an external time source, sampled)
// The reduced bank (local = 1) carries words 0 and 1 only; bank_len gives
// the number of valid 32-bit words. trig_src is the {ECAL, HCAL, MUON}
// sub-trigger decisions behind the accept, from the master.
// The decision in a TFC word refers to the crossing TRIG_LAT earlier, so the
// BID is corrected modulo the orbit, and when that crossing lies in the
// previous orbit the orbit number is taken one lower.
// Timing: the TFC word is sampled on bx_en; the bank appears registered with
// bank_valid high for one clock.
//
// Constant outputs: the low 13 bits of word 1 are padding and always 0.
module tfc_event_bank
  import lhcb_pkg::*;
#(
  parameter int ORBIT_BX = 3564,
  parameter int TRIG_LAT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bx_en,
  input  tfc_info_t        tfc_info,
  input  logic [2:0]       trig_src,
  input  logic             local_run,
  input  logic [31:0]      run_number,
  input  logic [31:0]      utc,
  output logic             bank_valid,
  output logic [4:0][31:0] bank,
  output logic [2:0]       bank_len
);
  logic [31:0] orbit, event_no, ev_no, ev_orbit;
  logic [11:0] ev_bid;
  logic        prev_orbit;

  always_comb begin
    prev_orbit = tfc_info.bid < 12'(TRIG_LAT);
    ev_bid     = prev_orbit ? tfc_info.bid + 12'(ORBIT_BX - TRIG_LAT)
                            : tfc_info.bid - 12'(TRIG_LAT);
    ev_orbit   = (prev_orbit && orbit != 0) ? orbit - 1'b1 : orbit;
    ev_no      = tfc_info.eid_reset ? 32'd0 : event_no;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orbit <= '0; event_no <= '0;
      bank_valid <= 1'b0; bank <= '0; bank_len <= '0;
    end else begin
      bank_valid <= 1'b0;
      if (bx_en) begin
        if (tfc_info.bid_reset) orbit <= orbit + 1'b1;
        event_no <= ev_no + 32'(tfc_info.trigger);
        if (tfc_info.trigger) begin
          bank_valid <= 1'b1;
          bank[0]    <= ev_no;
          bank[1]    <= {ev_bid, tfc_info.trig_type, trig_src, 13'd0};
          bank[2]    <= local_run ? 32'd0 : run_number;
          bank[3]    <= local_run ? 32'd0 : ev_orbit;
          bank[4]    <= local_run ? 32'd0 : utc;
          bank_len   <= local_run ? 3'd2 : 3'd5;
        end
      end
    end
  end
endmodule
