// tfc_master: one TFC Master of the Super-ODIN readout supervisor. It makes
// the 44-bit TFC word sent every crossing to the TFC Interfaces.
//
// Bunch identifier: BID counts 0..ORBIT_BX-1. The word of the last crossing
// of the orbit carries the BID reset and the FE reset, so that every counter
// restarts at 0 together with the master and the FE buffers are cleared after
// the empty gap has let them drain.
// BX veto (filling scheme): the last EMPTY_BX crossings of the orbit carry no
// collisions and are vetoed, so the FE sends headers only; all other bunches
// are taken as filled (the real filling scheme table is not modelled).
// Interaction trigger: the ECAL, HCAL and MUON sub-trigger decisions arrive
// LAT_ECAL, LAT_HCAL and LAT_MUON crossings after their crossing; each is
// delayed to the common latency TRIG_LAT and the final decision (their OR) for
// crossing b is sent in the word of crossing b+TRIG_LAT.
// Forced triggers: with calib_en, crossing calib_bx of every orbit gets the
// calibration type and data force (overriding the veto) and is accepted
// whatever the sub-triggers say. nzs_req schedules an NZS readout at the next
// filled crossing, which is accepted, and vetoes the following NZS_SPAN-1
// crossings so the large event has the link to itself.
// Rate control: a throttle from the BE, or no MEP destination, turns every
// accept into a reject. Farm nodes declare themselves ready through
// farm_req_valid/farm_req_node (queued in RQ_DEPTH entries); each request
// serves as the MEP destination of PF accepted events. With special_dest_en,
// forced (calibration and NZS) accepts go to special_dest instead and use up
// no farm request.
// trig_src gives, with an accept, which of {ECAL, HCAL, MUON} fired for it
// (for the event data bank); it is 0 otherwise.
// Trigger types: 0 physics, 1 calibration, 2 NZS. The OR, the type codes
// and the one-request-per-MEP rule are this design's choices.
// Timing: all state advances on bx_en; tfc_info is registered.
//
// Constant outputs: only trigger types 0..2 are used, so bits 3:2 of the
// trigger-type field are always 0.
module tfc_master
  import lhcb_pkg::*;
#(
  parameter int ORBIT_BX = 3564,
  parameter int EMPTY_BX = 119,
  parameter int TRIG_LAT = 4,
  parameter int LAT_ECAL = 2,
  parameter int LAT_HCAL = 3,
  parameter int LAT_MUON = 4,
  parameter int PF       = 8,
  parameter int NZS_SPAN = 4,
  parameter int RQ_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bx_en,
  input  logic              run,
  input  logic              trig_ecal,
  input  logic              trig_hcal,
  input  logic              trig_muon,
  input  logic              throttle,
  input  logic              farm_req_valid,
  input  logic [DEST_W-1:0] farm_req_node,
  input  logic              calib_en,
  input  logic [11:0]       calib_bx,
  input  logic [3:0]        calib_type,
  input  logic              nzs_req,
  input  logic              special_dest_en,
  input  logic [DEST_W-1:0] special_dest,
  input  logic              eid_reset_req,
  input  logic              be_reset_req,
  output tfc_info_t         tfc_info,
  output logic [2:0]        trig_src,
  output logic [31:0]       n_accept,
  output logic [31:0]       n_blocked
);
  initial assert (LAT_ECAL <= TRIG_LAT && LAT_HCAL <= TRIG_LAT && LAT_MUON <= TRIG_LAT && TRIG_LAT >= 1)
    else $error("tfc_master: sub-trigger latency above TRIG_LAT");

  typedef struct packed {
    logic veto;   // crossing had no collisions (or was vetoed for NZS)
    logic calib;  // forced calibration trigger
    logic nzs;    // forced NZS readout
  } bx_flags_t;

  logic [11:0]  bid;
  logic [TRIG_LAT:1] sh_e, sh_h, sh_m;   // [i] = input of i crossings ago
  logic [TRIG_LAT:0] e_all, h_all, m_all; // with [0] = this crossing's input
  bx_flags_t    hist [1:TRIG_LAT];       // [i] = flags of i crossings ago
  bx_flags_t    now_f, past;
  logic         gap, calib_now, nzs_now, nzs_pending, span_veto;
  logic [$clog2(NZS_SPAN+1)-1:0] span;
  logic         phys, forced, want, accept;
  logic [2:0]   src;
  logic         to_spec;

  // farm request queue and current destination
  localparam int QW = $clog2(RQ_DEPTH);
  logic [DEST_W-1:0] rq [RQ_DEPTH];
  logic [QW:0]       rq_wp, rq_rp;
  logic              rq_empty, rq_full, dest_valid, refill;
  logic [DEST_W-1:0] dest;
  logic [$clog2(PF+1)-1:0] ev_cnt;

  always_comb begin
    gap       = bid >= 12'(ORBIT_BX - EMPTY_BX);
    calib_now = calib_en && (bid == calib_bx);
    nzs_now   = (nzs_pending || nzs_req) && !gap && (span == 0) && !calib_now;
    span_veto = (span != 0);
    now_f.veto  = gap || span_veto;
    now_f.calib = calib_now;
    now_f.nzs   = nzs_now;
    e_all   = {sh_e, trig_ecal};
    h_all   = {sh_h, trig_hcal};
    m_all   = {sh_m, trig_muon};
    past    = hist[TRIG_LAT];
    src     = {e_all[TRIG_LAT - LAT_ECAL], h_all[TRIG_LAT - LAT_HCAL], m_all[TRIG_LAT - LAT_MUON]};
    phys    = |src;
    forced  = past.calib || past.nzs;
    want    = run && (forced || (phys && !past.veto));
    to_spec = forced && special_dest_en;
    accept  = want && !throttle && (dest_valid || to_spec);
    rq_empty = (rq_wp == rq_rp);
    rq_full  = (rq_wp[QW-1:0] == rq_rp[QW-1:0]) && (rq_wp[QW] != rq_rp[QW]);
    refill   = !dest_valid && !rq_empty;
  end

  always_ff @(posedge clk) begin
    if (farm_req_valid && !rq_full) rq[rq_wp[QW-1:0]] <= farm_req_node;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bid <= '0; tfc_info <= '0; trig_src <= '0; nzs_pending <= 1'b0; span <= '0;
      sh_e <= '0; sh_h <= '0; sh_m <= '0;
      for (int i = 1; i <= TRIG_LAT; i++) hist[i] <= '0;
      rq_wp <= '0; rq_rp <= '0; dest_valid <= 1'b0; dest <= '0; ev_cnt <= '0;
      n_accept <= '0; n_blocked <= '0;
    end else begin
      if (farm_req_valid && !rq_full) rq_wp <= rq_wp + 1'b1;
      if (refill) begin
        rq_rp      <= rq_rp + 1'b1;
        dest       <= rq[rq_rp[QW-1:0]];
        dest_valid <= 1'b1;
        ev_cnt     <= '0;
      end
      if (nzs_req) nzs_pending <= 1'b1;
      if (bx_en) begin
        bid <= (bid == 12'(ORBIT_BX - 1)) ? 12'd0 : bid + 1'b1;
        sh_e    <= e_all[TRIG_LAT-1:0];
        sh_h    <= h_all[TRIG_LAT-1:0];
        sh_m    <= m_all[TRIG_LAT-1:0];
        hist[1] <= now_f;
        for (int i = 2; i <= TRIG_LAT; i++) hist[i] <= hist[i-1];
        if (nzs_now) begin
          nzs_pending <= 1'b0;
          span        <= $bits(span)'(NZS_SPAN - 1);
        end else if (span != 0) begin
          span <= span - 1'b1;
        end
        tfc_info.bid        <= bid;
        tfc_info.mep_dest   <= to_spec ? special_dest : dest;
        tfc_info.trig_type  <= past.calib ? TT_CALIB : (past.nzs ? TT_NZS : TT_PHYSICS);
        tfc_info.calib_type <= calib_now ? calib_type : 4'd0;
        tfc_info.trigger    <= accept;
        trig_src            <= accept ? src : 3'd0;
        tfc_info.bx_veto    <= now_f.veto;
        tfc_info.nzs        <= nzs_now;
        tfc_info.data_force <= calib_now;
        tfc_info.be_reset   <= be_reset_req;
        tfc_info.fe_reset   <= (bid == 12'(ORBIT_BX - 1));
        tfc_info.eid_reset  <= eid_reset_req;
        tfc_info.bid_reset  <= (bid == 12'(ORBIT_BX - 1));
        if (accept) n_accept <= n_accept + 1'b1;
        if (accept && !to_spec) begin
          if (32'(ev_cnt) == PF - 1) dest_valid <= 1'b0;
          else                       ev_cnt <= ev_cnt + 1'b1;
        end
        if (want && !accept) n_blocked <= n_blocked + 1'b1;
      end
    end
  end
endmodule
