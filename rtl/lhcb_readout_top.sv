// lhcb_readout_top: one slice of the trigger-less readout: NMASTER TFC
// masters behind the partitioning switch, a TFC interface, NLINK front-end
// chips and the BE board that reads them.
//
// The slice is one sub-system; part_sel chooses which master drives it
// (global running or a local partition), and each master has its own run
// enable. The eight masters follow the architecture's block diagram; sharing
// their trigger, farm and command inputs is this design's simplification.
// Every crossing the selected TFC master issues a TFC word (BID, resets, BX veto,
// NZS, calibration, interaction-trigger decision and MEP destination). The
// TFC interface turns it into the 24-bit FE word, which leaves the slice on
// fe_tfc_word_o for the GBT downlinks and comes back on fe_tfc_word_i, and
// into trigger decisions for the BE board. Each FE chip zero-suppresses its
// hits, buffers them and packs them into 80-bit GBT frames (fe_tx_data_o,
// fe_tx_en_o); the GBT uplinks bring them back on be_frame_i. The BE board
// matches packets with decisions by bunch count, builds events and sends
// multi-event packets on the daq_* stream; its throttle goes back through the
// TFC interface to the master. Every master keeps its own event data bank;
// for every event it accepts, the selected master's bank (run, orbit and event numbers, universal time,
// trigger source) leaves on bank_*_o towards the farm. The GBT links are outside the slice, so a link
// model or real transceivers connect the ports.
// Clocking: one clock. FE chips and TFC logic work once per crossing, on
// bx_en_o, which is high one clock in CLK_PER_BX; the BE board works every
// clock (a BE clock of CLK_PER_BX times the 40 MHz crossing rate).
//
// Constant outputs: the FE word's reserve field (3 bits) and the upper two
// trigger-type bits of the TFC word are always 0 (see tfc_interface and
// tfc_master).
module lhcb_readout_top
  import lhcb_pkg::*;
#(
  parameter int NLINK      = 3,
  parameter int NCH        = 32,
  parameter int CLK_PER_BX = 4,
  parameter int NMASTER    = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               bx_en_o,
  // TFC master control and sub-triggers
  input  logic [NMASTER-1:0] run,
  input  logic [$clog2(NMASTER)-1:0] part_sel,
  input  logic               trig_ecal,
  input  logic               trig_hcal,
  input  logic               trig_muon,
  input  logic               farm_req_valid,
  input  logic [DEST_W-1:0]  farm_req_node,
  input  logic               calib_en,
  input  logic [11:0]        calib_bx,
  input  logic [3:0]         calib_type,
  input  logic               nzs_req,
  input  logic               special_dest_en,
  input  logic [DEST_W-1:0]  special_dest,
  input  logic               eid_reset_req,
  input  logic               be_reset_req,
  output tfc_info_t          tfc_info_o,
  output logic               throttle_o,
  // event data bank of the master driving this slice
  input  logic [NMASTER-1:0] local_run,
  input  logic [31:0]        run_number,
  input  logic [31:0]        utc,
  output logic               bank_valid_o,
  output logic [4:0][31:0]   bank_o,
  output logic [2:0]         bank_len_o,
  // front end
  input  logic [NCH-1:0]     hits [NLINK],
  output tfc_fe_word_t       fe_tfc_word_o,
  input  tfc_fe_word_t       fe_tfc_word_i [NLINK],
  input  logic [NLINK-1:0]   gbt_ready,
  output logic [GBT_D_W-1:0] fe_tx_data_o [NLINK],
  output logic [NLINK-1:0]   fe_tx_en_o,
  output logic [NLINK-1:0]   calib_pulse_o,
  input  logic [NLINK-1:0]   cfg_wr,
  input  logic [2:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata [NLINK],
  // back end
  input  logic [GBT_D_W-1:0] be_frame_i [NLINK],
  input  logic [NLINK-1:0]   be_frame_valid_i,
  output logic               daq_valid,
  output logic [63:0]        daq_data,
  output logic               daq_sop,
  output logic               daq_eop,
  input  logic               daq_ready,
  input  logic               datagen_en,
  input  logic               spy_arm,
  input  logic [6:0]         spy_rd_addr,
  output logic [63:0]        spy_rd_data,
  output logic               spy_done,
  output logic [7:0]         spy_nwords,
  input  logic               cnt_latch,
  input  logic               cnt_clear,
  input  logic [2:0]         cnt_addr,
  input  logic               cnt_shadow,
  output logic [31:0]        cnt_data
);
  localparam int TRIG_LAT = 4;

  logic [$clog2(CLK_PER_BX+1)-1:0] div;
  logic bx_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   div <= '0;
    else if (32'(div) == CLK_PER_BX - 1)          div <= '0;
    else                                          div <= div + 1'b1;
  end
  assign bx_en   = (div == '0);
  assign bx_en_o = bx_en;

  logic           tfc_thr;
  logic           be_trig_valid, be_reset, eid_reset;
  trig_decision_t be_trig;
  logic [THR_W-1:0] thr_word [1];
  tfc_info_t        m_info [NMASTER];
  logic [2:0]       m_src [NMASTER];
  logic [NMASTER-1:0] b_valid;
  logic [4:0][31:0] b_data [NMASTER];
  logic [2:0]       b_len [NMASTER];
  logic [NMASTER-1:0] m_thr;
  tfc_info_t        link_info [1];
  logic [$clog2(NMASTER)-1:0] sw_sel [1];

  // independent TFC masters; they share the sub-trigger, farm and command
  // inputs, and each has its own run enable
  for (genvar m = 0; m < NMASTER; m++) begin : g_master
    tfc_master #(.TRIG_LAT(TRIG_LAT)) u_master (
      .clk, .rst_n, .bx_en, .run(run[m]), .trig_ecal, .trig_hcal, .trig_muon, .throttle(m_thr[m]),
      .farm_req_valid, .farm_req_node, .calib_en, .calib_bx, .calib_type, .nzs_req,
      .special_dest_en, .special_dest, .eid_reset_req, .be_reset_req, .tfc_info(m_info[m]),
      .trig_src(m_src[m]), .n_accept(), .n_blocked());
  end

  // an event data bank per master; the slice brings out that of the master
  // driving it
  for (genvar m = 0; m < NMASTER; m++) begin : g_bank
    tfc_event_bank #(.TRIG_LAT(TRIG_LAT)) u_bank (
      .clk, .rst_n, .bx_en, .tfc_info(m_info[m]), .trig_src(m_src[m]), .local_run(local_run[m]),
      .run_number, .utc, .bank_valid(b_valid[m]), .bank(b_data[m]), .bank_len(b_len[m]));
  end
  assign bank_valid_o = b_valid[part_sel];
  assign bank_o       = b_data[part_sel];
  assign bank_len_o   = b_len[part_sel];

  // partitioning: this slice is one sub-system, driven by master part_sel
  assign sw_sel[0] = part_sel;
  tfc_switch #(.NMASTER(NMASTER), .NLINK(1)) u_switch (
    .clk, .rst_n, .bx_en, .master_info(m_info), .master_throttle(m_thr), .sel(sw_sel),
    .link_info, .link_throttle(tfc_thr));
  assign tfc_info_o = link_info[0];

  tfc_interface #(.TRIG_LAT(TRIG_LAT), .NBE(1)) u_tfcif (
    .clk, .rst_n, .bx_en, .tfc_info(link_info[0]), .fe_word(fe_tfc_word_o),
    .be_trig_valid, .be_trig, .be_reset, .eid_reset, .be_throttle(thr_word), .throttle(tfc_thr));

  assign throttle_o = tfc_thr;

  for (genvar l = 0; l < NLINK; l++) begin : g_fe
    fe_chip #(.NCH(NCH)) u_fe (
      .clk, .rst_n, .bx_en, .hits(hits[l]), .tfc_word(fe_tfc_word_i[l]), .gbt_ready(gbt_ready[l]),
      .cfg_wr(cfg_wr[l]), .cfg_addr, .cfg_wdata, .cfg_rdata(cfg_rdata[l]),
      .tx_data(fe_tx_data_o[l]), .tx_en(fe_tx_en_o[l]), .calib_pulse(calib_pulse_o[l]),
      .calib_type(), .bcnt(), .truncating(), .tmr_err());
  end

  be_module #(.NLINK(NLINK)) u_be (
    .clk, .rst_n, .frame_valid(be_frame_valid_i), .frame(be_frame_i),
    .trig_valid(be_trig_valid), .trig(be_trig), .eid_reset, .be_reset,
    .daq_valid, .daq_data, .daq_sop, .daq_eop, .daq_ready,
    .throttle_word(thr_word[0]), .throttle(), .datagen_en, .spy_arm, .spy_rd_addr,
    .spy_rd_data, .spy_done, .spy_nwords, .cnt_latch, .cnt_clear, .cnt_addr, .cnt_shadow,
    .cnt_data, .eid());
endmodule
