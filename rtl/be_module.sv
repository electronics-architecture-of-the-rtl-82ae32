// be_module: one BE data board. It receives NLINK GBT links from the front
// end, selects crossings with the interaction trigger, builds events and sends
// multi-event packets to the DAQ.
//
// Per link: be_unpacker recovers the packets from the frames,
// be_input_buffer holds them (truncating headers-only when close to full) and
// be_trigger_match pairs them with the trigger decisions by Bcnt and tags
// accepted crossings with an Event-ID. Every decision from the TFC interface
// goes to the trigger buffer of every link. be_event_builder merges the links
// event by event and mep_builder formats MEPs into the transmit buffer. The DAQ
// output carries either the MEPs or, when datagen_en is set, the data
// generator's packets (switch only while the output is idle). mep_spy can
// capture MEPs from the output, counter_snapshot keeps the data-flow counters,
// and be_throttle ORs the input-buffer, trigger-buffer and transmit-buffer
// alarms into the throttle word for the TFC.
// Counters: 0 events built, 1 MEPs sent, 2 truncated packets, 3 trigger/data
// Bcnt mismatches or unequal Event-IDs between links, 4 Bcnt sequence errors, 5 lost packets or frames,
// 6 throttled clocks, 7 accepted decisions received.
// BE reset (from the TFC) clears the data path; ECS state is kept.
//
// Constant outputs: throttle_word is THR_W = 19 bits, of which 16 are used
// (3 alarms, BID, flag); bits 18:16 are 0 and kept for more alarm sources.
module be_module
  import lhcb_pkg::*;
#(
  parameter int NLINK = 3,
  parameter int PF    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NLINK-1:0]    frame_valid,
  input  logic [GBT_D_W-1:0]  frame [NLINK],
  input  logic                trig_valid,
  input  trig_decision_t      trig,
  input  logic                eid_reset,
  input  logic                be_reset,
  output logic                daq_valid,
  output logic [63:0]         daq_data,
  output logic                daq_sop,
  output logic                daq_eop,
  input  logic                daq_ready,
  output logic [THR_W-1:0]    throttle_word,
  output logic                throttle,
  input  logic                datagen_en,
  input  logic                spy_arm,
  input  logic [6:0]          spy_rd_addr,
  output logic [63:0]         spy_rd_data,
  output logic                spy_done,
  output logic [7:0]          spy_nwords,
  input  logic                cnt_latch,
  input  logic                cnt_clear,
  input  logic [2:0]          cnt_addr,
  input  logic                cnt_shadow,
  output logic [31:0]         cnt_data,
  output logic [EID_W-1:0]    eid
);
  logic [NLINK-1:0] u_valid, u_berr, u_ovf;
  fe_packet_t       u_pkt [NLINK];
  logic [NLINK-1:0] b_valid, b_ready, b_tevt, b_alarm, b_lost;
  fe_packet_t       b_pkt [NLINK];
  logic [NLINK-1:0] f_valid, f_ready, m_sync, m_tlost, m_alarm;
  fragment_t        f_frag [NLINK];
  logic [EID_W-1:0] m_eid [NLINK];

  logic       e_valid, e_ready, e_last, e_err;
  fragment_t  e_frag;
  logic [3:0] e_link;

  logic        m_valid, m_sop, m_eop, m_ready, mep_alarm, mep_done;
  logic [63:0] m_data;
  logic        g_valid, g_sop, g_eop;
  logic [63:0] g_data;

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    be_unpacker #(.FRAME_W(GBT_D_W)) u_unp (
      .clk, .rst_n, .be_reset, .frame_valid(frame_valid[l]), .frame(frame[l]),
      .pkt_valid(u_valid[l]), .pkt(u_pkt[l]), .bcnt_err(u_berr[l]), .overflow(u_ovf[l]));
    be_input_buffer u_ibuf (
      .clk, .rst_n, .be_reset, .wr_valid(u_valid[l]), .wr_pkt(u_pkt[l]),
      .rd_valid(b_valid[l]), .rd_ready(b_ready[l]), .rd_pkt(b_pkt[l]),
      .truncating(), .trunc_evt(b_tevt[l]), .alarm(b_alarm[l]), .lost(b_lost[l]));
    be_trigger_match u_tm (
      .clk, .rst_n, .be_reset, .eid_reset, .trig_valid, .trig,
      .pkt_valid(b_valid[l]), .pkt_ready(b_ready[l]), .pkt(b_pkt[l]),
      .frag_valid(f_valid[l]), .frag(f_frag[l]), .frag_ready(f_ready[l]),
      .sync_err(m_sync[l]), .trig_lost(m_tlost[l]), .alarm(m_alarm[l]), .eid(m_eid[l]));
  end

  assign eid = m_eid[0];

  be_event_builder #(.NLINK(NLINK)) u_evb (
    .clk, .rst_n, .be_reset, .in_valid(f_valid), .in_frag(f_frag), .in_ready(f_ready),
    .out_valid(e_valid), .out_frag(e_frag), .out_link(e_link), .out_last(e_last),
    .out_ready(e_ready), .eid_err(e_err));

  mep_builder #(.PF(PF)) u_mep (
    .clk, .rst_n, .be_reset, .in_valid(e_valid), .in_frag(e_frag), .in_link(e_link),
    .in_last(e_last), .in_ready(e_ready), .daq_valid(m_valid), .daq_data(m_data),
    .daq_sop(m_sop), .daq_eop(m_eop), .daq_ready(m_ready), .alarm(mep_alarm), .mep_done);

  daq_datagen u_gen (
    .clk, .rst_n, .enable(datagen_en), .daq_ready(daq_ready && datagen_en),
    .daq_valid(g_valid), .daq_data(g_data), .daq_sop(g_sop), .daq_eop(g_eop));

  always_comb begin
    m_ready   = daq_ready && !datagen_en;
    daq_valid = datagen_en ? g_valid : m_valid;
    daq_data  = datagen_en ? g_data  : m_data;
    daq_sop   = datagen_en ? g_sop   : m_sop;
    daq_eop   = datagen_en ? g_eop   : m_eop;
  end

  mep_spy #(.DEPTH(128), .NMEP(2)) u_spy (
    .clk, .rst_n, .arm(spy_arm), .mon_valid(daq_valid), .mon_ready(daq_ready),
    .mon_data(daq_data), .mon_sop(daq_sop), .mon_eop(daq_eop),
    .rd_addr(spy_rd_addr), .rd_data(spy_rd_data), .done(spy_done), .nwords(spy_nwords));

  be_throttle #(.NALARM(3)) u_thr (
    .clk, .rst_n, .alarms({mep_alarm, |m_alarm, |b_alarm}),
    .last_bid_valid(e_valid && e_ready && e_last), .last_bid(e_frag.bid),
    .throttle_word, .throttle, .throttled_cycles());

  counter_snapshot #(.N(8), .W(32)) u_cnt (
    .clk, .rst_n,
    .inc({trig_valid && trig.accept, throttle, |{b_lost, u_ovf, m_tlost}, |u_berr,
          |m_sync || e_err, |b_tevt, mep_done, e_valid && e_ready && e_last}),
    .latch(cnt_latch), .clear(cnt_clear), .rd_addr(cnt_addr), .rd_shadow(cnt_shadow),
    .rd_data(cnt_data));
endmodule
