// fe_chip: digital part of one front-end chip, from digitised channels to
// the GBT uplink.
//
// Per crossing (bx_en) it decodes the 24-bit TFC word broadcast by the GBT
// downlink (BID, calibration type, BX veto, NZS, data force, FE reset, BID
// reset, in the architecture's bit positions), advances the bunch counter,
// zero-suppresses and formats the hits (fe_zs_format), stores the packet in
// the derandomising buffer with truncation control (fe_buffer) and packs the
// buffer into 80-bit GBT frames (gbt_packer). In test-pattern mode the frames
// come from fe_pattern_gen instead. A BID reset presets the bunch counter to
// the ECS offset; an FE reset empties the buffer; neither touches the
// configuration. A non-zero calibration type makes a one-clock calibration
// pulse. The chip sends no packets until it has seen its first BID reset, so
// that every packet carries a synchronised Bcnt (own choice).
//
// Interface: hits and tfc_word are sampled on bx_en and belong to the same
// crossing. tx_data/tx_en go to the GBT and change only on bx_en. The ECS
// register bus is fe_config's.
//
// Constant outputs: tmr_err is 0 after synthesis (see fe_buffer: upset
// injection is tied off, so only a real upset can raise it).
module fe_chip
  import lhcb_pkg::*;
#(
  parameter int NCH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bx_en,
  input  logic [NCH-1:0]  hits,
  input  tfc_fe_word_t    tfc_word,
  input  logic            gbt_ready,
  input  logic            cfg_wr,
  input  logic [2:0]      cfg_addr,
  input  logic [31:0]     cfg_wdata,
  output logic [31:0]     cfg_rdata,
  output logic [GBT_D_W-1:0] tx_data,
  output logic            tx_en,
  output logic            calib_pulse,
  output logic [3:0]      calib_type,
  output logic [11:0]     bcnt,
  output logic            truncating,
  output logic            tmr_err
);
  logic [NCH-1:0] chan_mask;
  logic [11:0]    bcnt_offset;
  logic           nzs_mode, pattern_mode;
  logic [15:0]    buf_hi, buf_lo, occ_bits;
  logic [15:0]    n_trunc, n_lost;
  logic           synced;
  logic           bid_reset, fe_reset;

  logic       zs_valid, trunc_evt, lost;
  logic [1:0] buf_avail, buf_take;
  fe_packet_t zs_pkt;
  fe_packet_t buf_pkt [2];
  logic [GBT_D_W-1:0] pk_data, pat_frame;
  logic       pk_en;

  always_comb begin
    bid_reset = bx_en && tfc_word.bid_reset;
    fe_reset  = bx_en && tfc_word.fe_reset;
  end

  fe_config #(.NCH(NCH)) u_cfg (
    .clk, .rst_n, .wr_en(cfg_wr), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata),
    .stat_trunc(n_trunc), .stat_lost(n_lost), .chan_mask, .bcnt_offset, .nzs_mode,
    .pattern_mode, .buf_hi, .buf_lo);

  bx_counter #(.ORBIT_BX(ORBIT_BX), .W(12)) u_bcnt (
    .clk, .rst_n, .bx_en, .bcnt_reset(tfc_word.bid_reset), .offset(bcnt_offset), .bcnt);

  fe_zs_format #(.NCH(NCH)) u_zs (
    .clk, .rst_n, .bx_en, .enable(synced && !pattern_mode), .hits, .chan_mask, .bcnt,
    .nzs(tfc_word.nzs || nzs_mode), .veto(tfc_word.bx_veto), .force_data(tfc_word.data_force),
    .pkt_valid(zs_valid), .pkt(zs_pkt));

  fe_buffer #(.DEPTH(16)) u_buf (
    .clk, .rst_n, .fe_reset, .wr_valid(zs_valid), .wr_pkt(zs_pkt),
    .rd_avail(buf_avail), .rd_take(buf_take), .rd_pkt(buf_pkt),
    .hi_thr(buf_hi), .lo_thr(buf_lo), .occ_bits, .truncating, .trunc_evt, .lost, .tmr_err);

  gbt_packer #(.FRAME_W(GBT_D_W)) u_pack (
    .clk, .rst_n, .bx_en, .pkt_avail(buf_avail), .pkt(buf_pkt), .pkt_take(buf_take),
    .gbt_ready(gbt_ready && !pattern_mode), .tx_data(pk_data), .tx_en(pk_en));

  fe_pattern_gen #(.FRAME_W(GBT_D_W)) u_pat (
    .clk, .rst_n, .bx_en, .fe_reset, .bcnt, .frame(pat_frame));

  logic pat_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced      <= 1'b0;
      calib_pulse <= 1'b0;
      calib_type  <= '0;
      n_trunc     <= '0;
      n_lost      <= '0;
      pat_en      <= 1'b0;
    end else begin
      if (bid_reset) synced <= 1'b1;
      calib_pulse <= bx_en && (tfc_word.calib_type != 4'd0);
      if (bx_en) calib_type <= tfc_word.calib_type;
      if (trunc_evt || (zs_valid && zs_pkt.hdr.trunc)) n_trunc <= n_trunc + 1'b1;
      if (lost) n_lost <= n_lost + 1'b1;
      if (bx_en) pat_en <= pattern_mode && gbt_ready;
    end
  end

  always_comb begin
    tx_data = pattern_mode ? pat_frame : pk_data;
    tx_en   = pattern_mode ? pat_en    : pk_en;
  end
endmodule
