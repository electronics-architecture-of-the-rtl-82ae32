// fe_config: configuration and status registers of an FE chip, written and
// read back by the Experiment Control System (ECS).
//
// Holds the channel mask used by zero suppression, the Bcnt offset loaded on
// a Bcnt reset, the running-mode bits and the two FE buffer thresholds that
// switch truncation on and off. The architecture reaches these through the
// GBT-SCA (I2C or JTAG); here a plain parallel register bus stands in for that
// protocol. Every register reads back (no write-only registers). Only rst_n
// clears the registers: the fast FE and Bcnt resets never touch configuration.
//
// Map (32-bit registers, own choice):
//   0 channel mask (1 = masked)     1 Bcnt offset [11:0]
//   2 control: [0] NZS mode, [1] test-pattern mode
//   3 thresholds: [15:0] high, [31:16] low (bits in the FE buffer)
//   4 status (read-only): [15:0] truncated packets, [31:16] lost packets
// Writes take effect at the next clock; rdata is combinational from addr.
module fe_config #(
  parameter int NCH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  logic [2:0]     addr,
  input  logic [31:0]    wdata,
  output logic [31:0]    rdata,
  input  logic [15:0]    stat_trunc,
  input  logic [15:0]    stat_lost,
  output logic [NCH-1:0] chan_mask,
  output logic [11:0]    bcnt_offset,
  output logic           nzs_mode,
  output logic           pattern_mode,
  output logic [15:0]    buf_hi,
  output logic [15:0]    buf_lo
);
  initial assert (NCH <= 32) else $error("fe_config: NCH must be <= 32");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chan_mask    <= '0;
      bcnt_offset  <= '0;
      nzs_mode     <= 1'b0;
      pattern_mode <= 1'b0;
      buf_hi       <= 16'd600;
      buf_lo       <= 16'd200;
    end else if (wr_en) begin
      unique case (addr)
        3'd0: chan_mask <= wdata[NCH-1:0];
        3'd1: bcnt_offset <= wdata[11:0];
        3'd2: {pattern_mode, nzs_mode} <= wdata[1:0];
        3'd3: {buf_lo, buf_hi} <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      3'd0: rdata[NCH-1:0] = chan_mask;
      3'd1: rdata[11:0]    = bcnt_offset;
      3'd2: rdata[1:0]     = {pattern_mode, nzs_mode};
      3'd3: rdata          = {buf_lo, buf_hi};
      3'd4: rdata          = {stat_lost, stat_trunc};
      default: rdata = '0;
    endcase
  end
endmodule
