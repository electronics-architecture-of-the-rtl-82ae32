// gbt_packer: packs variable-length FE packets back to back into the 80-bit
// user data field of consecutive GBT frames, as in the architecture's data
// framing example: a packet may start anywhere in a frame and run on into the
// next one.
//
// A bit accumulator of 3*FRAME_W bits holds what is waiting. Each crossing
// (bx_en), if at least FRAME_W bits wait and the GBT reports READY, the lowest
// FRAME_W bits leave as one frame with tx_en high; then up to two packets from
// the head of the buffer are appended above the remaining bits, as far as
// they fit. Taking two per crossing lets a backlog drain, since the chip
// makes one packet per crossing. Bit 0 of a frame is
// the first bit on the link and a packet starts with its header bit 0, so the
// receiver can walk the stream header by header. Partial frames are never
// padded: with at least one header per crossing the stream always fills up.
// The packer is not cleared by the FE reset, so the framing on the link
// survives it (own choice). tx_data/tx_en are registered and change on bx_en.
module gbt_packer
  import lhcb_pkg::*;
#(
  parameter int FRAME_W = 80
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bx_en,
  input  logic [1:0]         pkt_avail,
  input  fe_packet_t         pkt [2],
  output logic [1:0]         pkt_take,
  input  logic               gbt_ready,
  output logic [FRAME_W-1:0] tx_data,
  output logic               tx_en
);
  localparam int ACC_W = 3 * FRAME_W;
  localparam int CW    = $clog2(ACC_W + 1);

  initial assert (FRAME_W >= PKT_W) else $error("gbt_packer: frame narrower than a packet");

  logic [ACC_W-1:0] acc, acc_sh, vec0, vec1, acc_a, acc_n;
  logic [CW-1:0]    cnt, cnt_sh, len0, len1, cnt_a, cnt_n;
  logic             emit, take0, take1;

  // one assignment per signal, in dataflow order: frame out, then up to two
  // packets appended behind what is left
  assign emit     = gbt_ready && (cnt >= CW'(FRAME_W));
  assign acc_sh   = emit ? (acc >> FRAME_W) : acc;
  assign cnt_sh   = emit ? (cnt - CW'(FRAME_W)) : cnt;
  assign len0     = CW'(pkt_bits(pkt[0].hdr));
  assign len1     = CW'(pkt_bits(pkt[1].hdr));
  // keep only the header and the valid data bits
  assign vec0     = ACC_W'(pkt[0]) & ((ACC_W'(1) << len0) - 1'b1);
  assign vec1     = ACC_W'(pkt[1]) & ((ACC_W'(1) << len1) - 1'b1);
  assign take0    = bx_en && (pkt_avail >= 2'd1) && (32'(cnt_sh) + 32'(len0) <= ACC_W);
  assign take1    = take0 && (pkt_avail == 2'd2) && (32'(cnt_sh) + 32'(len0) + 32'(len1) <= ACC_W);
  assign pkt_take = {1'b0, take0} + {1'b0, take1};
  assign acc_a    = take0 ? (acc_sh | (vec0 << cnt_sh)) : acc_sh;
  assign cnt_a    = take0 ? (cnt_sh + len0) : cnt_sh;
  assign acc_n    = take1 ? (acc_a | (vec1 << cnt_a)) : acc_a;
  assign cnt_n    = take1 ? (cnt_a + len1) : cnt_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      cnt     <= '0;
      tx_data <= '0;
      tx_en   <= 1'b0;
    end else if (bx_en) begin
      tx_en <= emit;
      if (emit) tx_data <= acc[FRAME_W-1:0];
      acc <= acc_n;
      cnt <= cnt_n;
    end
  end
endmodule
