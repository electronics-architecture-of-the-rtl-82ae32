// be_unpacker: data receiver of one GBT link on a BE board. It turns the
// continuous stream of 80-bit frames back into the FE packets.
//
// Frames arriving with frame_valid are queued in a FIFO_DEPTH-frame FIFO,
// because a frame full of short header-only packets yields several packets
// while the unpacker delivers one per clock. The head frame is appended to a
// 2*FRAME_W-bit accumulator whenever it fits. Whenever the accumulator holds
// a whole header and the data length it announces, that packet is emitted
// (pkt_valid for one clock) and removed. This is how the architecture expects
// the BE to extract data: from the length field of each header.
// The 4 Bcnt LSBs of successive packets are checked: a step of +1 (mod 16)
// is normal, a step to 0 is taken as a Bcnt reset, anything else pulses
// bcnt_err (the acceptance of 0 is this design's choice). overflow pulses when
// a frame meets a full FIFO and is lost. be_reset empties FIFO and accumulator.
// Output has no back-pressure: the input buffer behind it always accepts.
module be_unpacker
  import lhcb_pkg::*;
#(
  parameter int FRAME_W    = 80,
  parameter int FIFO_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               be_reset,
  input  logic               frame_valid,
  input  logic [FRAME_W-1:0] frame,
  output logic               pkt_valid,
  output fe_packet_t         pkt,
  output logic               bcnt_err,
  output logic               overflow
);
  localparam int ACC_W = 2 * FRAME_W;
  localparam int CW    = $clog2(ACC_W + 1);
  localparam int AW    = $clog2(FIFO_DEPTH);

  logic [FRAME_W-1:0] fifo [FIFO_DEPTH];
  logic [AW:0]        wp, rp;
  logic               f_empty, f_full;

  logic [ACC_W-1:0] acc, acc_a;
  logic [CW-1:0]    cnt, cnt_a, plen;
  fe_header_t       hdr;
  logic             take, pop;
  fe_packet_t       cur;
  logic [3:0]       prev_bcnt;
  logic             have_prev;

  always_comb begin
    f_empty = (wp == rp);
    f_full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
    hdr     = fe_header_t'(acc[HDR_M-1:0]);
    plen    = CW'(pkt_bits(hdr));
    take    = (cnt >= CW'(HDR_M)) && (cnt >= plen);
    cur     = fe_packet_t'(acc[PKT_W-1:0]);
    // clear bits beyond the announced length
    cur.data = cur.data & ((MAX_DATA_W'(1) << hdr.len) - 1'b1);
    acc_a   = take ? (acc >> plen) : acc;
    cnt_a   = take ? (cnt - plen) : cnt;
    pop     = !f_empty && (32'(cnt_a) + FRAME_W <= ACC_W);
  end

  always_ff @(posedge clk) begin
    if (frame_valid && !f_full) fifo[wp[AW-1:0]] <= frame;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; acc <= '0; cnt <= '0;
      pkt_valid <= 1'b0; pkt <= '0; bcnt_err <= 1'b0; overflow <= 1'b0;
      prev_bcnt <= '0; have_prev <= 1'b0;
    end else if (be_reset) begin
      wp <= '0; rp <= '0; acc <= '0; cnt <= '0;
      pkt_valid <= 1'b0; bcnt_err <= 1'b0; overflow <= 1'b0; have_prev <= 1'b0;
    end else begin
      if (frame_valid && !f_full) wp <= wp + 1'b1;
      overflow <= frame_valid && f_full;
      if (pop) begin
        rp  <= rp + 1'b1;
        acc <= acc_a | (ACC_W'(fifo[rp[AW-1:0]]) << cnt_a);
        cnt <= cnt_a + CW'(FRAME_W);
      end else begin
        acc <= acc_a;
        cnt <= cnt_a;
      end
      pkt_valid <= take;
      bcnt_err  <= 1'b0;
      if (take) begin
        pkt       <= cur;
        prev_bcnt <= hdr.bcnt;
        have_prev <= 1'b1;
        bcnt_err  <= have_prev && (hdr.bcnt != prev_bcnt + 4'd1) && (hdr.bcnt != 4'd0);
      end
    end
  end
endmodule
