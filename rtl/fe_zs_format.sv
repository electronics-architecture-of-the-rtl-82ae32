// fe_zs_format: zero suppression and header formatting of one FE chip.
//
// Each crossing (bx_en) it takes the one-bit digitised channels and builds
// one packet: the m-bit header {length, 4 Bcnt LSBs, truncation bit} followed
// by the data. In zero-suppressed mode the data is the list of 5-bit addresses
// of the unmasked channels that fired, lowest channel in the lowest bits. At
// most 12 addresses (60 bits) fit in the 63-bit payload; further hits are
// dropped and the truncation bit is set, as the architecture requires for an
// over-size crossing. In NZS mode the raw, unmasked hit map (NCH bits) is
// sent under the same header. A BX veto from the TFC sends the header alone
// (length 0) unless the data-force bit is also set.
//
// Which digitisation, which ZS rule and which data layout to use is left to
// each sub-detector by the architecture; the one-bit discriminator and the
// address list are this design's choices. Latency: one clock; pkt_valid is
// high for one clock per bx_en while enable is high.
module fe_zs_format
  import lhcb_pkg::*;
#(
  parameter int NCH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bx_en,
  input  logic           enable,
  input  logic [NCH-1:0] hits,
  input  logic [NCH-1:0] chan_mask,
  input  logic [11:0]    bcnt,
  input  logic           nzs,
  input  logic           veto,
  input  logic           force_data,
  output logic           pkt_valid,
  output fe_packet_t     pkt
);
  localparam int AW       = $clog2(NCH);
  localparam int MAX_HITS = MAX_DATA_W / AW;

  initial assert (NCH <= MAX_DATA_W && NCH >= 2)
    else $error("fe_zs_format: NCH must fit in the payload");

  fe_packet_t nxt;
  logic [NCH-1:0] masked;
  logic [MAX_DATA_W-1:0] zs_data;
  int unsigned nhit;
  logic over;

  always_comb begin
    masked  = hits & ~chan_mask;
    zs_data = '0;
    nhit    = 0;
    over    = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      if (masked[c]) begin
        if (nhit < MAX_HITS) begin
          zs_data[nhit*AW +: AW] = AW'(c);
          nhit = nhit + 1;
        end else begin
          over = 1'b1;
        end
      end
    end

    nxt          = '0;
    nxt.hdr.bcnt = bcnt[3:0];
    if (veto && !force_data) begin
      nxt.hdr.len = '0;
    end else if (nzs) begin
      nxt.hdr.len = LEN_W'(NCH);
      nxt.data    = MAX_DATA_W'(hits);
    end else begin
      nxt.hdr.len   = LEN_W'(nhit * AW);
      nxt.hdr.trunc = over;
      nxt.data      = zs_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_valid <= 1'b0;
      pkt       <= '0;
    end else begin
      pkt_valid <= bx_en && enable;
      if (bx_en) pkt <= nxt;
    end
  end
endmodule
