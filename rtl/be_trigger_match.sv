// be_trigger_match: trigger buffer and event selection of one link on a BE
// board.
//
// Interaction-trigger decisions (accept or reject, one per crossing, carrying
// the full 12-bit BID) are kept in a TDEPTH-entry trigger buffer as they
// arrive from the TFC (64 entries by default: the buffer must cover the
// crossings between a decision and the arrival of its data, which includes
// the FE derandomiser and the GBT frame packing; the depth is this design's).
// arrive from the TFC. Because zero suppression makes the data latency vary,
// data and decisions are paired by bunch crossing rather than by time: the
// 4 Bcnt LSBs in the head packet's header are compared with the head
// decision's BID, as the architecture prescribes. On a match both are
// consumed; an accepted crossing leaves as a fragment tagged with the next
// Event-ID from the local counter, a rejected one is dropped. On a mismatch
// (this design's policy) the difference d = bcnt - bid (mod 16) decides:
// d in 1..7 means the decision's packet never came, so the decision is
// consumed and, if it was an accept, an empty fragment with the truncation
// bit is sent so that every link still delivers every Event-ID; d in 8..15
// means a packet has no decision and it is dropped. Both pulse sync_err.
// The Event-ID counter counts accepts and is cleared by eid_reset; be_reset
// clears the trigger buffer. 'alarm' is raised at 3/4 trigger-buffer fill.
// Interface: decisions by strobe, packets and fragments valid/ready; one
// decision per clock at most; the fragment output is registered.
module be_trigger_match
  import lhcb_pkg::*;
#(
  parameter int TDEPTH = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           be_reset,
  input  logic           eid_reset,
  input  logic           trig_valid,
  input  trig_decision_t trig,
  input  logic           pkt_valid,
  output logic           pkt_ready,
  input  fe_packet_t     pkt,
  output logic           frag_valid,
  output fragment_t      frag,
  input  logic           frag_ready,
  output logic           sync_err,
  output logic           trig_lost,
  output logic           alarm,
  output logic [EID_W-1:0] eid
);
  localparam int AW = $clog2(TDEPTH);

  trig_decision_t tbuf [TDEPTH];
  logic [AW:0]    wp, rp, count;
  logic           t_empty, t_full, can_out;
  trig_decision_t head;
  logic [3:0]     d;
  logic           match, trig_old, pop_t, pop_p, emit;
  fragment_t      nfrag;

  always_comb begin
    count   = wp - rp;
    t_empty = (count == 0);
    t_full  = (count == (AW+1)'(TDEPTH));
    head    = tbuf[rp[AW-1:0]];
    can_out = !frag_valid || frag_ready;
    d       = pkt.hdr.bcnt - head.bid[3:0];
    match    = (d == 4'd0);
    trig_old = (d >= 4'd1) && (d <= 4'd7);
    pop_t = 1'b0; pop_p = 1'b0; emit = 1'b0;
    nfrag = '0;
    nfrag.eid       = eid;
    nfrag.bid       = head.bid;
    nfrag.mep_dest  = head.mep_dest;
    nfrag.trig_type = head.trig_type;
    // only an accept has to wait for the fragment output; rejects keep
    // flowing so that the buffers drain while the DAQ side is blocked
    if (!t_empty && pkt_valid) begin
      if (match) begin
        if (can_out || !head.accept) begin
          pop_t = 1'b1; pop_p = 1'b1; emit = head.accept;
        end
        nfrag.pkt = pkt;
      end else if (trig_old) begin
        if (can_out || !head.accept) begin
          pop_t = 1'b1; emit = head.accept;
        end
        nfrag.pkt.hdr.bcnt  = head.bid[3:0];
        nfrag.pkt.hdr.trunc = 1'b1;
      end else begin
        pop_p = 1'b1;
      end
    end
    pkt_ready = pop_p;
    alarm     = count >= (AW+1)'((3 * TDEPTH) / 4);
  end

  always_ff @(posedge clk) begin
    if (trig_valid && !t_full) tbuf[wp[AW-1:0]] <= trig;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; eid <= '0;
      frag_valid <= 1'b0; frag <= '0; sync_err <= 1'b0; trig_lost <= 1'b0;
    end else begin
      if (be_reset) begin
        wp <= '0; rp <= '0; frag_valid <= 1'b0;
      end else begin
        if (trig_valid && !t_full) wp <= wp + 1'b1;
        if (pop_t) rp <= rp + 1'b1;
        if (emit) begin
          frag_valid <= 1'b1;
          frag       <= nfrag;
        end else if (frag_ready) begin
          frag_valid <= 1'b0;
        end
      end
      if (eid_reset)     eid <= '0;
      else if (emit && !be_reset) eid <= eid + 1'b1;
      sync_err  <= (pop_t || pop_p) && !match;
      trig_lost <= trig_valid && t_full;
    end
  end
endmodule
