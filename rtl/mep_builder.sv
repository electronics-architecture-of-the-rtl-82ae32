// mep_builder: DAQ formatting of a BE board. It packs events into
// multi-event packets (MEPs) for the link to the DAQ.
//
// Fragments of consecutive events (from be_event_builder, with in_last
// marking the end of an event) are written as 64-bit words into a transmit
// buffer of WDEPTH words, two words per fragment:
//   word 0: {8'hF0, link[3:0], trunc, len[5:0], trig_type[3:0], 5'b0, bid[11:0], eid[23:0]}
//   word 1: the fragment's data, zero-extended.
// A MEP is closed after PF events, when the next event goes to a different
// MEP destination, or when no fragment has come for TIMEOUT clocks. Closing a
// MEP queues a descriptor; the transmitter then sends the MEP header word
//   {8'hAB, dest[15:0], nevents[7:0], first eid[23:0], nwords[7:0]}
// followed by the MEP's nwords body words, with daq_sop on the header and
// daq_eop on the last word. The word layouts are this design's own; the MEP
// principle, the destination per event from the TFC and the near-full alarm
// back-propagated for throttling follow the architecture. 'alarm' is raised at
// 3/4 transmit-buffer fill. Interface: valid/ready on both sides; a fragment
// is taken in two clocks.
module mep_builder
  import lhcb_pkg::*;
#(
  parameter int PF      = 8,
  parameter int WDEPTH  = 256,
  parameter int DDEPTH  = 8,
  parameter int TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        be_reset,
  input  logic        in_valid,
  input  fragment_t   in_frag,
  input  logic [3:0]  in_link,
  input  logic        in_last,
  output logic        in_ready,
  output logic        daq_valid,
  output logic [63:0] daq_data,
  output logic        daq_sop,
  output logic        daq_eop,
  input  logic        daq_ready,
  output logic        alarm,
  output logic        mep_done
);
  localparam int AW = $clog2(WDEPTH);
  localparam int DW = $clog2(DDEPTH);
  localparam int TW = $clog2(TIMEOUT + 1);

  typedef struct packed {
    logic [DEST_W-1:0] dest;
    logic [7:0]        nev;
    logic [EID_W-1:0]  first_eid;
    logic [7:0]        nwords;
  } mep_desc_t;

  // transmit buffer
  logic [63:0] wmem [WDEPTH];
  logic [AW:0] wwp, wrp, wcount;
  // descriptor queue
  mep_desc_t   dmem [DDEPTH];
  logic [DW:0] dwp, drp, dcount;

  // MEP being assembled
  logic        open, in_event, phase;
  mep_desc_t   cur;
  logic [TW-1:0] idle;

  logic        wr_word, close_now, dest_change, last_of_mep, can_close;
  logic [63:0] word;
  logic        rd_word;
  mep_desc_t   close_desc;

  // transmitter
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_BODY} tx_state_t;
  tx_state_t   tx;
  logic [7:0]  remain;
  mep_desc_t   txd;

  always_comb begin
    wcount    = wwp - wrp;
    dcount    = dwp - drp;
    can_close = dcount != (DW+1)'(DDEPTH);
    dest_change = open && !in_event && !phase && in_valid && (in_frag.mep_dest != cur.dest);
    last_of_mep = in_last && (cur.nev == 8'(PF - 1));
    in_ready  = 1'b0;
    wr_word   = 1'b0;
    close_now = 1'b0;
    word      = '0;
    if (dest_change || (open && !in_event && !in_valid && idle == TW'(TIMEOUT))) begin
      close_now = can_close;
    end else if (in_valid && !phase) begin
      wr_word = (wcount <= (AW+1)'(WDEPTH - 2));
      word = {8'hF0, in_link, in_frag.pkt.hdr.trunc, in_frag.pkt.hdr.len, in_frag.trig_type,
              5'b0, in_frag.bid, in_frag.eid};
    end else if (in_valid && phase) begin
      if (!(last_of_mep && !can_close)) begin
        wr_word   = 1'b1;
        in_ready  = 1'b1;
        close_now = last_of_mep;
      end
      word = 64'(in_frag.pkt.data);
    end
    alarm = wcount >= (AW+1)'((3 * WDEPTH) / 4);
    // a MEP closed by its last data word includes that word and event
    close_desc = cur;
    if (in_ready) begin
      close_desc.nwords = cur.nwords + 8'd1;
      close_desc.nev    = cur.nev + 8'd1;
    end
  end

  // transmitter datapath
  always_comb begin
    daq_valid = 1'b0; daq_data = '0; daq_sop = 1'b0; daq_eop = 1'b0; rd_word = 1'b0;
    unique case (tx)
      TX_HDR: begin
        daq_valid = 1'b1;
        daq_sop   = 1'b1;
        daq_eop   = (txd.nwords == 8'd0);
        daq_data  = {8'hAB, txd.dest, txd.nev, txd.first_eid, txd.nwords};
      end
      TX_BODY: begin
        daq_valid = (wcount != 0);
        daq_data  = wmem[wrp[AW-1:0]];
        daq_eop   = (remain == 8'd1);
        rd_word   = daq_valid && daq_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_word) wmem[wwp[AW-1:0]] <= word;
    if (close_now) dmem[dwp[DW-1:0]] <= close_desc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wwp <= '0; wrp <= '0; dwp <= '0; drp <= '0;
      open <= 1'b0; in_event <= 1'b0; phase <= 1'b0; cur <= '0; idle <= '0;
      tx <= TX_IDLE; remain <= '0; txd <= '0; mep_done <= 1'b0;
    end else if (be_reset) begin
      wwp <= '0; wrp <= '0; dwp <= '0; drp <= '0;
      open <= 1'b0; in_event <= 1'b0; phase <= 1'b0; cur <= '0; idle <= '0;
      tx <= TX_IDLE; remain <= '0; mep_done <= 1'b0;
    end else begin
      // assembly
      if (wr_word) wwp <= wwp + 1'b1;
      if (wr_word && !phase) begin
        phase    <= 1'b1;
        in_event <= 1'b1;
        if (!open) begin
          open          <= 1'b1;
          cur.dest      <= in_frag.mep_dest;
          cur.first_eid <= in_frag.eid;
          cur.nev       <= '0;
          cur.nwords    <= 8'd1;
        end else begin
          cur.nwords <= cur.nwords + 8'd1;
        end
      end
      if (in_ready) begin
        phase      <= 1'b0;
        cur.nwords <= cur.nwords + 8'd1;
        if (in_last) begin
          in_event <= 1'b0;
          cur.nev  <= cur.nev + 8'd1;
        end
      end
      if (close_now) begin
        dwp  <= dwp + 1'b1;
        open <= 1'b0;
      end
      idle <= (in_valid || !open) ? '0 : ((idle == TW'(TIMEOUT)) ? idle : idle + 1'b1);

      // transmission
      mep_done <= 1'b0;
      unique case (tx)
        TX_IDLE: if (dcount != 0) begin
          txd <= dmem[drp[DW-1:0]];
          drp <= drp + 1'b1;
          tx  <= TX_HDR;
        end
        TX_HDR: if (daq_ready) begin
          remain <= txd.nwords;
          tx     <= (txd.nwords == 8'd0) ? TX_IDLE : TX_BODY;
          mep_done <= (txd.nwords == 8'd0);
        end
        TX_BODY: if (rd_word) begin
          wrp    <= wrp + 1'b1;
          remain <= remain - 1'b1;
          if (remain == 8'd1) begin
            tx       <= TX_IDLE;
            mep_done <= 1'b1;
          end
        end
        default: tx <= TX_IDLE;
      endcase
    end
  end
endmodule
